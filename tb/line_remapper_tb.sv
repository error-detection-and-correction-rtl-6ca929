// line_remapper_tb: exhaustive check of the line remapping over all 256
// fault maps of 8 lines and all 8 logical addresses, against a reference
// that lists the healthy lines and then the faulty ones in ascending order.
// Also checks the single-fault example (line 4 faulty) line by line.
module line_remapper_tb;

  int checks = 0, failures = 0;

  logic [7:0] fault_map;
  logic [2:0] log_addr, phys_addr;
  logic       ok;

  line_remapper #(.LINES(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Single fault at line 100: 100->101, 101->110, 110->111, 111->100 (faulty).
    static logic [2:0] single_exp [8] = '{0, 1, 2, 3, 5, 6, 7, 4};
    fault_map = 8'b0001_0000;
    for (int a = 0; a < 8; a++) begin
      log_addr = 3'(a);
      #1;
      checks++;
      if (phys_addr !== single_exp[a] || ok !== (a != 7)) begin
        failures++;
        $display("FAIL single fault: log %0d -> %0d ok %b", a, phys_addr, ok);
      end
    end
    for (int m = 0; m < 256; m++) begin
      int order [8];
      int n;
      n = 0;
      for (int p = 0; p < 8; p++) if (!m[p]) order[n++] = p;
      for (int p = 0; p < 8; p++) if (m[p])  order[n++] = p;
      fault_map = 8'(m);
      for (int a = 0; a < 8; a++) begin
        log_addr = 3'(a);
        #1;
        checks++;
        if (phys_addr !== 3'(order[a]) || ok !== !m[order[a]]) begin
          failures++;
          if (failures < 20)
            $display("FAIL map %b log %0d: got %0d/%b exp %0d", m[7:0], a, phys_addr, ok, order[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
