// interleaved_cache_tb: fills the 8-line interleaved store through its
// logical addresses and reads it back, with no fault, with the single fault
// at line 100 and with random multi-line fault maps. It checks the data, the
// flag on addresses that land on faulty lines, the one-cycle read latency,
// and (through the bank arrays) that each logical line sits in the physical
// set and row the remapping rule gives: set = physical A0, row = A2..A1.
module interleaved_cache_tb;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_faulty_reads = 0;

  logic clk = 0, rst_n = 0;
  logic [7:0] fault_map;
  logic       wr_en, rd_en, rd_valid, rd_ok;
  logic [2:0] wr_addr, rd_addr;
  logic [7:0] wr_data, rd_data;

  interleaved_cache #(.LINES(8), .DATA_W(8), .BANKS(2)) dut (.*);

  always #5 clk = ~clk;

  int order [8];
  int healthy;

  task automatic build_order(logic [7:0] m);
    int n;
    n = 0;
    for (int p = 0; p < 8; p++) if (!m[p]) order[n++] = p;
    healthy = n;
    for (int p = 0; p < 8; p++) if (m[p]) order[n++] = p;
  endtask

  task automatic run_map(logic [7:0] m);
    logic [7:0] data [8];
    fault_map = m;
    build_order(m);
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      data[a] = 8'($urandom);
      wr_en = 1; wr_addr = 3'(a); wr_data = data[a];
    end
    @(negedge clk); wr_en = 0;
    // Physical placement of every healthy logical line.
    for (int a = 0; a < healthy; a++) begin
      int p;
      p = order[a];
      checks++;
      if (dut.bank_mem[p % 2][p / 2] !== data[a]) begin
        failures++;
        $display("FAIL map %b: logical %0d not in set %0d row %0d", m, a, p % 2, p / 2);
      end
      if (p != a) n_bypass++;
    end
    // Read back, one cycle latency.
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 3'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (!rd_valid || rd_ok !== (a < healthy) || rd_data !== ((a < healthy) ? data[a] : 8'h00)) begin
        failures++;
        if (failures < 20)
          $display("FAIL map %b read %0d: v%b ok%b %h exp %h", m, a, rd_valid, rd_ok, rd_data, data[a]);
      end
      if (a >= healthy) n_faulty_reads++;
      @(negedge clk);
      checks++;
      if (rd_valid) begin
        failures++; $display("FAIL rd_valid held longer than one cycle");
      end
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0; fault_map = 0;
    #12 rst_n = 1;
    run_map(8'b0000_0000);
    run_map(8'b0001_0000);   // single fault at line 100
    run_map(8'b0101_0000);   // faults at 100 and 110
    for (int i = 0; i < 30; i++) run_map(8'($urandom) & 8'($urandom));
    if (n_bypass == 0 || n_faulty_reads == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("bypassed lines %0d, reads of faulty lines %0d", n_bypass, n_faulty_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
