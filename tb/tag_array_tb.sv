// tag_array_tb: writes random rows into the tag array, keeps a model of the
// contents here, and checks the three-row read (set, set above, set below),
// the neighbour flags at the first and last set, reset, and the bit-flip
// port used to model soft errors.
module tag_array_tb;
  import sti_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  set_idx_t rd_idx, wr_idx, inj_idx;
  enc_row_t rd_row, rd_upper, rd_lower, wr_row;
  logic upper_en, lower_en, wr_en, inj_en;
  way_t inj_way;
  logic [3:0] inj_bit;

  tag_array dut (.*);

  always #5 clk = ~clk;

  enc_row_t model [8];

  task automatic check_reads();
    for (int s = 0; s < 8; s++) begin
      rd_idx = 3'(s);
      #1;
      checks++;
      if (rd_row !== model[s] || upper_en !== (s != 0) || lower_en !== (s != 7) ||
          (s != 0 && rd_upper !== model[s-1]) || (s != 7 && rd_lower !== model[s+1])) begin
        failures++;
        if (failures < 20) $display("FAIL read set %0d: %h exp %h", s, rd_row, model[s]);
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; inj_en = 0; rd_idx = 0; wr_idx = 0; wr_row = '0;
    inj_idx = 0; inj_way = 0; inj_bit = 0;
    for (int s = 0; s < 8; s++) model[s] = '0;
    #12 rst_n = 1;
    check_reads();
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      wr_en  = 1'($urandom);
      wr_idx = 3'($urandom);
      for (int w = 0; w < 4; w++) wr_row[w] = 13'($urandom);
      inj_en  = ($urandom_range(0, 3) == 0);
      inj_idx = 3'($urandom);
      inj_way = 2'($urandom);
      inj_bit = 4'($urandom_range(0, 12));
      @(posedge clk);
      #1;
      if (inj_en) model[inj_idx][inj_way][inj_bit] ^= 1'b1;
      if (wr_en)  model[wr_idx] = wr_row;
      wr_en = 0; inj_en = 0;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
