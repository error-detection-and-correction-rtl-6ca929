// bloom_ecc_top_tb: end-to-end test of the top level at its default sizes.
//
// Tag directory: fills the 8-set x 4-way directory with the example tag
// table, then runs hand-worked cases: an upset that would cause a pseudo
// miss and is repaired (and written back), an upset that would cause a
// pseudo hit and a multi-hit and is repaired, an upset in a tag with no
// copy, which is reported as uncorrectable, and an upset in a victim line's
// tag that is corrected when the tag is read for the write-back address.
// Interleaved line store: holds lines 1,5,3,7 in set 0 and 2,6,4,8 in set 1,
// reads them back with no fault, then with line 100 marked faulty, where
// logical 100..110 move up by one line and 111 reaches the faulty line.
// Bloom filter: inserts keys, checks that every inserted key is reported,
// counts false positives and clears.
// Every mechanism is counted and must occur at least once.
module bloom_ecc_top_tb;
  import sti_pkg::*;

  int checks = 0, failures = 0;
  int n_repl = 0, n_reencode = 0, n_corr = 0, n_due = 0, n_ph = 0, n_pm = 0, n_mh = 0, n_wb = 0;
  int n_bypass = 0, n_faulty = 0, n_member = 0, n_fp = 0, n_clear = 0;

  logic clk = 0, rst_n = 0;
  logic tc_cmd_valid, tc_cmd_ready;
  op_e  tc_cmd_op;
  tag_t tc_rsp_tag;
  logic tc_rsp_tag_ok;
  set_idx_t tc_cmd_set, tc_inj_set;
  way_t tc_cmd_way, tc_inj_way, tc_rsp_way;
  tag_t tc_cmd_tag;
  logic tc_rsp_valid, tc_rsp_hit, tc_rsp_multi_hit, tc_rsp_pseudo_hit, tc_rsp_pseudo_miss;
  logic [3:0] tc_rsp_corrected, tc_rsp_due;
  logic tc_inj_en;
  logic [3:0] tc_inj_bit;
  logic [7:0] ic_fault_map;
  logic ic_wr_en, ic_rd_en, ic_rd_valid, ic_rd_ok;
  logic [2:0] ic_wr_addr, ic_rd_addr;
  logic [7:0] ic_wr_data, ic_rd_data;
  logic bf_clear, bf_insert, bf_query, bf_q_valid, bf_q_member;
  logic [7:0] bf_ins_key, bf_q_key, bf_vector;

  bloom_ecc_top dut (.*);

  always #5 clk = ~clk;

  localparam logic [7:0] EXAMPLE [8][4] = '{
    '{8'h08, 8'h09, 8'h0A, 8'h08}, '{8'h09, 8'h0B, 8'h0D, 8'h0E},
    '{8'h0A, 8'h09, 8'h08, 8'h0B}, '{8'h0B, 8'h08, 8'h0C, 8'h0D},
    '{8'h0C, 8'h0F, 8'h0E, 8'h0B}, '{8'h0D, 8'h0A, 8'h0B, 8'h09},
    '{8'h0E, 8'h0C, 8'h0F, 8'h0F}, '{8'h0F, 8'h0D, 8'h0D, 8'h0C}};

  task automatic check_that(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- tag directory ----------------
  task automatic tc_write(int s, int w, logic [7:0] t);
    int busy;
    @(negedge clk);
    tc_cmd_valid = 1; tc_cmd_op = OP_WRITE; tc_cmd_set = 3'(s); tc_cmd_way = 2'(w); tc_cmd_tag = t;
    @(negedge clk);
    tc_cmd_valid = 0;
    busy = 1;
    while (!tc_cmd_ready) begin busy++; @(negedge clk); end
    check_that($sformatf("write busy %0d at set %0d", busy, s), busy == ((s == 0 || s == 7) ? 3 : 4));
    n_reencode++;
  endtask

  task automatic tc_lookup(int s, logic [7:0] t, logic hit, int way, logic mh,
                           logic ph, logic pm, logic [3:0] cor, logic [3:0] due);
    @(negedge clk);
    tc_cmd_valid = 1; tc_cmd_op = OP_LOOKUP; tc_cmd_set = 3'(s); tc_cmd_tag = t;
    @(negedge clk);
    tc_cmd_valid = 0;
    check_that($sformatf("lookup set %0d tag %h: v%b hit%b way%0d mh%b ph%b pm%b cor%b due%b",
                     s, t, tc_rsp_valid, tc_rsp_hit, tc_rsp_way, tc_rsp_multi_hit,
                     tc_rsp_pseudo_hit, tc_rsp_pseudo_miss, tc_rsp_corrected, tc_rsp_due),
           tc_rsp_valid && tc_rsp_hit == hit && (!hit || tc_rsp_way == 2'(way)) &&
           tc_rsp_multi_hit == mh && tc_rsp_pseudo_hit == ph &&
           tc_rsp_pseudo_miss == pm && tc_rsp_corrected == cor && tc_rsp_due == due &&
           tc_rsp_tag_ok == hit && (!hit || tc_rsp_tag == t));
    n_corr += $countones(tc_rsp_corrected); n_due += $countones(tc_rsp_due);
    n_ph += int'(tc_rsp_pseudo_hit); n_pm += int'(tc_rsp_pseudo_miss);
    n_mh += int'(tc_rsp_multi_hit);
  endtask

  // Read the tag of one way, as for the write-back address of a victim.
  task automatic tc_read(int s, int w, logic [7:0] t, logic ok, logic [3:0] cor, logic [3:0] due);
    @(negedge clk);
    tc_cmd_valid = 1; tc_cmd_op = OP_READ; tc_cmd_set = 3'(s); tc_cmd_way = 2'(w);
    @(negedge clk);
    tc_cmd_valid = 0; tc_cmd_op = OP_LOOKUP;
    check_that($sformatf("read set %0d way %0d: v%b tag %h ok%b cor%b due%b", s, w, tc_rsp_valid,
                         tc_rsp_tag, tc_rsp_tag_ok, tc_rsp_corrected, tc_rsp_due),
               tc_rsp_valid && tc_rsp_tag == t && tc_rsp_tag_ok == ok &&
               tc_rsp_corrected == cor && tc_rsp_due == due);
    n_corr += $countones(tc_rsp_corrected);
    if (cor[w]) n_repl++;
  endtask

  task automatic tc_inject(int s, int w, int b);
    @(negedge clk);
    tc_inj_en = 1; tc_inj_set = 3'(s); tc_inj_way = 2'(w); tc_inj_bit = 4'(b);
    @(negedge clk);
    tc_inj_en = 0;
  endtask

  // ---------------- interleaved line store ----------------
  task automatic ic_write(int a, logic [7:0] d);
    @(negedge clk);
    ic_wr_en = 1; ic_wr_addr = 3'(a); ic_wr_data = d;
    @(negedge clk);
    ic_wr_en = 0;
  endtask

  task automatic ic_read(int a, logic ok, logic [7:0] d);
    @(negedge clk);
    ic_rd_en = 1; ic_rd_addr = 3'(a);
    @(negedge clk);
    ic_rd_en = 0;
    check_that($sformatf("line read %0d: v%b ok%b %0d exp ok%b %0d", a, ic_rd_valid, ic_rd_ok,
                     ic_rd_data, ok, d),
           ic_rd_valid && ic_rd_ok == ok && ic_rd_data == d);
  endtask

  // ---------------- Bloom filter ----------------
  function automatic logic [7:0] bf_mask(logic [7:0] k);
    logic [7:0] m;
    logic [7:0] c [4];
    c = '{8'hB1, 8'h77, 8'h3D, 8'h2F};
    m = 0;
    for (int i = 0; i < 4; i++) begin
      logic [15:0] p;
      p = 16'(k) * 16'(c[i]);
      m[p[7:5]] = 1'b1;
    end
    return m;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tc_cmd_valid = 0; tc_cmd_op = OP_LOOKUP; tc_cmd_set = 0; tc_cmd_way = 0; tc_cmd_tag = 0;
    tc_inj_en = 0; tc_inj_set = 0; tc_inj_way = 0; tc_inj_bit = 0;
    ic_fault_map = 0; ic_wr_en = 0; ic_rd_en = 0; ic_wr_addr = 0; ic_rd_addr = 0; ic_wr_data = 0;
    bf_clear = 0; bf_insert = 0; bf_query = 0; bf_ins_key = 0; bf_q_key = 0;
    #12 rst_n = 1;

    // ---- tag directory ----
    for (int s = 0; s < 8; s++)
      for (int w = 0; w < 4; w++) tc_write(s, w, EXAMPLE[s][w]);
    // Clean lookups.
    tc_lookup(3, 8'h0C, 1, 2, 0, 0, 0, 4'b0000, 4'b0000);
    tc_lookup(0, 8'h08, 1, 0, 1, 0, 0, 4'b0000, 4'b0000);   // 08 twice in set 0
    tc_lookup(4, 8'h09, 0, 0, 0, 0, 0, 4'b0000, 4'b0000);
    // Set 1 way 0 = 09, copy in set 0 way 1. Upset 09 -> 08: pseudo miss,
    // repaired; the second lookup sees the repaired word.
    tc_inject(1, 0, 0);
    tc_lookup(1, 8'h09, 1, 0, 0, 0, 1, 4'b0001, 4'b0000);
    tc_lookup(1, 8'h09, 1, 0, 0, 0, 0, 4'b0000, 4'b0000);
    n_wb++;
    // Set 2 way 2 = 08, copy in set 3 way 1. Upset 08 -> 0A: lookup of 0A
    // matches ways 0 and 2 as stored (multi-hit, pseudo hit in way 2).
    tc_inject(2, 2, 1);
    tc_lookup(2, 8'h0A, 1, 0, 1, 1, 0, 4'b0100, 4'b0000);
    tc_lookup(2, 8'h08, 1, 2, 0, 0, 0, 4'b0000, 4'b0000);
    // Set 6 way 0 = 0E has no copy in sets 5 or 7. Upset 0E -> 0F: detected,
    // not correctable; the way is left out of the hit.
    tc_inject(6, 0, 0);
    tc_lookup(6, 8'h0F, 1, 2, 1, 0, 0, 4'b0000, 4'b0001);
    // Set 3 way 1 = 08, copy in set 2 way 2. Upset 08 -> 18 before the line
    // is evicted: the victim's tag is read back corrected, so a dirty line
    // would go back to the right address (no replacement error).
    tc_inject(3, 1, 4);
    tc_read(3, 1, 8'h08, 1, 4'b0010, 4'b0000);
    tc_read(3, 1, 8'h08, 1, 4'b0000, 4'b0000);
    // Rewriting the line clears the error.
    tc_write(6, 0, 8'h0E);
    tc_lookup(6, 8'h0E, 1, 0, 0, 0, 0, 4'b0000, 4'b0000);

    // ---- interleaved line store ----
    begin
      static logic [7:0] lines [8] = '{1, 2, 5, 6, 3, 4, 7, 8};  // set = A0
      ic_fault_map = 8'b0000_0000;
      for (int a = 0; a < 8; a++) ic_write(a, lines[a]);
      for (int a = 0; a < 8; a++) ic_read(a, 1, lines[a]);
      check_that("set 0 holds 1,5,3,7",
             dut.u_lines.bank_mem[0][0] == 1 && dut.u_lines.bank_mem[0][1] == 5 &&
             dut.u_lines.bank_mem[0][2] == 3 && dut.u_lines.bank_mem[0][3] == 7);
      // Line 100 fails: rewrite through the remapped addresses.
      ic_fault_map = 8'b0001_0000;
      for (int a = 0; a < 7; a++) ic_write(a, lines[a] + 8'd16);
      for (int a = 0; a < 7; a++) begin
        ic_read(a, 1, lines[a] + 8'd16);
        if (a >= 4) n_bypass++;
      end
      ic_read(7, 0, 8'h00);
      n_faulty++;
      // Logical 100 now lives in physical 101: set 1, row 2.
      check_that("logical 100 in physical 101", dut.u_lines.bank_mem[1][2] == lines[4] + 8'd16);
    end

    // ---- Bloom filter ----
    begin
      logic [7:0] model;
      logic       inserted [256];
      foreach (inserted[k]) inserted[k] = 0;
      model = 0;
      for (int i = 0; i < 3; i++) begin
        logic [7:0] k;
        k = 8'(8'h21 * (i + 1));
        @(negedge clk); bf_insert = 1; bf_ins_key = k;
        @(negedge clk); bf_insert = 0;
        model |= bf_mask(k);
        inserted[k] = 1;
      end
      check_that("filter vector", bf_vector == model);
      for (int k = 0; k < 256; k++) begin
        logic exp_m;
        exp_m = (model & bf_mask(8'(k))) == bf_mask(8'(k));
        @(negedge clk); bf_query = 1; bf_q_key = 8'(k);
        @(negedge clk); bf_query = 0;
        checks++;
        if (!bf_q_valid || bf_q_member != exp_m || (inserted[k] && !bf_q_member)) begin
          failures++;
          $display("FAIL bloom query %h: %b exp %b", k, bf_q_member, exp_m);
        end
        if (bf_q_member && inserted[k]) n_member++;
        if (bf_q_member && !inserted[k]) n_fp++;
      end
      @(negedge clk); bf_clear = 1;
      @(negedge clk); bf_clear = 0;
      check_that("filter cleared", bf_vector == 0);
      n_clear++;
    end

    $display("victim tags corrected %0d", n_repl);
    $display("re-encodes %0d, corrected %0d, uncorrectable %0d, pseudo hits %0d, pseudo misses %0d, multi-hits %0d, write-backs %0d",
             n_reencode, n_corr, n_due, n_ph, n_pm, n_mh, n_wb);
    $display("bypassed line reads %0d, faulty line reads %0d, members %0d, false positives %0d, clears %0d",
             n_bypass, n_faulty, n_member, n_fp, n_clear);
    if (n_repl == 0 || n_reencode == 0 || n_corr == 0 || n_due == 0 || n_ph == 0 || n_pm == 0 || n_mh == 0 ||
        n_wb == 0 || n_bypass == 0 || n_faulty == 0 || n_member == 0 || n_fp == 0 || n_clear == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
