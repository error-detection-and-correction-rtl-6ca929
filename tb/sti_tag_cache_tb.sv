// sti_tag_cache_tb: end-to-end test of the STI-protected tag directory.
//
// The directory is filled with the 8-set x 4-way example tag table, then
// exercised with lookups, soft-error injections (single stored bits flipped)
// and further random writes. A model kept here mirrors the stored words
// (tag, check bit, STI pointer), re-encodes the neighbours after each write,
// and works out the expected response of every lookup: hit and way, multi-hit,
// pseudo hit/miss, which ways were repaired and which could not be. It also
// checks the stored array after each operation, the write-back of repaired
// tags, the busy time of a write (3 cycles at the first/last set, 4
// otherwise) and the one-cycle lookup latency. Reads of a single way's tag,
// as used for the write-back address of a victim, are checked the same way.
// Each mechanism must occur.
module sti_tag_cache_tb;
  import sti_pkg::*;

  int checks = 0, failures = 0;
  int n_repl = 0, n_corr = 0, n_due = 0, n_ph = 0, n_pm = 0, n_mh = 0, n_hit = 0, n_scrub = 0;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready;
  op_e  cmd_op;
  tag_t rsp_tag;
  logic rsp_tag_ok;
  set_idx_t cmd_set, inj_set;
  way_t cmd_way, inj_way, rsp_way;
  tag_t cmd_tag;
  logic rsp_valid, rsp_hit, rsp_multi_hit, rsp_pseudo_hit, rsp_pseudo_miss;
  logic [3:0] rsp_corrected, rsp_due;
  logic inj_en;
  logic [3:0] inj_bit;

  sti_tag_cache dut (.*);

  always #5 clk = ~clk;

  localparam logic [7:0] EXAMPLE [8][4] = '{
    '{8'h08, 8'h09, 8'h0A, 8'h08}, '{8'h09, 8'h0B, 8'h0D, 8'h0E},
    '{8'h0A, 8'h09, 8'h08, 8'h0B}, '{8'h0B, 8'h08, 8'h0C, 8'h0D},
    '{8'h0C, 8'h0F, 8'h0E, 8'h0B}, '{8'h0D, 8'h0A, 8'h0B, 8'h09},
    '{8'h0E, 8'h0C, 8'h0F, 8'h0F}, '{8'h0F, 8'h0D, 8'h0D, 8'h0C}};

  // Model of the stored words: [set][way] = {parity, valid, loc, way[1:0], tag}.
  logic [12:0] m [8][4];

  function automatic logic [3:0] ref_sti(int s, int w);
    for (int v = 0; v < 4; v++)
      if (s > 0 && m[s-1][v][7:0] == m[s][w][7:0]) return {1'b1, 1'b0, 2'(v)};
    for (int v = 0; v < 4; v++)
      if (s < 7 && m[s+1][v][7:0] == m[s][w][7:0]) return {1'b1, 1'b1, 2'(v)};
    return 4'b0000;
  endfunction

  task automatic model_encode(int s);
    if (s < 0 || s > 7) return;
    for (int w = 0; w < 4; w++) m[s][w][11:8] = ref_sti(s, w);
  endtask

  task automatic check_array(string when);
    for (int s = 0; s < 8; s++)
      for (int w = 0; w < 4; w++) begin
        checks++;
        if (dut.u_array.mem[s][w] !== m[s][w]) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s: word [%0d][%0d] = %b exp %b", when, s, w, dut.u_array.mem[s][w], m[s][w]);
        end
      end
  endtask

  task automatic do_write(int s, int w, logic [7:0] t);
    int busy;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = OP_WRITE; cmd_set = 3'(s); cmd_way = 2'(w); cmd_tag = t;
    @(negedge clk);
    cmd_valid = 0;
    busy = 1;
    while (!cmd_ready) begin busy++; @(negedge clk); end
    checks++;
    if (busy != ((s == 0 || s == 7) ? 3 : 4)) begin
      failures++; $display("FAIL write to set %0d busy %0d cycles", s, busy);
    end
    m[s][w] = {^t, 4'b0000, t};
    model_encode(s - 1); model_encode(s); model_encode(s + 1);
    check_array("after write");
  endtask

  task automatic do_lookup(int s, logic [7:0] t, bit rd = 0, int rw = 0);
    logic [7:0] cor [4];
    logic [3:0] e_cor, e_due;
    logic e_hit, e_mh, e_ph, e_pm;
    int e_way, nraw;
    // Expected response.
    e_cor = 0; e_due = 0; e_hit = 0; e_way = 0; nraw = 0; e_ph = 0;
    for (int w = 0; w < 4; w++) begin
      logic [12:0] wd, src;
      logic det, src_ok;
      int ns;
      wd  = m[s][w];
      det = wd[12] != ^wd[7:0];
      ns  = wd[10] ? s + 1 : s - 1;
      src_ok = wd[11] && ns >= 0 && ns <= 7;
      if (src_ok) begin
        src = m[ns][wd[9:8]];
        src_ok = src[12] == ^src[7:0];
      end
      cor[w] = wd[7:0];
      if (det && src_ok) begin e_cor[w] = 1; cor[w] = src[7:0]; end
      if (det && !src_ok) e_due[w] = 1;
      if (!e_hit && !e_due[w] && cor[w] == t) begin e_hit = 1; e_way = w; end
      if (wd[7:0] == t) nraw++;
      if (wd[7:0] == t && cor[w] != t && !e_due[w]) e_ph = 1;
    end
    e_mh = nraw > 1;
    e_pm = nraw == 0 && e_hit;
    if (rd) begin e_hit = 0; e_mh = 0; e_ph = 0; e_pm = 0; e_way = rw; end
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_op = rd ? OP_READ : OP_LOOKUP; cmd_way = 2'(rw); cmd_set = 3'(s); cmd_tag = t;
    @(negedge clk);
    cmd_valid = 0;
    checks++;
    if (!rsp_valid || rsp_hit !== e_hit || (e_hit && rsp_way !== 2'(e_way)) ||
        rsp_multi_hit !== e_mh || rsp_pseudo_hit !== e_ph || rsp_pseudo_miss !== e_pm ||
        rsp_corrected !== e_cor || rsp_due !== e_due ||
        (rd && (rsp_way !== 2'(rw) || rsp_tag !== cor[rw] || rsp_tag_ok !== !e_due[rw])) ||
        (!rd && e_hit && (rsp_tag !== cor[e_way] || !rsp_tag_ok)) ||
        (!rd && !e_hit && rsp_tag_ok)) begin
      failures++;
      if (failures < 20)
        $display("FAIL lookup set %0d tag %h: v%b hit%b way%0d mh%b ph%b pm%b cor%b due%b; exp hit%b way%0d mh%b ph%b pm%b cor%b due%b",
                 s, t, rsp_valid, rsp_hit, rsp_way, rsp_multi_hit, rsp_pseudo_hit,
                 rsp_pseudo_miss, rsp_corrected, rsp_due, e_hit, e_way, e_mh, e_ph,
                 e_pm, e_cor, e_due);
    end
    // Repaired words are written back.
    for (int w = 0; w < 4; w++)
      if (e_cor[w]) m[s][w] = {^cor[w], m[s][w][11:8], cor[w]};
    if (e_cor != 0) n_scrub++;
    if (rd && e_cor[rw]) n_repl++;
    n_corr += $countones(e_cor); n_due += $countones(e_due);
    n_ph += int'(e_ph); n_pm += int'(e_pm); n_mh += int'(e_mh); n_hit += int'(e_hit);
    check_array("after lookup");
    @(negedge clk);
    checks++;
    if (rsp_valid) begin failures++; $display("FAIL response longer than one cycle"); end
  endtask

  task automatic inject(int s, int w, int b);
    @(negedge clk);
    inj_en = 1; inj_set = 3'(s); inj_way = 2'(w); inj_bit = 4'(b);
    @(negedge clk);
    inj_en = 0;
    m[s][w][b] ^= 1'b1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_valid = 0; cmd_op = OP_LOOKUP; cmd_set = 0; cmd_way = 0; cmd_tag = 0;
    inj_en = 0; inj_set = 0; inj_way = 0; inj_bit = 0;
    for (int s = 0; s < 8; s++) for (int w = 0; w < 4; w++) m[s][w] = '0;
    #12 rst_n = 1;
    check_array("after reset");
    // Fill with the example table.
    for (int s = 0; s < 8; s++)
      for (int w = 0; w < 4; w++) do_write(s, w, EXAMPLE[s][w]);
    // Clean lookups of every stored tag and a few absent ones.
    for (int s = 0; s < 8; s++) begin
      for (int w = 0; w < 4; w++) do_lookup(s, EXAMPLE[s][w]);
      do_lookup(s, 8'h3C);
    end
    // Directed: set 1 way 0 holds 09, copied in set 0 way 1. An upset turns it
    // into 08 (pseudo miss for 09), a lookup repairs it.
    inject(1, 0, 0);
    do_lookup(1, 8'h09);
    do_lookup(1, 8'h09);
    // Upset set 6 way 0 (0E -> 0A): lookup of 0A would be a pseudo hit.
    inject(6, 0, 2);
    do_lookup(6, 8'h0A);
    // Upset both copies: the error cannot be repaired.
    inject(1, 0, 3);
    inject(0, 1, 3);
    do_lookup(1, 8'h09);
    // Random mix of writes, upsets and lookups.
    for (int i = 0; i < 1500; i++) begin
      int op;
      op = $urandom_range(0, 9);
      if (op == 0)
        do_write($urandom_range(0, 7), $urandom_range(0, 3), 8'($urandom_range(8, 15)));
      else if (op <= 2)
        inject($urandom_range(0, 7), $urandom_range(0, 3), $urandom_range(0, 12));
      else if (op <= 4)
        do_lookup($urandom_range(0, 7), 0, 1, $urandom_range(0, 3));
      else
        do_lookup($urandom_range(0, 7), 8'($urandom_range(8, 15)));
    end
    $display("victim tags read corrected %0d", n_repl);
    $display("hits %0d, corrected %0d, uncorrectable %0d, pseudo hits %0d, pseudo misses %0d, multi-hits %0d, write-backs %0d",
             n_hit, n_corr, n_due, n_ph, n_pm, n_mh, n_scrub);
    if (n_corr == 0 || n_due == 0 || n_ph == 0 || n_pm == 0 || n_mh == 0 || n_scrub == 0 || n_repl == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
