// tag_compare_tb: drives the hit logic with raw and corrected tag rows and
// checks hit, hit way, multi-hit, pseudo hit and pseudo miss against values
// worked out here, on hand cases taken from the tag-error examples and on
// random rows.
module tag_compare_tb;
  import sti_pkg::*;

  int checks = 0, failures = 0;
  int n_ph = 0, n_pm = 0, n_mh = 0;

  tag_t            lookup_tag;
  tag_row_t        raw_tags, cor_tags;
  logic [WAYS-1:0] due;
  logic            hit, multi_hit, pseudo_hit, pseudo_miss;
  way_t            hit_way;

  tag_compare dut (.*);

  task automatic check_all();
    logic e_hit, e_mh, e_ph, e_pm;
    way_t e_way;
    int   nraw;
    #1;
    e_hit = 0; e_way = 0; nraw = 0; e_ph = 0;
    for (int w = 0; w < 4; w++) begin
      if (!e_hit && !due[w] && cor_tags[w] == lookup_tag) begin e_hit = 1; e_way = 2'(w); end
      if (raw_tags[w] == lookup_tag) nraw++;
      if (raw_tags[w] == lookup_tag && cor_tags[w] != lookup_tag && !due[w]) e_ph = 1;
    end
    e_mh = nraw > 1;
    e_pm = (nraw == 0) && e_hit;
    checks++;
    if ({hit, hit_way, multi_hit, pseudo_hit, pseudo_miss} !==
        {e_hit, (e_hit ? e_way : 2'd0), e_mh, e_ph, e_pm}) begin
      failures++;
      if (failures < 20)
        $display("FAIL tag %h raw %h cor %h due %b: got %b%0d%b%b%b exp %b%0d%b%b%b",
                 lookup_tag, raw_tags, cor_tags, due, hit, hit_way, multi_hit,
                 pseudo_hit, pseudo_miss, e_hit, e_way, e_mh, e_ph, e_pm);
    end
    n_ph += int'(e_ph); n_pm += int'(e_pm); n_mh += int'(e_mh);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Pseudo hit: an upset turned the stored tag 08 into 09, the tag looked up.
    lookup_tag = 8'h09; raw_tags = {8'h01, 8'h02, 8'h09, 8'h03};
    cor_tags = {8'h01, 8'h02, 8'h08, 8'h03}; due = '0;
    check_all();
    checks++; if (!(pseudo_hit && !hit)) begin failures++; $display("FAIL pseudo hit case"); end
    // Pseudo miss: the stored tag lost a bit, the repaired tag hits in way 3.
    lookup_tag = 8'h0A; raw_tags = {8'h0B, 8'h02, 8'h07, 8'h03};
    cor_tags = {8'h0A, 8'h02, 8'h07, 8'h03};
    check_all();
    checks++; if (!(pseudo_miss && hit && hit_way == 2'd3)) begin failures++; $display("FAIL pseudo miss case"); end
    // Random rows over a small alphabet.
    for (int i = 0; i < 5000; i++) begin
      lookup_tag = 8'($urandom_range(0, 5));
      for (int w = 0; w < 4; w++) begin
        cor_tags[w] = 8'($urandom_range(0, 5));
        raw_tags[w] = ($urandom_range(0, 3) == 0) ? 8'($urandom_range(0, 5)) : cor_tags[w];
      end
      due = 4'($urandom) & 4'($urandom);
      check_all();
    end
    if (n_ph == 0 || n_pm == 0 || n_mh == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("pseudo hits %0d, pseudo misses %0d, multi-hits %0d", n_ph, n_pm, n_mh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
