// sti_encoder_tb: checks the STI encoder against a reference search written
// here, on the 8-set x 4-way tag table used as the example input of the
// design and on random rows (with many repeated tags). For every way it
// checks the tag, the check bit and the valid/set/way STI fields.
module sti_encoder_tb;
  import sti_pkg::*;

  int checks = 0, failures = 0;

  tag_row_t inp1, inp2, inp3;
  logic     inp2_en, inp3_en;
  enc_row_t out1;

  sti_encoder dut (.*);

  // Example input: 8 sets x 4 ways of 8-bit tags (set index = row).
  localparam logic [7:0] EXAMPLE [8][4] = '{
    '{8'h08, 8'h09, 8'h0A, 8'h08}, '{8'h09, 8'h0B, 8'h0D, 8'h0E},
    '{8'h0A, 8'h09, 8'h08, 8'h0B}, '{8'h0B, 8'h08, 8'h0C, 8'h0D},
    '{8'h0C, 8'h0F, 8'h0E, 8'h0B}, '{8'h0D, 8'h0A, 8'h0B, 8'h09},
    '{8'h0E, 8'h0C, 8'h0F, 8'h0F}, '{8'h0F, 8'h0D, 8'h0D, 8'h0C}};

  // Reference: first match scanning upper set way 0..3, then lower set.
  function automatic enc_t ref_enc(tag_t t, tag_row_t up, tag_row_t lo,
                                   logic up_en, logic lo_en);
    enc_t e;
    e = '0;
    e.tag    = t;
    e.parity = ^t;
    for (int v = 0; v < 4; v++)
      if (!e.sti.valid && up_en && up[v] == t) e.sti = '{1'b1, SET_UPPER, 2'(v)};
    for (int v = 0; v < 4; v++)
      if (!e.sti.valid && lo_en && lo[v] == t) e.sti = '{1'b1, SET_LOWER, 2'(v)};
    return e;
  endfunction

  int n_valid = 0;

  task automatic check_row();
    #1;
    for (int w = 0; w < WAYS; w++) begin
      enc_t exp_e;
      exp_e = ref_enc(inp1[w], inp2, inp3, inp2_en, inp3_en);
      checks++;
      if (out1[w] !== exp_e) begin
        failures++;
        $display("FAIL way %0d tag %h: got %b exp %b", w, inp1[w], out1[w], exp_e);
      end
      if (exp_e.sti.valid) n_valid++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example table, every set.
    for (int s = 0; s < 8; s++) begin
      for (int w = 0; w < 4; w++) begin
        inp1[w] = EXAMPLE[s][w];
        inp2[w] = (s > 0) ? EXAMPLE[s-1][w] : 8'h00;
        inp3[w] = (s < 7) ? EXAMPLE[s+1][w] : 8'h00;
      end
      inp2_en = s > 0;
      inp3_en = s < 7;
      check_row();
    end
    // Hand case: tag 0x0B of set 1 way 1 is found in the set below, way 3.
    inp1 = {8'h0E, 8'h0D, 8'h0B, 8'h09};
    inp2 = {8'h08, 8'h0A, 8'h09, 8'h08};
    inp3 = {8'h0B, 8'h08, 8'h09, 8'h0A};
    inp2_en = 1; inp3_en = 1;
    #1;
    checks++;
    if (out1[1].sti !== 4'b1111) begin
      failures++; $display("FAIL hand case way1 sti %b", out1[1].sti);
    end
    checks++;
    if (out1[0].sti !== 4'b1001) begin   // 0x09 in upper set, way 1
      failures++; $display("FAIL hand case way0 sti %b", out1[0].sti);
    end
    // Random rows from a small tag alphabet so that matches are common.
    for (int i = 0; i < 2000; i++) begin
      for (int w = 0; w < 4; w++) begin
        inp1[w] = 8'($urandom_range(0, 7));
        inp2[w] = 8'($urandom_range(0, 7));
        inp3[w] = 8'($urandom_range(0, 7));
      end
      inp2_en = 1'($urandom);
      inp3_en = 1'($urandom);
      check_row();
    end
    if (n_valid == 0) begin
      failures++; $display("FAIL no STI pointer was ever produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
