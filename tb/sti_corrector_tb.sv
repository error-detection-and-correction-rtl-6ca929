// sti_corrector_tb: builds correctly encoded rows (tags, check bits and STI
// pointers worked out here), flips stored bits as a soft error would, and
// checks that the corrector repairs a corrupted tag from the copy in the
// adjacent set, flags errors it cannot repair, and leaves clean words alone.
module sti_corrector_tb;
  import sti_pkg::*;

  int checks = 0, failures = 0;
  int n_corr = 0, n_due = 0;

  enc_row_t inp1, inp2, inp3;
  logic     inp2_en, inp3_en;
  tag_row_t resultant;
  enc_row_t repaired;
  logic [WAYS-1:0] detected, corrected, due;

  sti_corrector dut (.*);

  function automatic enc_t mk(tag_t t, logic v, logic loc, int way);
    enc_t e;
    e.tag = t; e.parity = ^t;
    e.sti.valid = v; e.sti.set_loc = set_loc_e'(loc); e.sti.way = 2'(way);
    return e;
  endfunction

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b exp %b", what, got, exp);
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
    for (int i = 0; i < 3000; i++) begin
      tag_t good [4];
      int   victim, bitpos, src_way;
      logic loc, has_ptr, src_bad, nb_en;
      // Random neighbour rows with good check bits and no pointers.
      for (int w = 0; w < 4; w++) begin
        inp2[w] = mk(8'($urandom), 0, 0, 0);
        inp3[w] = mk(8'($urandom), 0, 0, 0);
        good[w] = 8'($urandom);
        inp1[w] = mk(good[w], 0, 0, 0);
      end
      inp2_en = 1; inp3_en = 1;
      victim  = $urandom_range(0, 3);
      has_ptr = ($urandom_range(0, 3) != 0);
      loc     = 1'($urandom);
      src_way = $urandom_range(0, 3);
      src_bad = ($urandom_range(0, 7) == 0);
      nb_en   = ($urandom_range(0, 7) != 0);
      if (has_ptr) begin
        // Place a copy of the victim's tag where its pointer says.
        if (loc) begin inp3[src_way] = mk(good[victim], 0, 0, 0); inp3_en = nb_en; end
        else     begin inp2[src_way] = mk(good[victim], 0, 0, 0); inp2_en = nb_en; end
        inp1[victim] = mk(good[victim], 1, loc, src_way);
        if (src_bad) begin
          if (loc) inp3[src_way].tag[0] ^= 1'b1;
          else     inp2[src_way].tag[0] ^= 1'b1;
        end
      end
      // Upset: one of the 8 tag bits or the check bit (bit 12).
      bitpos = $urandom_range(0, 8);
      if (bitpos == 8) inp1[victim].parity ^= 1'b1;
      else             inp1[victim].tag[bitpos] ^= 1'b1;
      #1;
      for (int w = 0; w < 4; w++) begin
        logic exp_det, exp_cor, exp_due;
        tag_t exp_tag;
        exp_det = (w == victim);
        exp_cor = exp_det && has_ptr && !src_bad && nb_en;
        exp_due = exp_det && !exp_cor;
        exp_tag = exp_cor ? good[w] : inp1[w].tag;
        if (!exp_det) exp_tag = good[w];
        expect_bit($sformatf("detected[%0d]", w), detected[w], exp_det);
        expect_bit($sformatf("corrected[%0d]", w), corrected[w], exp_cor);
        expect_bit($sformatf("due[%0d]", w), due[w], exp_due);
        checks++;
        if (resultant[w] !== exp_tag) begin
          failures++;
          if (failures < 20) $display("FAIL resultant[%0d] %h exp %h", w, resultant[w], exp_tag);
        end
        // A repaired word passes its check and keeps its STI bits.
        checks++;
        if (repaired[w].tag !== exp_tag || repaired[w].sti !== inp1[w].sti ||
            (!exp_due && (repaired[w].parity !== ^exp_tag))) begin
          failures++;
          if (failures < 20) $display("FAIL repaired[%0d] %b", w, repaired[w]);
        end
        n_corr += int'(exp_cor);
        n_due  += int'(exp_due);
      end
    end
    if (n_corr == 0 || n_due == 0) begin
      failures++; $display("FAIL coverage corr=%0d due=%0d", n_corr, n_due);
    end
    $display("corrected %0d, uncorrectable %0d", n_corr, n_due);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
