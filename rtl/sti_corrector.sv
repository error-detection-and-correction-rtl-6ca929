// sti_corrector: checks the four stored tag words of a set and repairs a
// corrupted tag from its copy in an adjacent set.
//
// A word whose check bit disagrees with its tag is in error. If its STI bits
// are valid, the way they point to in the upper (inp2) or lower (inp3) set is
// read; when that copy passes its own check, it replaces the corrupted tag
// (corrected). Otherwise the error is detected but cannot be corrected (due).
// Words without error pass through unchanged. The repaired word, with a
// fresh check bit, is also given out so that it can be written back.
//
// Ports follow the black box of the corrector diagram: three inputs (this
// set, upper set, lower set) and the output "resultant" (the tags to use).
// The error flags, the check of the source copy and the repaired word output
// are this design's additions.
//
// Timing: purely combinational.
module sti_corrector
  import sti_pkg::*;
(
  input  enc_row_t         inp1,       // stored words of the set being read
  input  enc_row_t         inp2,       // stored words of the upper set
  input  enc_row_t         inp3,       // stored words of the lower set
  input  logic             inp2_en,    // the upper set exists
  input  logic             inp3_en,    // the lower set exists
  output tag_row_t         resultant,  // corrected tags
  output enc_row_t         repaired,   // corrected words with fresh check bits
  output logic [WAYS-1:0]  detected,   // check bit mismatch in this way
  output logic [WAYS-1:0]  corrected,  // mismatch repaired from the copy
  output logic [WAYS-1:0]  due         // mismatch that could not be repaired
);

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      enc_t src;
      logic src_ok;
      src    = (inp1[w].sti.set_loc == SET_UPPER) ? inp2[inp1[w].sti.way]
                                                   : inp3[inp1[w].sti.way];
      src_ok = inp1[w].sti.valid && !parity_error(src.parity, src.tag) &&
               ((inp1[w].sti.set_loc == SET_UPPER) ? inp2_en : inp3_en);

      detected[w]  = parity_error(inp1[w].parity, inp1[w].tag);
      corrected[w] = detected[w] && src_ok;
      due[w]       = detected[w] && !src_ok;

      repaired[w]  = inp1[w];
      if (corrected[w]) begin
        repaired[w].tag    = src.tag;
        repaired[w].parity = tag_parity(src.tag);
      end
      resultant[w] = repaired[w].tag;
    end
  end

endmodule
