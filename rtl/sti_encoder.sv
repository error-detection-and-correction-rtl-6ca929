// sti_encoder: builds the stored words (check bit + STI bits + tag) for the
// four ways of one cache set.
//
// For each way, the tag is searched for in the set above (inp2) and the set
// below (inp3). If an identical tag is found, the STI bits record where:
// valid=1, set_loc says which neighbour, way says which way of it. The set
// above is searched first, and within a set the lowest-numbered way wins; a
// neighbour that does not exist (the first or last set) is disabled by
// inp2_en/inp3_en. The check bit is even parity over the tag.
//
// Ports follow the black box of the encoder diagram: three inputs (this set,
// upper set, lower set) and one output. The search order, the parity code and
// the enables for missing neighbours are this design's choices.
//
// Timing: purely combinational.
module sti_encoder
  import sti_pkg::*;
(
  input  tag_row_t inp1,     // tags of the set being encoded
  input  tag_row_t inp2,     // tags of the upper adjacent set (index - 1)
  input  tag_row_t inp3,     // tags of the lower adjacent set (index + 1)
  input  logic     inp2_en,  // the upper set exists
  input  logic     inp3_en,  // the lower set exists
  output enc_row_t out1      // encoded words, one per way
);

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      out1[w].tag         = inp1[w];
      out1[w].parity      = tag_parity(inp1[w]);
      out1[w].sti.valid   = 1'b0;
      out1[w].sti.set_loc = SET_UPPER;
      out1[w].sti.way     = '0;
      // Lower set, highest way first, so that the upper set and the lowest
      // way, visited last, take priority.
      for (int v = WAYS - 1; v >= 0; v--) begin
        if (inp3_en && inp3[v] == inp1[w]) begin
          out1[w].sti.valid   = 1'b1;
          out1[w].sti.set_loc = SET_LOWER;
          out1[w].sti.way     = way_t'(v);
        end
      end
      for (int v = WAYS - 1; v >= 0; v--) begin
        if (inp2_en && inp2[v] == inp1[w]) begin
          out1[w].sti.valid   = 1'b1;
          out1[w].sti.set_loc = SET_UPPER;
          out1[w].sti.way     = way_t'(v);
        end
      end
    end
  end

endmodule
