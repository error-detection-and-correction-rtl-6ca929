// sti_pkg: types and constants shared by the same-tag-information (STI) tag
// protection blocks.
//
// A tag directory of a 4-way set-associative cache with 8 sets and 8-bit tags
// stores, next to every tag, an even-parity check bit and four STI bits:
//   valid     - an identical tag exists in an adjacent set,
//   set_loc   - which adjacent set holds it (0: the set above, index-1;
//               1: the set below, index+1),
//   way       - the way of that set that holds it (2 bits for 4 ways).
// The encoded word is {parity, valid, set_loc, way, tag} = 13 bits, with the
// 8-bit tag in the low bits. The 4-way, 8-set, 8-bit geometry and the three
// STI fields follow the source description; the parity bit in the word's
// top bit and the set_loc polarity are this design's choices. WAYS must be
// at least 2 (a direct-mapped cache would need no way field at all).
package sti_pkg;

  localparam int unsigned WAYS   = 4;
  localparam int unsigned SETS   = 8;
  localparam int unsigned TAG_W  = 8;
  localparam int unsigned WAY_W  = $clog2(WAYS);
  localparam int unsigned SET_W  = $clog2(SETS);

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [WAY_W-1:0] way_t;
  typedef logic [SET_W-1:0] set_idx_t;

  // Location of the same tag in an adjacent set.
  typedef enum logic {
    SET_UPPER = 1'b0,   // set index - 1
    SET_LOWER = 1'b1    // set index + 1
  } set_loc_e;

  typedef struct packed {
    logic     valid;
    set_loc_e set_loc;
    way_t     way;
  } sti_t;

  // One stored tag entry: check bit, STI bits and the tag.
  typedef struct packed {
    logic parity;
    sti_t sti;
    tag_t tag;
  } enc_t;

  localparam int unsigned ENC_W = $bits(enc_t);

  // Commands of the tag directory.
  typedef enum logic [1:0] {
    OP_LOOKUP = 2'd0,   // compare a tag with a set
    OP_WRITE  = 2'd1,   // store a tag, then refresh the STI bits around it
    OP_READ   = 2'd2    // read the (corrected) tag of one way, e.g. to form
                        // the write-back address of a victim line
  } op_e;

  typedef tag_t [WAYS-1:0] tag_row_t;
  typedef enc_t [WAYS-1:0] enc_row_t;

  // Even parity over the tag bits: the check bit makes the number of ones
  // in {parity, tag} even.
  function automatic logic tag_parity(tag_t t);
    return ^t;
  endfunction

  // True when the stored check bit disagrees with the stored tag.
  function automatic logic parity_error(logic parity, tag_t t);
    return parity != tag_parity(t);
  endfunction

endpackage
