// tag_array: storage of the encoded tag words, SETS sets x WAYS ways.
//
// One read index gives three rows at once: the set itself (rd_row), the set
// above (rd_upper, index-1) and the set below (rd_lower, index+1), with flags
// telling whether those neighbours exist. Reads are combinational. A whole
// row is written on the rising clock edge when wr_en is set. A separate port
// flips one stored bit (inj_en), which models a soft error (single-event
// upset) for test; a write to the same row in the same cycle takes priority.
// Reset clears every word to tag 0, valid check bit, no STI.
//
// The 8-set, 4-way geometry and the 13-bit word follow the source; the
// three-row read, the reset value and the upset port are this design's.
module tag_array
  import sti_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  set_idx_t               rd_idx,
  output enc_row_t               rd_row,
  output enc_row_t               rd_upper,
  output enc_row_t               rd_lower,
  output logic                   upper_en,
  output logic                   lower_en,
  input  logic                   wr_en,
  input  set_idx_t               wr_idx,
  input  enc_row_t               wr_row,
  input  logic                   inj_en,
  input  set_idx_t               inj_idx,
  input  way_t                   inj_way,
  input  logic [$clog2(ENC_W)-1:0] inj_bit
);

  enc_row_t mem [SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) mem[s] <= '0;
    end else begin
      if (inj_en && 32'(inj_bit) < ENC_W)
        mem[inj_idx][inj_way][inj_bit] <= ~mem[inj_idx][inj_way][inj_bit];
      if (wr_en)
        mem[wr_idx] <= wr_row;
    end
  end

  assign upper_en = rd_idx != '0;
  assign lower_en = rd_idx != set_idx_t'(SETS - 1);
  assign rd_row   = mem[rd_idx];
  assign rd_upper = upper_en ? mem[rd_idx - 1'b1] : '0;
  assign rd_lower = lower_en ? mem[rd_idx + 1'b1] : '0;

endmodule
