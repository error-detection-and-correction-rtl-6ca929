// bloom_filter: set-membership filter of N bits with M hash transforms.
//
// Inserting a key sets the N-bit vector's bit at each of the M hash values of
// the key. A query reports "member" when all M bits of the key are set. A key
// that was inserted is therefore always reported as a member; a key that was
// not may also be reported (a false positive), never the reverse.
//
// Hash transform i is multiplicative: h_i(key) = the top log2(N) bits of
// (key * C_i) mod 2**KEY_W, with a fixed odd constant C_i per transform.
// N = 8 and M = 4 are the source's example; the key width, the hash
// functions and the command interface are this design's choices.
//
// Interface: clear, insert and query are sampled on the rising clock edge
// (clear wins over insert). The query answer (q_valid, q_member) appears one
// cycle later and sees every insert accepted before the query's cycle.
// The vector is cleared by reset.
module bloom_filter #(
  parameter int unsigned N     = 8,
  parameter int unsigned M     = 4,
  parameter int unsigned KEY_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             insert,
  input  logic [KEY_W-1:0] ins_key,
  input  logic             query,
  input  logic [KEY_W-1:0] q_key,
  output logic             q_valid,
  output logic             q_member,
  output logic [N-1:0]     vector
);

  localparam int unsigned HW = $clog2(N);

  // Odd multipliers, one per transform (reused cyclically if M > 8).
  localparam logic [31:0] MULT [8] = '{32'h9E3779B1, 32'h85EBCA77,
                                       32'hC2B2AE3D, 32'h27D4EB2F,
                                       32'h165667B1, 32'hD3A2646D,
                                       32'hFD7046C5, 32'hB55A4F09};

  function automatic logic [N-1:0] key_mask(logic [KEY_W-1:0] key);
    logic [N-1:0]     mask;
    logic [KEY_W-1:0] prod;
    mask = '0;
    for (int i = 0; i < M; i++) begin
      prod = KEY_W'(key * MULT[i % 8][KEY_W-1:0]);
      mask[prod[KEY_W-1 -: HW]] = 1'b1;
    end
    return mask;
  endfunction

  logic [N-1:0] ins_mask, q_mask;
  assign ins_mask = key_mask(ins_key);
  assign q_mask   = key_mask(q_key);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vector   <= '0;
      q_valid  <= 1'b0;
      q_member <= 1'b0;
    end else begin
      if (clear)       vector <= '0;
      else if (insert) vector <= vector | ins_mask;
      q_valid <= query;
      if (query) q_member <= (vector & q_mask) == q_mask;
    end
  end

endmodule
