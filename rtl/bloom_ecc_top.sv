// bloom_ecc_top: the three pieces of hardware described for protecting and
// using cache memories, side by side, each with its own ports.
//
//  * sti_tag_cache     - tag directory of a 4-way, 8-set cache whose tags
//                        carry a check bit and same-tag information (STI);
//                        corrupted tags are repaired from identical tags in
//                        adjacent sets (ports tc_*).
//  * interleaved_cache - 8-line, 8-bit low-order interleaved line store that
//                        bypasses faulty lines by remapping line addresses
//                        (ports ic_*).
//  * bloom_filter      - 8-bit Bloom filter with 4 hash transforms for fast
//                        set-membership tests (ports bf_*).
// The three share only clock and reset. Timing is that of each block.
module bloom_ecc_top
  import sti_pkg::*;
#(
  parameter int unsigned IC_LINES  = 8,
  parameter int unsigned IC_DATA_W = 8,
  parameter int unsigned BF_N      = 8,
  parameter int unsigned BF_M      = 4,
  parameter int unsigned BF_KEY_W  = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // STI-protected tag directory
  input  logic                        tc_cmd_valid,
  output logic                        tc_cmd_ready,
  input  op_e                         tc_cmd_op,
  input  set_idx_t                    tc_cmd_set,
  input  way_t                        tc_cmd_way,
  input  tag_t                        tc_cmd_tag,
  output logic                        tc_rsp_valid,
  output logic                        tc_rsp_hit,
  output way_t                        tc_rsp_way,
  output logic                        tc_rsp_multi_hit,
  output logic                        tc_rsp_pseudo_hit,
  output logic                        tc_rsp_pseudo_miss,
  output logic [WAYS-1:0]             tc_rsp_corrected,
  output logic [WAYS-1:0]             tc_rsp_due,
  output tag_t                        tc_rsp_tag,
  output logic                        tc_rsp_tag_ok,
  input  logic                        tc_inj_en,
  input  set_idx_t                    tc_inj_set,
  input  way_t                        tc_inj_way,
  input  logic [$clog2(ENC_W)-1:0]    tc_inj_bit,
  // fault-tolerant interleaved line store
  input  logic [IC_LINES-1:0]         ic_fault_map,
  input  logic                        ic_wr_en,
  input  logic [$clog2(IC_LINES)-1:0] ic_wr_addr,
  input  logic [IC_DATA_W-1:0]        ic_wr_data,
  input  logic                        ic_rd_en,
  input  logic [$clog2(IC_LINES)-1:0] ic_rd_addr,
  output logic                        ic_rd_valid,
  output logic                        ic_rd_ok,
  output logic [IC_DATA_W-1:0]        ic_rd_data,
  // Bloom filter
  input  logic                        bf_clear,
  input  logic                        bf_insert,
  input  logic [BF_KEY_W-1:0]         bf_ins_key,
  input  logic                        bf_query,
  input  logic [BF_KEY_W-1:0]         bf_q_key,
  output logic                        bf_q_valid,
  output logic                        bf_q_member,
  output logic [BF_N-1:0]             bf_vector
);

  sti_tag_cache u_tags (
    .clk, .rst_n,
    .cmd_valid(tc_cmd_valid), .cmd_ready(tc_cmd_ready), .cmd_op(tc_cmd_op),
    .cmd_set(tc_cmd_set), .cmd_way(tc_cmd_way), .cmd_tag(tc_cmd_tag),
    .rsp_valid(tc_rsp_valid), .rsp_hit(tc_rsp_hit), .rsp_way(tc_rsp_way),
    .rsp_multi_hit(tc_rsp_multi_hit), .rsp_pseudo_hit(tc_rsp_pseudo_hit),
    .rsp_pseudo_miss(tc_rsp_pseudo_miss), .rsp_corrected(tc_rsp_corrected),
    .rsp_due(tc_rsp_due), .rsp_tag(tc_rsp_tag), .rsp_tag_ok(tc_rsp_tag_ok),
    .inj_en(tc_inj_en), .inj_set(tc_inj_set), .inj_way(tc_inj_way),
    .inj_bit(tc_inj_bit)
  );

  interleaved_cache #(.LINES(IC_LINES), .DATA_W(IC_DATA_W)) u_lines (
    .clk, .rst_n, .fault_map(ic_fault_map),
    .wr_en(ic_wr_en), .wr_addr(ic_wr_addr), .wr_data(ic_wr_data),
    .rd_en(ic_rd_en), .rd_addr(ic_rd_addr),
    .rd_valid(ic_rd_valid), .rd_ok(ic_rd_ok), .rd_data(ic_rd_data)
  );

  bloom_filter #(.N(BF_N), .M(BF_M), .KEY_W(BF_KEY_W)) u_bloom (
    .clk, .rst_n, .clear(bf_clear),
    .insert(bf_insert), .ins_key(bf_ins_key),
    .query(bf_query), .q_key(bf_q_key),
    .q_valid(bf_q_valid), .q_member(bf_q_member), .vector(bf_vector)
  );

endmodule
