// sti_tag_cache: tag directory of a 4-way, 8-set cache whose tags are
// protected by a check bit and repaired from identical tags in adjacent sets.
//
// Caches fill adjacent sets from nearby addresses, so the same tag often sits
// in a neighbouring set. Every stored tag carries an even-parity check bit
// and same-tag-information (STI) bits that point to an identical tag in the
// set above or below, if there is one. A lookup reads the addressed set and
// both neighbours; a tag whose check bit fails is replaced by the copy the
// STI bits point to, the hit is decided on the repaired tags and the repaired
// row is written back in the same cycle (scrubbing).
//
// Commands (valid/ready handshake, accepted when cmd_valid && cmd_ready):
//   OP_WRITE  - store cmd_tag in (cmd_set, cmd_way) with a fresh check bit,
//               then re-encode the STI bits of sets cmd_set-1, cmd_set and
//               cmd_set+1 (the ones that exist), one set per cycle. The
//               directory is busy (cmd_ready low) during re-encoding: a write
//               takes 3 cycles at the first or last set and 4 otherwise.
//   OP_LOOKUP - compare cmd_tag with set cmd_set. The response (rsp_*) is
//               valid one cycle after acceptance; a new command can be
//               accepted every cycle. rsp_tag is the tag of the hit way.
//   OP_READ   - read the tag of (cmd_set, cmd_way), corrected if needed, as
//               needed to write a victim line back to the right address
//               (guarding against replacement errors). Same timing as a
//               lookup; rsp_tag_ok is low if the tag could not be trusted.
// Lookups and reads write any repaired word back in their own cycle.
// Re-encoding keeps each word's stored check bit and tag and renews only the
// STI bits, so an upset that is already present stays detectable.
// inj_* flips one stored bit to model a soft error.
//
// From the source: the 4-way, 8-set, 8-bit tag geometry, the STI fields, and
// correcting a faulty tag from the adjacent copy; detection by parity is one
// of the check codes it names. The command set, the re-encoding schedule, the
// write-back of repaired tags and all timing are this design's choices.
module sti_tag_cache
  import sti_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // command
  input  logic                     cmd_valid,
  output logic                     cmd_ready,
  input  op_e                      cmd_op,
  input  set_idx_t                 cmd_set,
  input  way_t                     cmd_way,
  input  tag_t                     cmd_tag,
  // lookup response
  output logic                     rsp_valid,
  output logic                     rsp_hit,
  output way_t                     rsp_way,
  output logic                     rsp_multi_hit,
  output logic                     rsp_pseudo_hit,
  output logic                     rsp_pseudo_miss,
  output logic [WAYS-1:0]          rsp_corrected,
  output logic [WAYS-1:0]          rsp_due,
  output tag_t                     rsp_tag,      // tag of the hit / read way
  output logic                     rsp_tag_ok,   // rsp_tag is not uncorrectable
  // soft-error injection
  input  logic                     inj_en,
  input  set_idx_t                 inj_set,
  input  way_t                     inj_way,
  input  logic [$clog2(ENC_W)-1:0] inj_bit
);

  typedef enum logic {S_IDLE, S_ENC} state_e;

  state_e   state_q;
  set_idx_t base_q;      // set that was written
  logic [1:0] step_q;    // 0: base-1, 1: base, 2: base+1
  set_idx_t enc_idx;
  logic     enc_exists;

  // array ports
  set_idx_t rd_idx;
  enc_row_t rd_row, rd_upper, rd_lower;
  logic     upper_en, lower_en;
  logic     wr_en;
  set_idx_t wr_idx;
  enc_row_t wr_row;

  // encoder / corrector / compare
  tag_row_t row_tags, upper_tags, lower_tags, cor_tags;
  enc_row_t enc_out, repaired;
  logic [WAYS-1:0] detected, corrected, due;
  logic hit, multi_hit, pseudo_hit, pseudo_miss;
  way_t hit_way;

  tag_array u_array (
    .clk, .rst_n,
    .rd_idx, .rd_row, .rd_upper, .rd_lower, .upper_en, .lower_en,
    .wr_en, .wr_idx, .wr_row,
    .inj_en, .inj_idx(inj_set), .inj_way, .inj_bit
  );

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      row_tags[w]   = rd_row[w].tag;
      upper_tags[w] = rd_upper[w].tag;
      lower_tags[w] = rd_lower[w].tag;
    end
  end

  sti_encoder u_enc (
    .inp1(row_tags), .inp2(upper_tags), .inp3(lower_tags),
    .inp2_en(upper_en), .inp3_en(lower_en), .out1(enc_out)
  );

  sti_corrector u_cor (
    .inp1(rd_row), .inp2(rd_upper), .inp3(rd_lower),
    .inp2_en(upper_en), .inp3_en(lower_en),
    .resultant(cor_tags), .repaired, .detected, .corrected, .due
  );

  tag_compare u_cmp (
    .lookup_tag(cmd_tag), .raw_tags(row_tags), .cor_tags, .due,
    .hit, .hit_way, .multi_hit, .pseudo_hit, .pseudo_miss
  );

  // Set re-encoded in this step, and whether it exists.
  always_comb begin
    enc_idx    = base_q;
    enc_exists = 1'b1;
    unique case (step_q)
      2'd0: begin
        enc_idx    = base_q - 1'b1;
        enc_exists = base_q != '0;
      end
      2'd2: begin
        enc_idx    = base_q + 1'b1;
        enc_exists = base_q != set_idx_t'(SETS - 1);
      end
      default: ;
    endcase
  end

  assign cmd_ready = state_q == S_IDLE;
  assign rd_idx    = (state_q == S_ENC) ? enc_idx : cmd_set;

  always_comb begin
    wr_en  = 1'b0;
    wr_idx = rd_idx;
    wr_row = rd_row;
    if (state_q == S_ENC) begin
      wr_en = enc_exists;
      for (int w = 0; w < WAYS; w++) wr_row[w].sti = enc_out[w].sti;
    end else if (cmd_valid) begin
      if (cmd_op == OP_WRITE) begin
        wr_en                   = 1'b1;
        wr_row[cmd_way].tag     = cmd_tag;
        wr_row[cmd_way].parity  = tag_parity(cmd_tag);
        wr_row[cmd_way].sti     = '0;
      end else begin
        wr_en  = |corrected;
        wr_row = repaired;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      base_q  <= '0;
      step_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (cmd_valid && cmd_op == OP_WRITE) begin
          state_q <= S_ENC;
          base_q  <= cmd_set;
          // The first set has no upper neighbour: start at the set itself.
          step_q  <= (cmd_set == '0) ? 2'd1 : 2'd0;
        end
        S_ENC: begin
          if (step_q == 2'd2 || (step_q == 2'd1 && base_q == set_idx_t'(SETS - 1)))
            state_q <= S_IDLE;
          step_q <= step_q + 2'd1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid       <= 1'b0;
      rsp_hit         <= 1'b0;
      rsp_way         <= '0;
      rsp_multi_hit   <= 1'b0;
      rsp_pseudo_hit  <= 1'b0;
      rsp_pseudo_miss <= 1'b0;
      rsp_corrected   <= '0;
      rsp_due         <= '0;
      rsp_tag         <= '0;
      rsp_tag_ok      <= 1'b0;
    end else begin
      rsp_valid <= cmd_valid && cmd_ready && cmd_op != OP_WRITE;
      if (cmd_valid && cmd_ready && cmd_op != OP_WRITE) begin
        if (cmd_op == OP_READ) begin
          rsp_hit         <= 1'b0;
          rsp_way         <= cmd_way;
          rsp_multi_hit   <= 1'b0;
          rsp_pseudo_hit  <= 1'b0;
          rsp_pseudo_miss <= 1'b0;
          rsp_tag         <= cor_tags[cmd_way];
          rsp_tag_ok      <= !due[cmd_way];
        end else begin
          rsp_hit         <= hit;
          rsp_way         <= hit_way;
          rsp_multi_hit   <= multi_hit;
          rsp_pseudo_hit  <= pseudo_hit;
          rsp_pseudo_miss <= pseudo_miss;
          rsp_tag         <= cor_tags[hit_way];
          rsp_tag_ok      <= hit;
        end
        rsp_corrected   <= corrected;
        rsp_due         <= due;
      end
    end
  end

  // Every detected error is either corrected or reported as uncorrectable.
  a_flags: assert property (@(posedge clk) disable iff (!rst_n)
                            (corrected | due) == detected);

  // Re-encoding after a write ends within three cycles.
  property p_enc_len;
    @(posedge clk) disable iff (!rst_n) state_q == S_ENC |-> ##[1:3] state_q == S_IDLE;
  endproperty
  a_enc_len: assert property (p_enc_len);

endmodule
