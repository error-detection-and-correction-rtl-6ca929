// interleaved_cache: an 8-line, 8-bit cache line store, low-order interleaved
// over two sets (banks) of four lines, that bypasses faulty lines.
//
// In the physical store the least significant address bit A0 selects the set
// and A2..A1 select the line within it; a 2-to-1 multiplexer driven by A0
// passes the output of one set. Low-order interleaving cannot drop a whole
// set when a line fails, so a fault map marks single faulty lines and a line
// remapper moves every logical address past them: healthy lines keep a
// contiguous address range and the highest logical addresses point to the
// faulty lines. Reading such an address returns rd_ok = 0 and data 0 (the
// source describes a high-impedance word there; this two-valued design gives
// a flag instead). Writes to such an address are dropped.
//
// Interface: synchronous write (wr_en, wr_addr, wr_data); read with one cycle
// of latency (rd_en, rd_addr -> rd_valid, rd_ok, rd_data). fault_map is one
// bit per physical line, 1 = faulty, and is expected to be held steady.
// Memory contents are not reset.
//
// From the source: 8 lines of 8 bits, two sets, A0 as set select, the
// multiplexer, and the remapping rule for a single fault. The extension of
// the rule to several faults, the flag for the faulty words, the fault map
// input and the timing are this design's choices.
module interleaved_cache #(
  parameter int unsigned LINES  = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned BANKS  = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [LINES-1:0]         fault_map,
  input  logic                     wr_en,
  input  logic [$clog2(LINES)-1:0] wr_addr,
  input  logic [DATA_W-1:0]        wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(LINES)-1:0] rd_addr,
  output logic                     rd_valid,
  output logic                     rd_ok,
  output logic [DATA_W-1:0]        rd_data
);

  localparam int unsigned AW    = $clog2(LINES);
  localparam int unsigned BW    = $clog2(BANKS);
  localparam int unsigned DEPTH = LINES / BANKS;

  logic [AW-1:0] wr_phys, rd_phys;
  logic          wr_ok, rd_map_ok;

  line_remapper #(.LINES(LINES)) u_wr_map (
    .fault_map, .log_addr(wr_addr), .phys_addr(wr_phys), .ok(wr_ok)
  );
  line_remapper #(.LINES(LINES)) u_rd_map (
    .fault_map, .log_addr(rd_addr), .phys_addr(rd_phys), .ok(rd_map_ok)
  );

  // Physical address split: low bits select the set (bank), high bits the
  // line within it.
  logic [DATA_W-1:0] bank_mem [BANKS][DEPTH];
  logic [DATA_W-1:0] bank_q   [BANKS];
  logic [BW-1:0]     sel_q;

  always_ff @(posedge clk) begin
    if (wr_en && wr_ok)
      bank_mem[wr_phys[BW-1:0]][wr_phys[AW-1:BW]] <= wr_data;
    if (rd_en)
      for (int b = 0; b < BANKS; b++)
        bank_q[b] <= bank_mem[b][rd_phys[AW-1:BW]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_ok    <= 1'b0;
      sel_q    <= '0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) begin
        rd_ok <= rd_map_ok;
        sel_q <= rd_phys[BW-1:0];
      end
    end
  end

  // Set-select multiplexer.
  assign rd_data = rd_ok ? bank_q[sel_q] : '0;

endmodule
