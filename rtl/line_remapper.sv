// line_remapper: keeps the line address space of a cache contiguous when
// some physical lines are faulty.
//
// Healthy physical lines, in ascending order of their own addresses, take the
// logical addresses 0, 1, 2, ...; the faulty lines, again in ascending order,
// take the remaining top addresses. A logical address that lands on a faulty
// line is flagged (ok = 0). With one fault at line 4 of 8, logical 4 reaches
// physical 5, logical 5 reaches 6, logical 6 reaches 7 and logical 7 the
// faulty line 4, as in the source's single-fault example; the same rule is
// used for several faults.
//
// Interface: fault_map has one bit per physical line (1 = faulty);
// log_addr in, phys_addr and ok out. Timing: purely combinational.
module line_remapper #(
  parameter int unsigned LINES = 8
) (
  input  logic [LINES-1:0]         fault_map,
  input  logic [$clog2(LINES)-1:0] log_addr,
  output logic [$clog2(LINES)-1:0] phys_addr,
  output logic                     ok
);

  localparam int unsigned AW = $clog2(LINES);

  always_comb begin
    int unsigned healthy_total;
    int unsigned healthy_rank;
    int unsigned faulty_rank;
    healthy_total = LINES - $countones(fault_map);
    healthy_rank  = 0;
    faulty_rank   = 0;
    phys_addr     = '0;
    ok            = 1'b0;
    for (int unsigned p = 0; p < LINES; p++) begin
      if (!fault_map[p]) begin
        if (healthy_rank == int'(log_addr)) begin
          phys_addr = AW'(p);
          ok        = 1'b1;
        end
        healthy_rank++;
      end else begin
        if (healthy_total + faulty_rank == int'(log_addr)) begin
          phys_addr = AW'(p);
          ok        = 1'b0;
        end
        faulty_rank++;
      end
    end
  end

endmodule
