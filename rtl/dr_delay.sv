// dr_delay: delay element of the timing model of the self-timed array.
//
// The multiplier's cells are combinational dual-rail gates. To make the
// data-dependent evaluation time observable in a clocked simulator or an
// FPGA, each gate output goes through this element, which delays it by a
// whole number of ticks of clk (the time base). While r (the request) is
// low every stage is cleared, which models the precharge of the dynamic
// gates: all rails return to the spacer one tick after r falls.
//
// Two taps are provided: LONG ticks normally, SHORT ticks when `fast` is
// high. The array uses the short tap for adders working as pass cells.
// Because dual-rail rails only rise during evaluation and the short tap
// always leads the long one, switching taps cannot make an output fall.
// LONG = 0 gives a plain wire (zero-delay, purely combinational model).
//
// The tick counts are a modelling choice of this design, not circuit data.
module dr_delay #(
  parameter int unsigned W     = 2,
  parameter int unsigned LONG  = 1,
  parameter int unsigned SHORT = 1
) (
  input  logic         clk,
  input  logic         r,
  input  logic         fast,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (LONG == 0) begin : g_wire
    assign q = d;
  end else begin : g_line
    logic [W-1:0] sr [LONG];
    always_ff @(posedge clk) begin
      if (!r) begin
        for (int k = 0; k < int'(LONG); k++) sr[k] <= '0;
      end else begin
        sr[0] <= d;
        for (int k = 1; k < int'(LONG); k++) sr[k] <= sr[k-1];
      end
    end
    if (SHORT >= 1 && SHORT < LONG) begin : g_two_taps
      assign q = fast ? sr[SHORT-1] : sr[LONG-1];
    end else begin : g_one_tap
      assign q = sr[LONG-1];
    end
  end
endmodule
