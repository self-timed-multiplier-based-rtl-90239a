// rca_completion: final dual-rail ripple-carry adder with completion
// detection.
//
// Adds the sum vector x and the carry vector y left by the carry-save
// array (carry-in 0, result modulo 2^P). Each bit is a dual-rail full
// adder; its carry is known early when x_i = y_i (both 1: generate, both 0:
// kill) without waiting for the carry from below, so the time until every
// sum bit is valid depends on the longest carry run in the data, not on P.
// The completion detector raises done once every sum bit has one rail
// high (an AND over the per-bit ORs, built as a tree by synthesis).
//
// Timing: the sum and the carry of each bit are delayed by TICKS ticks of
// clk, done by one more; r low clears everything on the next edge
// (precharge). TICKS = 0 makes the adder purely combinational, with done
// combinational too.
module rca_completion
  import csd_pkg::*;
#(
  parameter int unsigned P     = 32,
  parameter int unsigned TICKS = 1
) (
  input  logic clk,
  input  logic r,
  input  dr_t  x [P],
  input  dr_t  y [P],
  output dr_t  s [P],
  output logic done
);
  dr_t  c [P+1];     // c[i]: carry into bit i, delayed
  logic [P-1:0] bit_valid;
  logic all_valid;

  assign c[0] = '{t: 1'b0, f: r};

  for (genvar i = 0; i < P; i++) begin : g_bit
    dr_t sum_c, car_c;
    logic ne;   // x_i != y_i (propagate)
    logic eq1;  // both 1 (generate)
    logic eq0;  // both 0 (kill)

    always_comb begin
      ne  = (x[i].t & y[i].f) | (x[i].f & y[i].t);
      eq1 = x[i].t & y[i].t;
      eq0 = x[i].f & y[i].f;
      sum_c.t = (ne & c[i].f) | ((eq1 | eq0) & c[i].t);
      sum_c.f = (ne & c[i].t) | ((eq1 | eq0) & c[i].f);
      car_c.t = eq1 | (ne & c[i].t);
      car_c.f = eq0 | (ne & c[i].f);
    end

    dr_delay #(.W(2), .LONG(TICKS), .SHORT(TICKS)) u_ds (
      .clk(clk), .r(r), .fast(1'b0), .d(sum_c), .q(s[i]));
    dr_delay #(.W(2), .LONG(TICKS), .SHORT(TICKS)) u_dc (
      .clk(clk), .r(r), .fast(1'b0), .d(car_c), .q(c[i+1]));

    assign bit_valid[i] = dr_valid(s[i]);
  end

  assign all_valid = &bit_valid;

  dr_delay #(.W(1), .LONG(TICKS), .SHORT(TICKS)) u_done (
    .clk(clk), .r(r), .fast(1'b0), .d(all_valid), .q(done));

  // A dual-rail output must never have both rails high (checked while r is
  // high; before the first precharge the delay stages hold arbitrary values).
  for (genvar i = 0; i < P; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!r) !(s[i].t && s[i].f))
      else $error("rca_completion: bit %0d has both rails high", i);
  end
endmodule
