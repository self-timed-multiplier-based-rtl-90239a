// csd_recoder: one radix-4 canonical signed-digit (CSD) recoder stage.
//
// Stage J looks at multiplier bits B_(2J) (b_lo, weight 1) and B_(2J+1)
// (b_mid, weight 2), the carry from the stage below (ci, weight 1) and the
// lookahead bit B_(2J+2) (b_hi). With r = b_lo + ci + 2*b_mid it emits
//   r=0 -> 0,            r=1 -> +1,
//   r=2 -> +2 if b_hi=0, -2 with carry if b_hi=1,
//   r=3 -> -1 with carry, r=4 -> 0 with carry,
// so that D_J + 4*CO = r. The digit leaves as a 5-out-of-1 code
// {N, X, 2X, Y, 2Y}; the carry as a dual-rail pair. The equations are the
// published recoder equations written on the dual rails: every output rail
// is a sum of products of input rails, so outputs stay low while the inputs
// are precharged and each output rises as soon as one product term is
// complete. In particular the carry is known without ci whenever b_mid
// equals b_lo (b_mid=b_lo=1 forces a carry, b_mid=b_lo=0 forbids it), which
// keeps the average carry chain across the stages short.
//
// Purely combinational; timing is added around it by the array.
module csd_recoder
  import csd_pkg::*;
(
  input  dr_t       b_hi,   // B_(j+1), lookahead
  input  dr_t       b_mid,  // B_j
  input  dr_t       b_lo,   // B_(j-1)
  input  dr_t       ci,     // carry from the stage below
  output csd_code_t code,
  output dr_t       co
);
  logic odd;   // exactly one of b_lo, ci is 1
  logic two;   // b_lo + ci + 2*b_mid = 2

  always_comb begin
    odd = (b_lo.t & ci.f) | (b_lo.f & ci.t);
    two = (b_mid.t & b_lo.f & ci.f) | (b_mid.f & b_lo.t & ci.t);

    code.n  = (b_mid.f & b_lo.f & ci.f) | (b_mid.t & b_lo.t & ci.t);
    code.x  = b_mid.f & odd;
    code.x2 = b_hi.f & two;
    code.y  = b_mid.t & odd;
    code.y2 = b_hi.t & two;

    co.t = (b_hi.t & b_lo.t & ci.t) | (b_mid.t & (ci.t | b_lo.t | b_hi.t));
    co.f = (b_hi.f & b_lo.f & ci.f) | (b_mid.f & (ci.f | b_lo.f | b_hi.f));
  end
endmodule
