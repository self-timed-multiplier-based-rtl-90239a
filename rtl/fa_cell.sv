// fa_cell: dual-rail full adder of the carry-save array, with pass mode.
//
// With a non-null digit it adds the selected partial-product bit p to the
// sum (si) and carry (ci) arriving from the row above, both of this cell's
// weight w: so = p xor si xor ci, co = majority (weight w+1).
// With a null digit (n = 1, p stays at the spacer) it does no arithmetic:
// so copies si, and co copies ci_pass, the incoming carry of weight w+1
// (the carry input of the neighbouring cell), so the row hands the
// previous row's sum and carry vectors on unchanged and the addition is
// postponed to the next row. In pass mode the outputs do not wait for p
// or ci, which is why a null row evaluates faster.
//
// Purely combinational, each rail a sum of products of input rails.
module fa_cell
  import csd_pkg::*;
(
  input  logic n,        // N_J
  input  dr_t  p,        // partial-product bit (PP, PN)
  input  dr_t  si,       // sum in, weight w
  input  dr_t  ci,       // carry in, weight w
  input  dr_t  ci_pass,  // carry in of weight w+1, forwarded when n = 1
  output dr_t  so,       // sum out, weight w
  output dr_t  co        // carry out, weight w+1
);
  logic eq;   // si == ci
  logic ne;   // si != ci
  logic half; // p xor si = 1 (carry then equals ci)

  always_comb begin
    eq   = (ci.t & si.t) | (ci.f & si.f);
    ne   = (ci.t & si.f) | (ci.f & si.t);
    half = (p.f & si.t) | (p.t & si.f);

    so.t = (p.t & eq) | (p.f & ne) | (n & si.t);
    so.f = (p.t & ne) | (p.f & eq) | (n & si.f);
    co.t = (p.t & si.t) | (half & ci.t) | (n & ci_pass.t);
    co.f = (p.f & si.f) | (half & ci.f) | (n & ci_pass.f);
  end
endmodule
