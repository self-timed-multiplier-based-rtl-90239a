// pp_select: the PP selector of a partial-product bit.
//
// Chooses bit i of D_J * A in ones'-complement form from the digit code:
// A_i for +1, A_(i-1) for +2, not A_i for -1, not A_(i-1) for -2 (the
// missing +1 of the negation is added by the row's AD cell). The result is
// the dual-rail pair p = (PP, PN). For a null digit (N_J = 1) neither rail
// rises: the following adder then works as a pass cell and never reads p.
// The null wire code.n is not used here (lint reports it unused); it only
// drives the adder.
//
// Purely combinational.
module pp_select
  import csd_pkg::*;
(
  input  csd_code_t code,
  input  dr_t       a_i,    // A_i
  input  dr_t       a_im1,  // A_(i-1)
  output dr_t       p       // t = PP, f = PN
);
  always_comb begin
    p.t = (code.y2 & a_im1.f) | (code.y & a_i.f) | (code.x2 & a_im1.t) | (code.x & a_i.t);
    p.f = (code.x2 & a_im1.f) | (code.x & a_i.f) | (code.y2 & a_im1.t) | (code.y & a_i.t);
  end
endmodule
