// pi_cell: bit selector of the first partial product (row J = 0).
//
// Row 0 has nothing to add to, so its bits go straight into the array as
// the first sum vector. The cell selects A_i, A_(i-1) or their complements
// like pp_select, and in addition drives a valid 0 (false rail) for a null
// digit, since this bit is itself a sum bit that later rows must read.
//
// Purely combinational.
module pi_cell
  import csd_pkg::*;
(
  input  csd_code_t code,   // digit D_0
  input  dr_t       a_i,
  input  dr_t       a_im1,
  output dr_t       pi
);
  always_comb begin
    pi.t = (code.y2 & a_im1.f) | (code.y & a_i.f) | (code.x2 & a_im1.t) | (code.x & a_i.t);
    pi.f = (code.x2 & a_im1.f) | (code.x & a_i.f) | (code.y2 & a_im1.t) | (code.y & a_i.t)
         | code.n;
  end
endmodule
