// ps_cell: sign-generate cell of a partial-product row.
//
// Outputs the complement of the sign S_J of the row's selected
// (ones'-complement) partial product: S_J = sign of A for +1 and +2, its
// complement for -1 and -2, and 0 for a null digit (so the output is 1).
// Placed one bit above the row's top selected bit, it replaces the sign
// extension of that row; the constant the replacement needs is added
// elsewhere in the array (see csd_multiplier).
//
// Purely combinational.
module ps_cell
  import csd_pkg::*;
(
  input  csd_code_t code,
  input  dr_t       a_sign,  // A_(M-1), the sign bit of the multiplicand
  output dr_t       ps       // not S_J
);
  logic pos, neg;

  always_comb begin
    pos  = code.x | code.x2;
    neg  = code.y | code.y2;
    ps.t = code.n | (a_sign.f & pos) | (a_sign.t & neg);
    ps.f = (a_sign.t & pos) | (a_sign.f & neg);
  end
endmodule
