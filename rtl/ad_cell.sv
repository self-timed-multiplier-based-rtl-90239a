// ad_cell: the "add 1" cell at the least significant end of a row.
//
// For a negative digit (-1 or -2) the row holds the ones' complement of
// |D_J| * A, and this cell supplies the missing +1 at the row's LSB weight.
// For a positive digit it gives 0. For a null digit it instead forwards
// ci, the carry that arrives at the row's LSB weight and that the row's
// lowest adder (then a pass cell) does not consume. Its output goes to the
// final adder at that weight.
//
// Purely combinational.
module ad_cell
  import csd_pkg::*;
(
  input  csd_code_t code,
  input  dr_t       ci,   // carry arriving at the row's LSB weight
  output dr_t       ad
);
  always_comb begin
    ad.t = code.y | code.y2 | (code.n & ci.t);
    ad.f = code.x | code.x2 | (code.n & ci.f);
  end
endmodule
