// pfa_cell: one bit of a partial-product row, a PP selector feeding a
// full adder (fa_cell). The selector forms bit i of D_J * A from A_i and
// A_(i-1); the adder adds it to the sum and carry of the row above, or
// passes them on when the digit is null (code.n = 1).
//
// Purely combinational; see pp_select and fa_cell for the equations.
module pfa_cell
  import csd_pkg::*;
(
  input  csd_code_t code,     // digit of this row
  input  dr_t       a_i,      // A_i
  input  dr_t       a_im1,    // A_(i-1)
  input  dr_t       si,       // sum in, weight w
  input  dr_t       ci,       // carry in, weight w
  input  dr_t       ci_pass,  // carry in of weight w+1 (pass mode)
  output dr_t       so,
  output dr_t       co
);
  dr_t p;

  pp_select u_pp (.code(code), .a_i(a_i), .a_im1(a_im1), .p(p));
  fa_cell   u_fa (.n(code.n), .p(p), .si(si), .ci(ci), .ci_pass(ci_pass),
                  .so(so), .co(co));
endmodule
