// pha_cell: one bit of partial-product row J = 1, a PP selector feeding a
// half adder (ha_cell): adds bit i of D_1 * A to the sum bit of row 0, or
// passes that bit on when D_1 = 0.
//
// Purely combinational; see pp_select and ha_cell for the equations.
module pha_cell
  import csd_pkg::*;
(
  input  csd_code_t code,
  input  dr_t       a_i,
  input  dr_t       a_im1,
  input  dr_t       si,
  output dr_t       so,
  output dr_t       co
);
  dr_t p;

  pp_select u_pp (.code(code), .a_i(a_i), .a_im1(a_im1), .p(p));
  ha_cell   u_ha (.n(code.n), .p(p), .si(si), .so(so), .co(co));
endmodule
