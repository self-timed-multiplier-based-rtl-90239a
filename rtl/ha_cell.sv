// ha_cell: dual-rail half adder of the second partial-product row (J = 1).
//
// Row J = 1 receives only the sum bits of row 0 (row 0 makes no carries),
// so each of its ordinary cells adds two bits: so = p xor si, co = p and si
// (weight w+1). With a null digit (n = 1) so copies si and co is a valid 0
// at once, since there is no incoming carry to hand on.
//
// Purely combinational.
module ha_cell
  import csd_pkg::*;
(
  input  logic n,   // N_J
  input  dr_t  p,   // partial-product bit (PP, PN)
  input  dr_t  si,  // sum in, weight w
  output dr_t  so,  // sum out, weight w
  output dr_t  co   // carry out, weight w+1
);
  always_comb begin
    so.t = (p.f & si.t) | (p.t & si.f) | (n & si.t);
    so.f = (p.t & si.t) | (p.f & si.f) | (n & si.f);
    co.t = p.t & si.t;
    co.f = si.f | p.f | n;
  end
endmodule
