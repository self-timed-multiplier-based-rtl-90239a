// csd_tb_pkg: helpers shared by the cell testbenches.
package csd_tb_pkg;
  import csd_pkg::*;

  // 5-out-of-1 code of a digit in {-2..2}.
  function automatic csd_code_t mk_code(input int d);
    csd_code_t c = '0;
    case (d)
      0: c.n = 1'b1;
      1: c.x = 1'b1;
      2: c.x2 = 1'b1;
      -1: c.y = 1'b1;
      default: c.y2 = 1'b1;
    endcase
    return c;
  endfunction

  // Bit of D*A in ones'-complement form selected from A_i and A_(i-1).
  function automatic logic sel_bit(input int d, input logic ai, input logic aim1);
    return (d == 1) ? ai : (d == 2) ? aim1 : (d == -1) ? ~ai : ~aim1;
  endfunction
endpackage
