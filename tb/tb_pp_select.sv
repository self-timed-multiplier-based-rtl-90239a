// tb_pp_select: exhaustive test of the PP selector.
//
// For every digit and every value of A_i and A_(i-1) it checks the
// dual-rail output against the bit of D*A in ones'-complement form (A_i,
// A_(i-1), or their complements) and that a null digit leaves both rails
// low. Spacer inputs must give a spacer output.
module tb_pp_select;
  import csd_pkg::*;

  csd_code_t code;
  dr_t a_i, a_im1, p;
  int checks = 0, failures = 0;

  pp_select dut (.code(code), .a_i(a_i), .a_im1(a_im1), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic csd_code_t mk(input int d);
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

  initial begin
    for (int d = -2; d <= 2; d++)
      for (int v = 0; v < 4; v++) begin
        automatic logic ai = v[1], aim1 = v[0];
        logic e;
        code = mk(d);
        a_i = dr_enc(1'b1, ai);
        a_im1 = dr_enc(1'b1, aim1);
        #1;
        e = (d == 1) ? ai : (d == 2) ? aim1 : (d == -1) ? ~ai : ~aim1;
        checks++;
        if (d == 0 ? (p != '0) : (p.t != e || p.f != ~e)) begin
          failures++;
          $display("FAIL d=%0d ai=%b aim1=%b p=%b", d, ai, aim1, p);
        end
      end
    code = '0; a_i = '0; a_im1 = '0;
    #1;
    checks++;
    if (p != '0) begin
      failures++;
      $display("FAIL spacer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
