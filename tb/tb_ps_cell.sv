// tb_ps_cell: exhaustive test of the sign-generate cell. The output must be
// the complement of the sign of D*A in ones'-complement form: not(sign A)
// for +1 and +2, sign A for -1 and -2, and 1 for a null digit.
module tb_ps_cell;
  import csd_pkg::*;
  import csd_tb_pkg::*;

  csd_code_t code;
  dr_t a_sign, ps;
  int checks = 0, failures = 0;

  ps_cell dut (.code(code), .a_sign(a_sign), .ps(ps));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++)
      for (int v = 0; v < 2; v++) begin
        logic s, e;
        code = mk_code(d);
        a_sign = dr_enc(1'b1, v[0]);
        #1;
        s = (d == 0) ? 1'b0 : (d > 0) ? v[0] : ~v[0];
        e = ~s;
        checks++;
        if (ps.t != e || ps.f != ~e) begin
          failures++;
          $display("FAIL d=%0d sign=%0d ps=%b", d, v, ps);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
