// tb_pfa_cell: exhaustive test of a PFA cell (selector + full adder).
//
// For every digit, A_i, A_(i-1), si, ci and ci_pass: with a non-null digit
// the outputs must be the full-adder sum and carry of the selected bit, si
// and ci; with a null digit so = si and co = ci_pass.
module tb_pfa_cell;
  import csd_pkg::*;
  import csd_tb_pkg::*;

  csd_code_t code;
  dr_t a_i, a_im1, si, ci, ci_pass, so, co;
  int checks = 0, failures = 0;

  pfa_cell dut (.code(code), .a_i(a_i), .a_im1(a_im1), .si(si), .ci(ci),
                .ci_pass(ci_pass), .so(so), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_dr(input dr_t got, input logic e, input string what);
    checks++;
    if (got.t != e || got.f != ~e) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, e);
    end
  endtask

  initial begin
    for (int d = -2; d <= 2; d++)
      for (int v = 0; v < 32; v++) begin
        automatic logic ai = v[4], aim1 = v[3], vs = v[2], vc = v[1], vq = v[0];
        logic pb;
        code = mk_code(d);
        a_i = dr_enc(1'b1, ai);
        a_im1 = dr_enc(1'b1, aim1);
        si = dr_enc(1'b1, vs);
        ci = dr_enc(1'b1, vc);
        ci_pass = dr_enc(1'b1, vq);
        #1;
        if (d == 0) begin
          expect_dr(so, vs, $sformatf("null sum v=%0d", v));
          expect_dr(co, vq, $sformatf("null carry v=%0d", v));
        end else begin
          pb = sel_bit(d, ai, aim1);
          expect_dr(so, pb ^ vs ^ vc, $sformatf("sum d=%0d v=%0d", d, v));
          expect_dr(co, (pb & vs) | (pb & vc) | (vs & vc), $sformatf("carry d=%0d v=%0d", d, v));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
