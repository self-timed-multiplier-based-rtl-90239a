// tb_fa_cell: exhaustive test of the dual-rail full adder with pass mode.
//
// Arithmetic mode (n = 0): for all p, si, ci (and either ci_pass) checks
// so = p xor si xor ci and co = majority(p, si, ci). Pass mode (n = 1, p
// at the spacer): checks so = si and co = ci_pass, and that these are
// valid even while ci is still at the spacer. Spacer inputs must give
// spacer outputs.
module tb_fa_cell;
  import csd_pkg::*;

  logic n;
  dr_t p, si, ci, ci_pass, so, co;
  int checks = 0, failures = 0;

  fa_cell dut (.n(n), .p(p), .si(si), .ci(ci), .ci_pass(ci_pass), .so(so), .co(co));

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
    n = 1'b0;
    for (int v = 0; v < 16; v++) begin
      automatic logic vp = v[3], vs = v[2], vc = v[1], vq = v[0];
      p = dr_enc(1'b1, vp);
      si = dr_enc(1'b1, vs);
      ci = dr_enc(1'b1, vc);
      ci_pass = dr_enc(1'b1, vq);
      #1;
      expect_dr(so, vp ^ vs ^ vc, $sformatf("sum v=%0d", v));
      expect_dr(co, (vp & vs) | (vp & vc) | (vs & vc), $sformatf("carry v=%0d", v));
    end
    n = 1'b1;
    p = '0;
    for (int v = 0; v < 8; v++) begin
      automatic logic vs = v[2], vc = v[1], vq = v[0];
      si = dr_enc(1'b1, vs);
      ci = dr_enc(1'b1, vc);
      ci_pass = dr_enc(1'b1, vq);
      #1;
      expect_dr(so, vs, $sformatf("pass sum v=%0d", v));
      expect_dr(co, vq, $sformatf("pass carry v=%0d", v));
      ci = '0;
      #1;
      expect_dr(so, vs, $sformatf("pass sum, ci spacer v=%0d", v));
      expect_dr(co, vq, $sformatf("pass carry, ci spacer v=%0d", v));
    end
    n = 1'b0; p = '0; si = '0; ci = '0; ci_pass = '0;
    #1;
    checks++;
    if (so != '0 || co != '0) begin
      failures++;
      $display("FAIL spacer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
