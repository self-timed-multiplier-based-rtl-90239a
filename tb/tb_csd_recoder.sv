// tb_csd_recoder: exhaustive test of one CSD recoder stage.
//
// For all 16 combinations of b_hi, b_mid, b_lo and ci it checks that the
// digit code is 5-out-of-1, that D + 4*CO equals b_lo + ci + 2*b_mid, that
// the choice between +2 and -2 follows b_hi, and that no digit is +-1 or
// +-2 where 0 would do. It also checks that all-spacer inputs give spacer
// outputs and that the carry is already known with ci at the spacer when
// b_mid equals b_lo or b_hi (the carry is then b_mid), and not otherwise.
module tb_csd_recoder;
  import csd_pkg::*;

  dr_t b_hi, b_mid, b_lo, ci, co;
  csd_code_t code;
  int checks = 0, failures = 0;

  csd_recoder dut (.b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .ci(ci), .code(code), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      automatic int hi = (v >> 3) & 1, mid = (v >> 2) & 1, lo = (v >> 1) & 1, c = v & 1;
      automatic int rr = lo + c + 2 * mid;
      int d;
      b_hi = dr_enc(1'b1, 1'(hi));
      b_mid = dr_enc(1'b1, 1'(mid));
      b_lo = dr_enc(1'b1, 1'(lo));
      ci = dr_enc(1'b1, 1'(c));
      #1;
      d = code_value(code);
      check($countones(code) == 1, $sformatf("code not one-hot for v=%0d: %b", v, code));
      check(co.t ^ co.f, $sformatf("carry not valid for v=%0d", v));
      check(d + 4 * int'(co.t) == rr, $sformatf("D+4CO != r for v=%0d: D=%0d CO=%0d", v, d, co.t));
      if (rr == 2) check((d == -2) == (hi == 1), $sformatf("+-2 choice wrong for v=%0d", v));
      if (rr == 0 || rr == 4) check(code.n, $sformatf("expected null digit for v=%0d", v));
    end
    // precharge
    b_hi = '0; b_mid = '0; b_lo = '0; ci = '0;
    #1;
    check(code == '0 && co == '0, "spacer inputs must give spacer outputs");
    // early carry: ci still at the spacer
    for (int v = 0; v < 8; v++) begin
      automatic int hi = (v >> 2) & 1, mid = (v >> 1) & 1, lo = v & 1;
      b_hi = dr_enc(1'b1, 1'(hi));
      b_mid = dr_enc(1'b1, 1'(mid));
      b_lo = dr_enc(1'b1, 1'(lo));
      ci = '0;
      #1;
      if (mid == lo || mid == hi) check(co.t == 1'(mid) && co.f == 1'(!mid),
                                        $sformatf("carry should be known early for v=%0d", v));
      else check(co == '0, $sformatf("carry must wait for ci for v=%0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
