// tb_pha_cell: exhaustive test of a PHA cell (selector + half adder).
//
// Non-null digit: so = bit xor si, co = bit and si for the selected bit.
// Null digit: so = si, co = 0.
module tb_pha_cell;
  import csd_pkg::*;
  import csd_tb_pkg::*;

  csd_code_t code;
  dr_t a_i, a_im1, si, so, co;
  int checks = 0, failures = 0;

  pha_cell dut (.code(code), .a_i(a_i), .a_im1(a_im1), .si(si), .so(so), .co(co));

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
      for (int v = 0; v < 8; v++) begin
        automatic logic ai = v[2], aim1 = v[1], vs = v[0];
        logic pb;
        code = mk_code(d);
        a_i = dr_enc(1'b1, ai);
        a_im1 = dr_enc(1'b1, aim1);
        si = dr_enc(1'b1, vs);
        #1;
        pb = (d == 0) ? 1'b0 : sel_bit(d, ai, aim1);
        expect_dr(so, pb ^ vs, $sformatf("sum d=%0d v=%0d", d, v));
        expect_dr(co, pb & vs, $sformatf("carry d=%0d v=%0d", d, v));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
