// tb_ha_cell: exhaustive test of the dual-rail half adder with pass mode.
//
// n = 0: so = p xor si, co = p and si. n = 1 (p at the spacer): so = si,
// co a valid 0. Spacer inputs must give spacer outputs.
module tb_ha_cell;
  import csd_pkg::*;

  logic n;
  dr_t p, si, so, co;
  int checks = 0, failures = 0;

  ha_cell dut (.n(n), .p(p), .si(si), .so(so), .co(co));

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
    for (int v = 0; v < 4; v++) begin
      p = dr_enc(1'b1, v[1]);
      si = dr_enc(1'b1, v[0]);
      #1;
      expect_dr(so, v[1] ^ v[0], $sformatf("sum v=%0d", v));
      expect_dr(co, v[1] & v[0], $sformatf("carry v=%0d", v));
    end
    n = 1'b1;
    p = '0;
    for (int v = 0; v < 2; v++) begin
      si = dr_enc(1'b1, v[0]);
      #1;
      expect_dr(so, v[0], $sformatf("pass sum v=%0d", v));
      expect_dr(co, 1'b0, $sformatf("pass carry v=%0d", v));
    end
    n = 1'b0; p = '0; si = '0;
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
