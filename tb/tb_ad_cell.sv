// tb_ad_cell: exhaustive test of the add-1 cell: 1 for a negative digit, 0
// for a positive one, the incoming carry for a null digit; spacer while the
// digit is unknown.
module tb_ad_cell;
  import csd_pkg::*;
  import csd_tb_pkg::*;

  csd_code_t code;
  dr_t ci, ad;
  int checks = 0, failures = 0;

  ad_cell dut (.code(code), .ci(ci), .ad(ad));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++)
      for (int v = 0; v < 2; v++) begin
        logic e;
        code = mk_code(d);
        ci = dr_enc(1'b1, v[0]);
        #1;
        e = (d < 0) ? 1'b1 : (d > 0) ? 1'b0 : v[0];
        checks++;
        if (ad.t != e || ad.f != ~e) begin
          failures++;
          $display("FAIL d=%0d ci=%0d ad=%b", d, v, ad);
        end
      end
    code = '0; ci = dr_enc(1'b1, 1'b1);
    #1;
    checks++;
    if (ad != '0) begin
      failures++;
      $display("FAIL spacer digit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
