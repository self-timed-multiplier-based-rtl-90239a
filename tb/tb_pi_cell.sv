// tb_pi_cell: exhaustive test of the first-row selector: the selected bit
// for a non-null digit, a valid 0 for a null digit, spacer for spacer
// inputs.
module tb_pi_cell;
  import csd_pkg::*;
  import csd_tb_pkg::*;

  csd_code_t code;
  dr_t a_i, a_im1, pi;
  int checks = 0, failures = 0;

  pi_cell dut (.code(code), .a_i(a_i), .a_im1(a_im1), .pi(pi));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++)
      for (int v = 0; v < 4; v++) begin
        logic e;
        code = mk_code(d);
        a_i = dr_enc(1'b1, v[1]);
        a_im1 = dr_enc(1'b1, v[0]);
        #1;
        e = (d == 0) ? 1'b0 : sel_bit(d, v[1], v[0]);
        checks++;
        if (pi.t != e || pi.f != ~e) begin
          failures++;
          $display("FAIL d=%0d v=%0d pi=%b", d, v, pi);
        end
      end
    code = '0; a_i = '0; a_im1 = '0;
    #1;
    checks++;
    if (pi != '0) begin
      failures++;
      $display("FAIL spacer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
