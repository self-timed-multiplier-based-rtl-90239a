// tb_rca_completion: test of the final adder with completion detection at
// P = 8 bits, one tick per stage.
//
// Every pair of 8-bit operands is added once through a full precharge /
// evaluate cycle: the sum must be x + y mod 256 when done rises, done must
// be low one tick after r falls, and the time to done must be the longest
// run of carry-propagating bits plus a fixed overhead: 3 ticks for 0 + 0,
// P + 2 ticks for 1 + 255.
module tb_rca_completion;
  import csd_pkg::*;

  localparam int P = 8;

  logic clk = 1'b0;
  logic r;
  dr_t x [P];
  dr_t y [P];
  dr_t s [P];
  logic done;
  int checks = 0, failures = 0;

  rca_completion #(.P(P), .TICKS(1)) dut (.clk(clk), .r(r), .x(x), .y(y), .s(s), .done(done));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected ticks from r to done. The carry into bit i+1 is ready one tick
  // after the carry into bit i if bit i propagates, else one tick after r;
  // sum bit i one tick after its carry in; done one tick after the last sum.
  function automatic int expected_ticks(input logic [P-1:0] xv, input logic [P-1:0] yv);
    int tc = 0, last = 0;
    for (int i = 0; i < P; i++) begin
      if (tc + 1 > last) last = tc + 1;
      tc = (xv[i] ^ yv[i]) ? tc + 1 : 1;
    end
    return last + 1;
  endfunction

  initial begin
    r = 1'b0;
    for (int i = 0; i < P; i++) begin
      x[i] = '0;
      y[i] = '0;
    end
    repeat (2) @(negedge clk);
    for (int v = 0; v < 65536; v++) begin
      automatic logic [P-1:0] xv = v[15:8], yv = v[7:0];
      logic [P-1:0] sv;
      automatic int ticks = 0;
      r = 1'b0;
      @(negedge clk);
      checks++;
      if (done) begin
        failures++;
        $display("FAIL done high during precharge");
      end
      for (int i = 0; i < P; i++) begin
        x[i] = dr_enc(1'b1, xv[i]);
        y[i] = dr_enc(1'b1, yv[i]);
      end
      r = 1'b1;
      while (!done && ticks < 4 * P) begin
        @(negedge clk);
        ticks++;
      end
      for (int i = 0; i < P; i++) sv[i] = s[i].t;
      checks++;
      if (!done || sv != xv + yv) begin
        failures++;
        $display("FAIL %0d + %0d: got %0d done=%b", xv, yv, sv, done);
      end
      checks++;
      if (ticks != expected_ticks(xv, yv)) begin
        failures++;
        $display("FAIL time %0d + %0d: %0d ticks, expected %0d", xv, yv, ticks,
                 expected_ticks(xv, yv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
