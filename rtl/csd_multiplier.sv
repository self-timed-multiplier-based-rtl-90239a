// csd_multiplier: self-timed signed N x M multiplier built on radix-4
// canonical signed-digit (CSD) recoding.
//
// The multiplier b (N bits, two's complement, N even) is recoded into K =
// N/2 digits D_J in {0, +-1, +-2} by a chain of csd_recoder stages whose
// carry ripples upward. The recoding makes a third of the digits zero on
// average (a quarter with ordinary radix-4 Booth recoding). Each digit
// drives one row of a carry-save array that adds D_J * a * 4^J:
//   row 0     PI cells select the bits of D_0 * a; they form the first sum
//             vector (nothing to add yet);
//   row 1     PHA cells (selector + half adder), except the top three
//             weights, which are PFA cells because they receive constants
//             or must forward a carry;
//   rows >= 2 PFA cells (selector + full adder).
// Every row selects M+1 bits (bit i from a_i and a_(i-1), with a_M = a_(M-1)
// and a_(-1) = 0), puts the complemented sign from its PS cell one bit
// higher, and has an AD cell that adds the +1 of a negation at the row's
// LSB. When D_J = 0 the row's adders turn into pass cells: the sum and carry
// vectors go through unchanged (and faster) and the AD cell forwards the
// carry at the row's LSB weight. The two lowest sum bits of each row, the AD
// bits and the carry of each row's lowest cell are final weights and go
// straight to the last stage, a ripple-carry adder with completion
// detection (rca_completion) that raises done.
//
// Sign handling follows the "sign generate" idea: instead of sign-extending
// each row, row J carries not(S_J) at weight 2J+M+1 and the constant
//   sum_J -2^(2J+M+1) mod 2^(N+M) = 2^(M+1) + sum_(J<K-1) 2^(2J+M+2)
// is fed in as constant 1 inputs: at weight M+1 as a carry into row 1 and at
// weight 2J+M as the sum input of the top cell of each row J >= 1. This
// placement is this design's own; it uses inputs that are otherwise empty.
//
// Signalling: all internal data are dual rail (csd_pkg). Raise r with a and
// b stable: the inputs are encoded as dual rail and the array evaluates.
// done rises when every product bit is valid; p is then a * b (N+M bits,
// two's complement). Hold a and b until done. Lower r to precharge: one tick
// later every rail and done are low, ready for the next operation.
// null_rows shows which rows got a zero digit (valid once those digits are
// known), for observation only.
//
// Timing model (a choice of this design, the circuit itself is
// asynchronous): every gate output passes a dr_delay clocked by clk. The
// recoders, selectors, PS, AD and each bit of the final adder take
// GATE_TICKS; an adder cell takes FA_TICKS, or PASS_TICKS in pass mode. The
// default 3:2 ratio follows the reported full-adder sum delays in normal and
// pass mode (about 0.46 ns against 0.31 ns). The number of ticks from r to
// done therefore varies with the operands. All tick counts 0 gives a purely
// combinational multiplier with a combinational done.
module csd_multiplier
  import csd_pkg::*;
#(
  parameter int unsigned N          = 16,  // multiplier (b) width, even, >= 4
  parameter int unsigned M          = 16,  // multiplicand (a) width, >= 2
  parameter int unsigned GATE_TICKS = 1,
  parameter int unsigned FA_TICKS   = 3,
  parameter int unsigned PASS_TICKS = 2
) (
  input  logic             clk,        // time base of the delay model
  input  logic             r,          // request: 1 evaluate, 0 precharge
  input  logic [M-1:0]     a,          // multiplicand, two's complement
  input  logic [N-1:0]     b,          // multiplier, two's complement
  output logic [N+M-1:0]   p,          // product, valid while done = 1
  output logic             done,       // completion
  output logic [N/2-1:0]   null_rows   // N_J of each row
);
  localparam int unsigned K = N / 2;
  localparam int unsigned P = N + M;
  localparam int unsigned V = P + 2;   // vector length with headroom

  // ---------------------------------------------------------------- inputs
  dr_t zero_c, one_c;
  dr_t ad [M+2];  // ad[i+1] = A_i, i = -1 .. M
  dr_t bd [N+1];  // bd[i]   = B_i, i = 0 .. N (B_N = B_(N-1))

  assign zero_c = '{t: 1'b0, f: r};
  assign one_c  = '{t: r,    f: 1'b0};

  for (genvar i = 0; i < M + 2; i++) begin : g_a
    if (i == 0) begin : g_lo
      assign ad[i] = zero_c;
    end else if (i == M + 1) begin : g_ext
      assign ad[i] = dr_enc(r, a[M-1]);
    end else begin : g_bit
      assign ad[i] = dr_enc(r, a[i-1]);
    end
  end

  for (genvar i = 0; i <= N; i++) begin : g_b
    assign bd[i] = dr_enc(r, b[(i < N) ? i : N - 1]);
  end

  // -------------------------------------------------------------- recoders
  csd_code_t code [K];  // delayed digit codes
  dr_t       rco  [K];  // delayed recoder carries

  for (genvar j = 0; j < K; j++) begin : g_rec
    csd_code_t code_c;
    dr_t       co_c;
    dr_t       ci;

    assign ci = (j == 0) ? zero_c : rco[(j > 0) ? j - 1 : 0];

    csd_recoder u_rec (
      .b_hi (bd[2*j+2]),
      .b_mid(bd[2*j+1]),
      .b_lo (bd[2*j]),
      .ci   (ci),
      .code (code_c),
      .co   (co_c)
    );

    dr_delay #(.W(5), .LONG(GATE_TICKS), .SHORT(GATE_TICKS)) u_dcode (
      .clk(clk), .r(r), .fast(1'b0), .d(code_c), .q(code[j]));
    dr_delay #(.W(2), .LONG(GATE_TICKS), .SHORT(GATE_TICKS)) u_dco (
      .clk(clk), .r(r), .fast(1'b0), .d(co_c), .q(rco[j]));

    assign null_rows[j] = code[j].n;

    // The digit code is 5-out-of-1: never more than one wire high (checked
    // while r is high, after a precharge has cleared the delay stages).
    assert property (@(posedge clk) disable iff (!r) $onehot0(code[j]))
      else $error("csd_multiplier: digit %0d code is not 5-out-of-1", j);
  end

  // ----------------------------------------------------- carry-save array
  // sv[j][w] / cv[j][w]: sum / carry vector of weight w leaving row j.
  // sin[j][w] / cin[j][w]: sum / carry vector entering row j.
  dr_t sv  [K][V];
  dr_t cv  [K][V];
  dr_t sin [K][V];
  dr_t cin [K][V];
  dr_t adb [K];     // AD cell outputs (weight 2j)

  for (genvar j = 0; j < K; j++) begin : g_row
    // Inputs of the row.
    for (genvar w = 0; w < V; w++) begin : g_in
      if (j == 0) begin : g_first
        assign sin[j][w] = zero_c;
        assign cin[j][w] = zero_c;
      end else begin : g_next
        if (w == 2*j + M) begin : g_const_s
          assign sin[j][w] = one_c;
        end else begin : g_prev_s
          assign sin[j][w] = sv[(j > 0) ? j - 1 : 0][w];
        end
        if (j == 1 && w == M + 1) begin : g_const_c
          assign cin[j][w] = one_c;
        end else begin : g_prev_c
          assign cin[j][w] = cv[(j > 0) ? j - 1 : 0][w];
        end
      end
    end

    // Cells of the row.
    for (genvar w = 0; w < V; w++) begin : g_w
      if (w >= 2*j && w <= 2*j + M) begin : g_cell
        localparam int unsigned I = w - 2*j;  // bit of D_j * a
        dr_t so_c, co_c;

        if (j == 0) begin : g_pi
          pi_cell u_pi (.code(code[j]), .a_i(ad[I+1]), .a_im1(ad[I]), .pi(so_c));
          assign co_c = zero_c;
        end else if (j == 1 && w < M) begin : g_pha
          pha_cell u_pha (.code(code[j]), .a_i(ad[I+1]), .a_im1(ad[I]),
                          .si(sin[j][w]), .so(so_c), .co(co_c));
        end else begin : g_pfa
          pfa_cell u_pfa (.code(code[j]), .a_i(ad[I+1]), .a_im1(ad[I]),
                          .si(sin[j][w]), .ci(cin[j][w]), .ci_pass(cin[j][w+1]),
                          .so(so_c), .co(co_c));
        end

        if (j == 0) begin : g_dpi
          dr_delay #(.W(2), .LONG(GATE_TICKS), .SHORT(GATE_TICKS)) u_ds (
            .clk(clk), .r(r), .fast(1'b0), .d(so_c), .q(sv[j][w]));
        end else begin : g_dadd
          dr_delay #(.W(2), .LONG(FA_TICKS), .SHORT(PASS_TICKS)) u_ds (
            .clk(clk), .r(r), .fast(code[j].n), .d(so_c), .q(sv[j][w]));
        end
        if (j == 0) begin : g_nc
          assign cv[j][w+1] = co_c;  // row 0 makes no carries
        end else begin : g_dc
          dr_delay #(.W(2), .LONG(FA_TICKS), .SHORT(PASS_TICKS)) u_dc (
            .clk(clk), .r(r), .fast(code[j].n), .d(co_c), .q(cv[j][w+1]));
        end
      end else if (w == 2*j + M + 1) begin : g_ps
        dr_t ps_c;
        ps_cell u_ps (.code(code[j]), .a_sign(ad[M]), .ps(ps_c));
        dr_delay #(.W(2), .LONG(GATE_TICKS), .SHORT(GATE_TICKS)) u_dps (
          .clk(clk), .r(r), .fast(1'b0), .d(ps_c), .q(sv[j][w]));
      end else begin : g_none
        assign sv[j][w] = zero_c;
      end
      // Carry slots no cell of this row drives.
      if (w < 2*j + 1 || w > 2*j + M + 1) begin : g_cnone
        assign cv[j][w] = zero_c;
      end
    end

    // AD cell at the row's LSB weight.
    begin : g_ad
      dr_t ad_c;
      ad_cell u_ad (.code(code[j]), .ci(cin[j][2*j]), .ad(ad_c));
      dr_delay #(.W(2), .LONG(GATE_TICKS), .SHORT(GATE_TICKS)) u_dad (
        .clk(clk), .r(r), .fast(1'b0), .d(ad_c), .q(adb[j]));
    end
  end

  // ---------------------------------------------------------- final adder
  dr_t fx [P];
  dr_t fy [P];
  dr_t fs [P];

  for (genvar w = 0; w < P; w++) begin : g_fin
    localparam int unsigned JR = (w / 2 < K - 1) ? w / 2 : K - 1;  // row owning weight w
    assign fx[w] = sv[JR][w];
    if (w % 2 == 0 && w / 2 <= K - 1) begin : g_y_ad
      assign fy[w] = adb[w/2];
    end else if (w / 2 < K - 1) begin : g_y_low
      assign fy[w] = cv[w/2][w];  // carry of row w/2's lowest cell
    end else begin : g_y_last
      assign fy[w] = cv[K-1][w];
    end
  end

  rca_completion #(.P(P), .TICKS(GATE_TICKS)) u_rca (
    .clk(clk), .r(r), .x(fx), .y(fy), .s(fs), .done(done));

  for (genvar w = 0; w < P; w++) begin : g_p
    assign p[w] = fs[w].t;
  end

endmodule
