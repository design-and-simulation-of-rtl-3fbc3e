// rrc_interp_filter: root-raised-cosine FIR interpolator, up-sampling by 4.
//
// Polyphase form: a symbol enters an 11-deep delay line on every in_ce (one in
// four clocks), and each clock one output sample is computed for the current
// phase p = 0..3 counted from the last in_ce:
//   y[4n+p] = sum_{k=0..10} h[4k+p] * x[n-k]      (h[m] = 0 for m >= 41)
// which is the same as zero-stuffing the symbols by 4 and convolving with the
// 41-tap RRC response. I and Q are filtered independently with the same taps.
// Two pipeline stages keep the combinational depth short: the 11 products of
// each rail are registered, then their sum is registered. The sum keeps full
// precision and is truncated (floor) to Q1.15; with unit-energy taps and
// QPSK input the output stays below 0.52 in magnitude, so it cannot
// overflow.
//
// Up-sampling by 4 with an RRC response follows the source design; roll-off
// 0.5, span 10 symbols, tap format and the pipeline depth are this design's.
//
// Timing: in_ce must be high once every INTERP clocks. If in_ce is high in
// clock cycle c, sym_in is taken at the end of that cycle and the sample of
// phase p is on y_out in cycle c+3+p (phase0 is high with phase 0). One sample
// per clock. Synchronous reset clears the delay line and sets the phase so
// that the first in_ce is expected in the first cycle after reset; an
// assertion checks that in_ce then comes every INTERP clocks.
module rrc_interp_filter
  import qpsk_tx_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_ce,
  input  iq_t  sym_in,
  output iq_t  y_out,
  output logic phase0
);
  localparam int unsigned K     = TAPS_PER_PH;
  localparam int unsigned PROD_W = SAMPLE_W + COEF_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(K);

  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  iq_t        x_q [K];        // symbol delay line, x_q[0] newest
  logic [1:0] ph_q;           // phase of the current output sample
  prod_t      pi_q [K];       // registered products, I rail
  prod_t      pq_q [K];       // registered products, Q rail
  logic       ph0_d1_q, ph0_d2_q;
  acc_t       acc_i_q, acc_q_q;
  coef_t      c [K];

  // Coefficient of tap k for the current phase.
  always_comb begin
    for (int k = 0; k < K; k++) begin
      if (INTERP * k + int'(ph_q) < NTAPS)
        c[k] = RRC_TAPS[INTERP * k + int'(ph_q)];
      else
        c[k] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < K; k++) x_q[k] <= '0;
      ph_q <= 2'(INTERP - 1);
    end else if (in_ce) begin
      x_q[0] <= sym_in;
      for (int k = 1; k < K; k++) x_q[k] <= x_q[k-1];
      ph_q <= '0;
    end else begin
      ph_q <= ph_q + 2'd1;
    end
  end

  // A new symbol is taken exactly once every INTERP clocks.
  a_in_ce_period: assert property (@(posedge clk) disable iff (rst)
                                   in_ce == (ph_q == 2'(INTERP - 1)))
    else $error("in_ce not once every %0d clocks", INTERP);

  // Stage 1: products.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < K; k++) begin
        pi_q[k] <= '0;
        pq_q[k] <= '0;
      end
      ph0_d1_q <= 1'b0;
    end else begin
      for (int k = 0; k < K; k++) begin
        pi_q[k] <= x_q[k].i * c[k];
        pq_q[k] <= x_q[k].q * c[k];
      end
      ph0_d1_q <= (ph_q == 2'd0);
    end
  end

  // Stage 2: sums.
  always_ff @(posedge clk) begin
    acc_t si, sq;
    if (rst) begin
      acc_i_q  <= '0;
      acc_q_q  <= '0;
      ph0_d2_q <= 1'b0;
    end else begin
      si = '0;
      sq = '0;
      for (int k = 0; k < K; k++) begin
        si = si + ACC_W'(pi_q[k]);
        sq = sq + ACC_W'(pq_q[k]);
      end
      acc_i_q  <= si;
      acc_q_q  <= sq;
      ph0_d2_q <= ph0_d1_q;
    end
  end

  always_comb begin
    y_out.i = sample_t'(acc_i_q >>> COEF_FRAC);
    y_out.q = sample_t'(acc_q_q >>> COEF_FRAC);
    phase0  = ph0_d2_q;
  end
endmodule
