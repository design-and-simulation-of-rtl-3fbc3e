// tb_rrc_interp_filter: checks rrc_interp_filter against a direct convolution.
//
// 1) The 41 fixed taps are compared with the closed-form root-raised-cosine
//    response (roll-off 0.5, 4 samples/symbol) scaled to unit energy: each
//    within 1 LSB of Q1.15.
// 2) Random full-range I/Q symbols enter on in_ce (every 4 clocks). The
//    expected output is the zero-stuffed symbol sequence convolved with the
//    taps, y[m] = sum_j h[m - 4j] x[j], truncated to Q1.15 - a different
//    arrangement of the sum from the filter's polyphase one. With in_ce high
//    in cycle c the phase-p sample must appear in cycle c+3+p, and phase0
//    must mark phase 0. 300 symbols; watchdog 5000 cycles.
module tb_rrc_interp_filter;
  import qpsk_tx_pkg::*;
  import qpsk_ref_pkg::*;
  logic clk = 0, rst = 1, in_ce = 0;
  iq_t  sym_in = '0, y_out;
  logic phase0;
  int checks = 0, failures = 0;
  int xi[$], xq[$];

  rrc_interp_filter dut (.clk, .rst, .in_ce, .sym_in, .y_out, .phase0);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_y(ref int x[$], input int m);
    longint acc;
    acc = 0;
    for (int j = 0; j < x.size(); j++) begin
      int t;
      t = m - 4 * j;
      if (t >= 0 && t < NTAPS) acc += longint'(RRC_TAPS[t]) * longint'(x[j]);
    end
    return int'(acc >>> 15);
  endfunction

  initial begin
    real e, h[41];
    int  c0;
    // 1) tap values
    e = 0.0;
    for (int n = 0; n < 41; n++) begin
      h[n] = rrc_raw(n);
      e += h[n] * h[n];
    end
    for (int n = 0; n < 41; n++) begin
      real want;
      want = h[n] / $sqrt(e) * 32768.0;
      checks++;
      if ((real'(RRC_TAPS[n]) - want) > 1.0 || (want - real'(RRC_TAPS[n])) > 1.0) begin
        failures++;
        $display("tap %0d = %0d, closed form %f", n, RRC_TAPS[n], want);
      end
    end
    // 2) filtering; cycle 0 is the first cycle after reset, in_ce in cycles 4j
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < 300 * 4 + 60; c++) begin
      in_ce = (c % 4 == 0);
      if (in_ce) begin
        xi.push_back((c < 1200) ? $urandom_range(0, 65535) - 32768 : 0);
        xq.push_back((c < 1200) ? $urandom_range(0, 65535) - 32768 : 0);
        sym_in.i = 16'(xi[$]);
        sym_in.q = 16'(xq[$]);
      end
      // output in cycle c belongs to sample m = c - 3
      if (c >= 3) begin
        int m;
        m = c - 3;
        checks++;
        if (int'(y_out.i) != expect_y(xi, m) || int'(y_out.q) != expect_y(xq, m) ||
            phase0 !== (m % 4 == 0)) begin
          failures++;
          if (failures < 10)
            $display("sample %0d: got (%0d,%0d,%b) expected (%0d,%0d,%b)", m, y_out.i, y_out.q,
                     phase0, expect_y(xi, m), expect_y(xq, m), m % 4 == 0);
        end
      end
      @(negedge clk);
    end
    c0 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
