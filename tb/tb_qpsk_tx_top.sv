// tb_qpsk_tx_top: end-to-end test of the transmitter at its default size.
//
// Runs five 200-bit packets (500 symbols, 2000 output samples) from reset.
// Expected output, computed without the RTL: the reference packet stream is
// paired into bits (2j, 2j+1), mapped to Gray QPSK symbols, zero-stuffed by 4
// and convolved with the 41 RRC taps, then truncated to Q1.15. Start-up
// latency from the documented pipeline: 4 symbol periods in data generation,
// Delay1/Delay2 and Delay3 one each, the filter takes the first symbol on
// the sym_ce in cycle 24, its product and sum stages and the 4-stage output
// pipeline put phase 0 of symbol 0 on the outputs in cycle 31 (cycle 0 = the
// first cycle after reset). Every sample is compared bit-exactly, out_valid
// and out_sym_start are checked, and a receive RRC filter (real arithmetic,
// decimation by 4) recovers the symbols and measures the error vector
// magnitude, which must stay below 2 %.
// Mechanisms counted, each of which must occur: preamble bits, scrambled
// data bits changed by the scrambler, a wrap of the data table (packet 4
// repeats message 0), zero symbols from the input multiplexer before valid,
// and all four output phases. Watchdog 20000 cycles.
module tb_qpsk_tx_top;
  import qpsk_ref_pkg::*;
  localparam int NPKT    = 5;
  localparam int NSYM    = NPKT * PKT / 2;
  localparam int LATENCY = 31;
  localparam int NCYC    = LATENCY + 4 * NSYM;

  logic clk = 0, rst = 1;
  logic [15:0] out_i, out_q;
  logic out_valid, out_sym_start;
  int checks = 0, failures = 0;
  bit b[$], flag[$];
  int si[$], sq[$];
  real ri[$], rq[$];
  int n_pre, n_scr, n_zero, n_phase[4];
  int n_wrap = 0;

  qpsk_tx_top dut (.clk, .rst, .out_i, .out_q, .out_valid, .out_sym_start);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int conv(ref int x[$], input int m);
    longint acc;
    acc = 0;
    for (int j = 0; j < x.size(); j++) begin
      int t;
      t = m - 4 * j;
      if (t >= 0 && t < 41) acc += longint'(qpsk_tx_pkg::RRC_TAPS[t]) * longint'(x[j]);
    end
    return int'(acc >>> 15);
  endfunction

  // data table counter wrapping back to address 0 inside the DUT
  always @(posedge clk)
    if (!rst && dut.u_gen.u_source.ce && dut.u_gen.u_source.load_data &&
        dut.u_gen.u_source.addr_q == 10'(4 * DAT - 1))
      n_wrap++;

  initial begin
    real err2, ref2;
    build_stream(4, NPKT, b, flag);
    n_pre = 0; n_scr = 0; n_zero = 0;
    for (int n = 0; n < b.size(); n++) begin
      if (n % PKT < PRE) n_pre++;
      if (flag[n]) n_scr++;
    end
    for (int j = 0; j < NSYM; j++) begin
      int i, q;
      map_pair(b[2*j], b[2*j+1], i, q);
      si.push_back(i);
      sq.push_back(q);
    end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < NCYC; c++) begin
      int m, ei, eq;
      m = c - LATENCY;
      ei = (m < 0) ? 0 : conv(si, m);
      eq = (m < 0) ? 0 : conv(sq, m);
      checks++;
      if (int'($signed(out_i)) != ei || int'($signed(out_q)) != eq) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: got (%0d,%0d) expected (%0d,%0d)", c, $signed(out_i), $signed(out_q), ei, eq);
      end
      checks++;
      if (out_valid !== (m >= 0)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: out_valid %b", c, out_valid);
      end
      if (c >= 8) begin
        checks++;
        if (out_sym_start !== ((c - LATENCY) % 4 == 0)) failures++;
      end
      if (!out_valid) begin
        if (out_i == 0 && out_q == 0) n_zero++;
      end else begin
        n_phase[m % 4]++;
        ri.push_back(real'($signed(out_i)) / 32768.0);
        rq.push_back(real'($signed(out_q)) / 32768.0);
      end
      @(negedge clk);
    end

    // receive RRC filter and decimation: symbol j peaks at sample 4j + 40
    err2 = 0.0;
    ref2 = 0.0;
    for (int j = 10; 4 * j + 40 < ri.size(); j++) begin
      real zi, zq;
      zi = 0.0;
      zq = 0.0;
      for (int t = 0; t < 41; t++) begin
        zi += real'(qpsk_tx_pkg::RRC_TAPS[t]) / 32768.0 * ri[4*j + 40 - t];
        zq += real'(qpsk_tx_pkg::RRC_TAPS[t]) / 32768.0 * rq[4*j + 40 - t];
      end
      err2 += (zi - si[j] / 32768.0) ** 2 + (zq - sq[j] / 32768.0) ** 2;
      ref2 += (si[j] / 32768.0) ** 2 + (sq[j] / 32768.0) ** 2;
    end
    checks++;
    $display("EVM after receive filter: %0.3f %%", 100.0 * $sqrt(err2 / ref2));
    if ($sqrt(err2 / ref2) > 0.02) failures++;

    $display("preamble bits %0d, scrambled bits changed %0d, data table wraps %0d, zero samples before valid %0d, phases %0d/%0d/%0d/%0d",
             n_pre, n_scr, n_wrap, n_zero, n_phase[0], n_phase[1], n_phase[2], n_phase[3]);
    checks++; if (n_pre == 0)  failures++;
    checks++; if (n_scr == 0)  failures++;
    checks++; if (n_wrap == 0) failures++;
    checks++; if (n_zero == 0) failures++;
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_phase[p] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
