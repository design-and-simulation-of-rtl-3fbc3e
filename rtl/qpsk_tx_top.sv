// qpsk_tx_top: complete QPSK baseband transmitter.
//
// Chain: data generation and packetization (200-bit packets of 26 preamble
// and 174 scrambled data bits, paired into 2-bit symbols) -> Delay1/Delay2 ->
// QPSK symbol mapping -> input multiplexer (zero symbol until valid) ->
// Delay3 -> RRC interpolation filter (x4) -> a 4-stage output pipeline. The
// block chain, the valid-controlled multiplexer and the pipeline registers
// follow the source design.
//
// Clocking (this design's choice): one clock at the output sample rate.
// Bits advance every 2 clocks, symbols every 4 clocks, under enables from
// qpsk_timing; Delay1, Delay2 and Delay3 are symbol-rate registers, the output
// pipeline runs every clock.
//
// Interface: out_i/out_q are signed Q1.15 samples, one per clock. out_valid
// is high once the filter holds symbols from valid data (it stays high after
// start-up); out_sym_start marks phase 0 of each symbol period, which a
// receiver can use to choose its decimation phase. Synchronous active-high
// reset. Latency, counting cycle 0 as the first cycle after reset: the symbol
// holding bits 0 and 1 of the first packet enters the filter on the sym_ce of
// cycle 24, and its phase-0 sample is on the outputs in cycle 31, when
// out_valid rises. One output sample per clock after that.
module qpsk_tx_top
  import qpsk_tx_pkg::*;
#(
  parameter int unsigned NUM_MSG  = 4,   // packets stored in the data table
  parameter int unsigned OUT_PIPE = 4    // output pipeline register stages
) (
  input  logic           clk,
  input  logic           rst,
  output logic [15:0]    out_i,
  output logic [15:0]    out_q,
  output logic           out_valid,
  output logic           out_sym_start
);
  logic       bit_ce, sym_ce;
  logic       gen_valid;
  logic [1:0] gen_pair;
  logic       d1_valid_q;      // Delay1
  logic [1:0] d2_pair_q;       // Delay2
  logic       map_valid;
  iq_t        map_sym;
  iq_t        mux_sym;
  iq_t        d3_sym_q;        // Delay3
  logic       d3_valid_q;
  iq_t        filt_out;
  logic       filt_ph0;
  logic       fvalid_q;        // valid of the newest symbol in the filter
  logic [1:0] fvalid_d_q;      // aligned with the filter pipeline
  iq_t        opipe_q  [OUT_PIPE];   // Pipeline Register 3
  logic       ovalid_q [OUT_PIPE];
  logic       oph0_q   [OUT_PIPE];

  qpsk_timing u_timing (
    .clk   (clk),
    .rst   (rst),
    .bit_ce(bit_ce),
    .sym_ce(sym_ce)
  );

  data_gen #(.NUM_MSG(NUM_MSG)) u_gen (
    .clk      (clk),
    .rst      (rst),
    .bit_ce   (bit_ce),
    .sym_ce   (sym_ce),
    .valid_out(gen_valid),
    .bit_pair (gen_pair)
  );

  symbol_mapper u_map (
    .valid_in (d1_valid_q),
    .bit_pair (d2_pair_q),
    .valid_out(map_valid),
    .sym      (map_sym)
  );

  // Input Mux: 0 -> zero symbol, 1 -> QPSK symbol.
  always_comb mux_sym = map_valid ? map_sym : '0;

  rrc_interp_filter u_filter (
    .clk   (clk),
    .rst   (rst),
    .in_ce (sym_ce),
    .sym_in(d3_sym_q),
    .y_out (filt_out),
    .phase0(filt_ph0)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      d1_valid_q <= 1'b0;
      d2_pair_q  <= '0;
      d3_sym_q   <= '0;
      d3_valid_q <= 1'b0;
      fvalid_q   <= 1'b0;
    end else if (sym_ce) begin
      d1_valid_q <= gen_valid;
      d2_pair_q  <= gen_pair;
      d3_sym_q   <= mux_sym;
      d3_valid_q <= map_valid;
      fvalid_q   <= d3_valid_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fvalid_d_q <= '0;
      for (int s = 0; s < OUT_PIPE; s++) begin
        opipe_q[s]  <= '0;
        ovalid_q[s] <= 1'b0;
        oph0_q[s]   <= 1'b0;
      end
    end else begin
      fvalid_d_q  <= {fvalid_d_q[0], fvalid_q};
      opipe_q[0]  <= filt_out;
      ovalid_q[0] <= fvalid_d_q[1];
      oph0_q[0]   <= filt_ph0;
      for (int s = 1; s < OUT_PIPE; s++) begin
        opipe_q[s]  <= opipe_q[s-1];
        ovalid_q[s] <= ovalid_q[s-1];
        oph0_q[s]   <= oph0_q[s-1];
      end
    end
  end

  always_comb begin
    out_i         = opipe_q[OUT_PIPE-1].i;
    out_q         = opipe_q[OUT_PIPE-1].q;
    out_valid     = ovalid_q[OUT_PIPE-1];
    out_sym_start = oph0_q[OUT_PIPE-1];
  end
endmodule
