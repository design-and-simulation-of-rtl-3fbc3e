// qpsk_timing: clock enables for the three sample rates of the transmitter.
//
// The transmitter runs in one clock domain at the filter output rate. The
// source design is multirate (bits, symbols at half the bit rate, filter
// output at four times the symbol rate); here that is done with enables from
// a free-running 2-bit phase counter, which is this design's own choice:
//   bit_ce  - high every 2nd clock (phase 0 and 2): one packet bit per pulse
//   sym_ce  - high every 4th clock (phase 0): one QPSK symbol per pulse
// Both are high in the first clock after reset, so bit step 0 and symbol
// step 0 coincide. Synchronous active-high reset.
module qpsk_timing (
  input  logic clk,
  input  logic rst,
  output logic bit_ce,
  output logic sym_ce
);
  logic [1:0] phase_q;

  always_ff @(posedge clk) begin
    if (rst) phase_q <= 2'd0;
    else     phase_q <= phase_q + 2'd1;
  end

  always_comb begin
    bit_ce = ~phase_q[0];
    sym_ce = (phase_q == 2'd0);
  end
endmodule
