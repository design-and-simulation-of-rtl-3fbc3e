// symbol_mapper: QPSK modulator, 2-bit integer to complex symbol.
//
// Maps the integer 0..3 on the unit circle with a pi/4 phase offset and Gray
// ordering: 0 -> (+a,+a), 1 -> (-a,+a), 3 -> (-a,-a), 2 -> (+a,-a), with
// a = 1/sqrt(2) in Q1.15. Bit 0 thus sets the sign of I and bit 1 the sign of
// Q, so neighbouring points differ in one bit. The source design names the
// function and the 0..3 input; the Gray/pi-4 choice and the word format are
// this design's. valid_in passes straight to valid_out. Purely combinational.
module symbol_mapper
  import qpsk_tx_pkg::*;
(
  input  logic       valid_in,
  input  logic [1:0] bit_pair,
  output logic       valid_out,
  output iq_t        sym
);
  always_comb begin
    valid_out = valid_in;
    sym.i     = bit_pair[0] ? -QPSK_AMP : QPSK_AMP;
    sym.q     = bit_pair[1] ? -QPSK_AMP : QPSK_AMP;
  end
endmodule
