// bit_pairing: groups the serial bit stream into 2-bit symbols.
//
// Two down-samplers by 2 take the two phases of the serial stream, each is
// followed by one delay, and the two bits are concatenated: H is the second
// bit of each pair and L the first, as the source design describes it.
// Here the down-samplers are registers loaded on sym_ce (every second
// bit_ce): at that moment serial_in holds the second bit of the pair and a
// one-bit history register, loaded on every bit_ce, holds the first. The
// delays then move the pair to bit_pair on the next sym_ce.
//
// Timing: bits 2k and 2k+1 present on serial_in in the bit periods ending at
// a sym_ce appear on bit_pair = {bit 2k+1, bit 2k} after the following
// sym_ce. sym_ce must coincide with bit_ce (an assertion checks it). Synchronous reset to zero.
module bit_pairing (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_ce,
  input  logic       sym_ce,
  input  logic       serial_in,
  output logic [1:0] bit_pair
);
  logic prev_q;           // previous serial bit
  logic ds_h_q, ds_l_q;   // down-sampler outputs
  logic dl_h_q, dl_l_q;   // Delay2 (H) and Delay1 (L)

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_q <= 1'b0;
      ds_h_q <= 1'b0;
      ds_l_q <= 1'b0;
      dl_h_q <= 1'b0;
      dl_l_q <= 1'b0;
    end else begin
      if (bit_ce) prev_q <= serial_in;
      if (sym_ce) begin
        ds_h_q <= serial_in;
        ds_l_q <= prev_q;
        dl_h_q <= ds_h_q;
        dl_l_q <= ds_l_q;
      end
    end
  end

  always_comb bit_pair = {dl_h_q, dl_l_q};

  // The symbol enable is a subset of the bit enable.
  a_sym_in_bit: assert property (@(posedge clk) disable iff (rst) sym_ce |-> bit_ce)
    else $error("sym_ce without bit_ce");
endmodule
