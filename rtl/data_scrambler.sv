// data_scrambler: self-synchronizing bit scrambler, polynomial 1 + z^-1 + z^-2 + z^-4.
//
// Follows the source design's structure: four registers p1..p4 hold the last
// four scrambled bits; the output is data_in xor p1 xor p2 xor p4 and is shifted
// into p1. The registers move only when en is high (the block is enabled only
// while data bits are being processed); the output is combinational from
// data_in. Reset to all zeros (synchronous, active high) is this design's
// choice; the state is kept from one packet to the next.
module data_scrambler (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic data_in,
  output logic scrambled_out
);
  logic [4:1] p_q;   // p_q[1] = p1 ... p_q[4] = p4

  always_comb scrambled_out = data_in ^ (p_q[1] ^ (p_q[2] ^ p_q[4]));

  always_ff @(posedge clk) begin
    if (rst)     p_q <= '0;
    else if (en) p_q <= {p_q[3:1], scrambled_out};
  end
endmodule
