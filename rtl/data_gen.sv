// data_gen: data generation and packetization.
//
// The packetizer FSM frames each 200-bit packet (26 preamble bits, 174
// scrambled data bits), the data source turns its outputs into a serial bit
// stream, one pipeline register (Pipeline2) follows, and the bit pairing
// block packs the stream into 2-bit symbols. A parallel valid path - a
// constant 1 through two plus one bit-rate registers, a symbol-rate
// down-sampling register and one more symbol-rate register - rises exactly on
// the symbol that carries bits 0 and 1 of the first packet, so valid_out marks
// the end of the fixed start-up latency. This chain of registers follows the
// source design; their exact alignment is this design's.
//
// Timing: bit_ce every bit period, sym_ce every second bit_ce (coinciding
// with one), both high in the first cycle after reset. valid_out rises after
// the 4th sym_ce edge from reset, together with the pair {bit 1, bit 0} of the
// first packet; from then on a new pair {bit 2j+1, bit 2j} follows on every
// sym_ce, without gaps, packet after packet.
module data_gen
  import qpsk_tx_pkg::*;
#(
  parameter int unsigned NUM_MSG = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_ce,
  input  logic       sym_ce,
  output logic       valid_out,
  output logic [1:0] bit_pair
);
  logic       load_data;
  logic [4:0] preamble_addr;
  logic       packet_bit;
  logic       packet_d_q;   // Pipeline2
  logic [2:0] vpipe_q;      // Pipeline (2) and Pipeline1 (1) on the valid path
  logic       vds_q;        // down-sample by 2
  logic       vout_q;       // Pipeline3

  packetizer_fsm u_fsm (
    .clk          (clk),
    .rst          (rst),
    .ce           (bit_ce),
    .load_data    (load_data),
    .preamble_addr(preamble_addr)
  );

  data_source #(.NUM_MSG(NUM_MSG)) u_source (
    .clk          (clk),
    .rst          (rst),
    .ce           (bit_ce),
    .load_data    (load_data),
    .preamble_addr(preamble_addr),
    .packet_bit   (packet_bit)
  );

  bit_pairing u_pairing (
    .clk      (clk),
    .rst      (rst),
    .bit_ce   (bit_ce),
    .sym_ce   (sym_ce),
    .serial_in(packet_d_q),
    .bit_pair (bit_pair)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      packet_d_q <= 1'b0;
      vpipe_q    <= '0;
      vds_q      <= 1'b0;
      vout_q     <= 1'b0;
    end else begin
      if (bit_ce) begin
        packet_d_q <= packet_bit;
        vpipe_q    <= {vpipe_q[1:0], 1'b1};
      end
      if (sym_ce) begin
        vds_q  <= vpipe_q[2];
        vout_q <= vds_q;
      end
    end
  end

  always_comb valid_out = vout_q;
endmodule
