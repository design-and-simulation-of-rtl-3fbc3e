// data_source: produces the serial packet bit stream from two lookup tables.
//
// Structure of the source design: the preamble table is addressed by the
// packetizer FSM; the data table is addressed by a counter that advances on
// each bit period with load_data high, so consecutive packets carry
// consecutive stretches of the data table. Data bits go through the data
// scrambler, which is enabled only for data bits. A multiplexer chooses the
// preamble bit while load_data is low and the scrambled data bit while it is
// high. Every path is registered so that all three reach the multiplexer two
// bit periods after the FSM output that caused them:
//   preamble table -> 2 registers
//   not(load_data)  -> 2 registers (multiplexer select)
//   counter -> data table -> 1 register -> scrambler -> 1 register
//   load_data -> 1 register (scrambler enable)
// The data table holds NUM_MSG packets of DATA_LEN bits and is padded with
// zeros to a power-of-two depth; the counter wraps after the last packet, so
// the padding is never sent. Table contents: see qpsk_tx_pkg (own choice).
//
// All registers advance only when ce is high (bit rate). Latency: 2 bit
// periods from load_data/preamble_addr to packet_bit. Synchronous reset.
module data_source
  import qpsk_tx_pkg::*;
#(
  parameter int unsigned NUM_MSG = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       load_data,
  input  logic [4:0] preamble_addr,
  output logic       packet_bit
);
  localparam int unsigned NBITS = NUM_MSG * DATA_LEN;
  localparam int unsigned AW    = (NBITS > 1) ? $clog2(NBITS) : 1;
  localparam int unsigned DEPTH = 1 << AW;

  typedef logic [DEPTH-1:0] data_rom_t;
  typedef logic [31:0]      pre_rom_t;

  function automatic data_rom_t build_data_rom();
    data_rom_t r = '0;
    for (int unsigned a = 0; a < NBITS; a++)
      r[a] = data_bit(a / DATA_LEN, a % DATA_LEN);
    return r;
  endfunction

  function automatic pre_rom_t build_pre_rom();
    pre_rom_t r = '0;
    for (int unsigned a = 0; a < PREAMBLE_LEN; a++)
      r[a] = preamble_bit(a);
    return r;
  endfunction

  localparam data_rom_t DATA_ROM = build_data_rom();
  localparam pre_rom_t  PRE_ROM  = build_pre_rom();

  logic [AW-1:0] addr_q;        // data table counter
  logic [1:0]    pre_pipe_q;    // preamble bit, 2 stages
  logic [1:0]    sel_pipe_q;    // not(load_data), 2 stages
  logic          load_d1_q;     // scrambler enable
  logic          data_d1_q;     // data bit after the table
  logic          scr_d1_q;      // scrambled bit
  logic          scr_bit;

  data_scrambler u_scrambler (
    .clk          (clk),
    .rst          (rst),
    .en           (ce & load_d1_q),
    .data_in      (data_d1_q),
    .scrambled_out(scr_bit)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_q     <= '0;
      pre_pipe_q <= '0;
      sel_pipe_q <= '0;
      load_d1_q  <= 1'b0;
      data_d1_q  <= 1'b0;
      scr_d1_q   <= 1'b0;
    end else if (ce) begin
      if (load_data)
        addr_q <= (addr_q == AW'(NBITS - 1)) ? '0 : addr_q + 1'b1;
      pre_pipe_q <= {pre_pipe_q[0], PRE_ROM[preamble_addr]};
      sel_pipe_q <= {sel_pipe_q[0], ~load_data};
      load_d1_q  <= load_data;
      data_d1_q  <= DATA_ROM[addr_q];
      scr_d1_q   <= scr_bit;
    end
  end

  // Preamble Data Mux: select 1 = preamble, 0 = scrambled data.
  always_comb packet_bit = sel_pipe_q[1] ? pre_pipe_q[1] : scr_d1_q;
endmodule
