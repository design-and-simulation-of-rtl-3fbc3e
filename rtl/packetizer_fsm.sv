// packetizer_fsm: Moore state machine that frames the packet.
//
// One packet is PREAMBLE_LEN + DATA_LEN bit periods. The machine has the three
// states of the source design: INIT puts out preamble address 0, PREAMBLE
// counts the address from 1 up to PREAMBLE_LEN-1, and APPEND_DATA raises
// load_data for DATA_LEN bit periods, after which the cycle repeats. The
// outputs depend only on the registers (Moore). The machine advances only on
// clock cycles with ce high (one bit period each).
//
// Interface: load_data is high while data bits are sent; preamble_addr
// addresses the preamble table while it is low. Reset (synchronous, active
// high, this design's choice) enters INIT.
module packetizer_fsm
  import qpsk_tx_pkg::*;
#(
  parameter int unsigned PRE_LEN = PREAMBLE_LEN,
  parameter int unsigned DAT_LEN = DATA_LEN
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  output logic       load_data,
  output logic [4:0] preamble_addr
);
  typedef enum logic [1:0] {INIT, PREAMBLE, APPEND_DATA} state_t;

  state_t     state_q;
  logic [4:0] addr_q;   // preamble address
  logic [7:0] cnt_q;    // data bit count

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= INIT;
      addr_q  <= '0;
      cnt_q   <= '0;
    end else if (ce) begin
      unique case (state_q)
        INIT: begin
          state_q <= PREAMBLE;
          addr_q  <= 5'd1;
        end
        PREAMBLE: begin
          if (addr_q == 5'(PRE_LEN - 1)) begin
            state_q <= APPEND_DATA;
            cnt_q   <= '0;
          end else begin
            addr_q <= addr_q + 5'd1;
          end
        end
        APPEND_DATA: begin
          if (cnt_q == 8'(DAT_LEN - 1)) begin
            state_q <= INIT;
            addr_q  <= '0;
          end else begin
            cnt_q <= cnt_q + 8'd1;
          end
        end
        default: state_q <= INIT;
      endcase
    end
  end

  always_comb begin
    load_data     = (state_q == APPEND_DATA);
    preamble_addr = (state_q == APPEND_DATA) ? 5'd0 : addr_q;
  end
endmodule
