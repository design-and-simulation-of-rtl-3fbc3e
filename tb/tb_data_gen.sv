// tb_data_gen: checks data_gen, packet framing through to bit pairs.
//
// Uses the same enables as the transmitter (bit_ce every 2 clocks, sym_ce
// every 4, both in the first cycle after reset). In symbol period k (after k
// sym_ce edges) the expected output is valid = 0 for k < 4 and, from k = 4,
// valid = 1 with bit_pair = {b[2j+1], b[2j]}, j = k - 4, where b is the
// reference packet stream. This fixes the start-up latency at 4 symbol
// periods. Five packets (500 symbols) are checked, crossing the wrap of the
// data table. Watchdog 10000 cycles.
module tb_data_gen;
  import qpsk_ref_pkg::*;
  logic clk = 0, rst = 1, bit_ce = 0, sym_ce = 0;
  logic valid_out;
  logic [1:0] bit_pair;
  int checks = 0, failures = 0;
  bit b[$], flag[$];

  data_gen dut (.clk, .rst, .bit_ce, .sym_ce, .valid_out, .bit_pair);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    build_stream(4, 5, b, flag);
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    k = 0;
    for (int c = 0; c < 4 * 503; c++) begin
      bit_ce = (c % 2 == 0);
      sym_ce = (c % 4 == 0);
      if (sym_ce) begin
        checks++;
        if (k < 4) begin
          if (valid_out !== 1'b0) begin
            failures++;
            $display("symbol period %0d: valid early", k);
          end
        end else if (valid_out !== 1'b1 || bit_pair !== {b[2*(k-4)+1], b[2*(k-4)]}) begin
          failures++;
          if (failures < 10)
            $display("symbol period %0d: valid %b pair %b expected %b%b", k, valid_out, bit_pair,
                     b[2*(k-4)+1], b[2*(k-4)]);
        end
        k++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
