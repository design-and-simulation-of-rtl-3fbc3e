// tb_bit_pairing: checks bit_pairing on a random serial stream.
//
// bit_ce every 2 clocks, sym_ce every 4 (with bit_ce). Serial bit b[n] is
// presented in bit period n; bits 0 and 1 form the first pair. The pair
// {b[2k+1], b[2k]} must be on bit_pair in symbol period k+2 (the down-sampler
// and the delay each cost one symbol period). 400 symbols; watchdog 10000.
module tb_bit_pairing;
  logic clk = 0, rst = 1, bit_ce = 0, sym_ce = 0, serial_in = 0;
  logic [1:0] bit_pair;
  int checks = 0, failures = 0;
  bit b[$];

  bit_pairing dut (.clk, .rst, .bit_ce, .sym_ce, .serial_in, .bit_pair);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    n = 0;
    // cycle c: bit_ce when c even, sym_ce when c % 4 == 2 (second bit of a pair)
    for (int c = 0; c < 1600; c++) begin
      bit_ce = (c % 2 == 0);
      sym_ce = (c % 4 == 2);
      if (bit_ce) begin
        b.push_back(1'($urandom));
        serial_in = b[n];
        n++;
      end
      if (sym_ce) begin
        int k;
        k = (c - 2) / 4 - 2;   // pair index expected now (two symbol delays)
        if (k >= 0) begin
          checks++;
          if (bit_pair !== {b[2*k+1], b[2*k]}) begin
            failures++;
            if (failures < 10) $display("pair %0d: got %b expected %b%b", k, bit_pair, b[2*k+1], b[2*k]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
