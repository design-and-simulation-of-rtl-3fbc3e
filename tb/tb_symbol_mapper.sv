// tb_symbol_mapper: checks the QPSK constellation of symbol_mapper.
//
// For each input 0..3 and both valid values, compares the symbol with the
// Gray, pi/4-offset point of amplitude 23170/32768 from qpsk_ref_pkg, checks
// that valid passes through, and that neighbouring points differ in one bit.
module tb_symbol_mapper;
  import qpsk_tx_pkg::*;
  import qpsk_ref_pkg::*;
  logic valid_in, valid_out;
  logic [1:0] bit_pair;
  iq_t sym;
  int checks = 0, failures = 0;
  logic clk = 0;

  symbol_mapper dut (.valid_in, .bit_pair, .valid_out, .sym);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, eq;
    for (int v = 0; v < 2; v++) begin
      for (int s = 0; s < 4; s++) begin
        valid_in = v[0];
        bit_pair = 2'(s);
        #1;
        map_pair(bit_pair[0], bit_pair[1], ei, eq);
        checks++;
        if (int'(sym.i) != ei || int'(sym.q) != eq || valid_out !== valid_in) begin
          failures++;
          $display("input %0d valid %0d: got (%0d,%0d,%b) expected (%0d,%0d)", s, v, sym.i, sym.q, valid_out, ei, eq);
        end
        // the point a quarter turn away differs in exactly one bit
        checks++;
        if ((sym.i == sym.q) != (bit_pair[0] == bit_pair[1])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
