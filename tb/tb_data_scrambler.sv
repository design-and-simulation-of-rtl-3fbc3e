// tb_data_scrambler: checks data_scrambler against a bit-history model.
//
// Drives random data and a random enable. The model keeps the last four
// output bits taken with enable high and expects out = in ^ y[-1] ^ y[-2] ^
// y[-4]; it also descrambles the output (in = out ^ same taps) and checks the
// original data returns. 2000 cycles; watchdog 5000 cycles.
module tb_data_scrambler;
  logic clk = 0, rst = 1, en = 0, data_in = 0;
  logic scrambled_out;
  int checks = 0, failures = 0;
  bit [3:0] hist = '0;   // hist[0] = most recent enabled output

  data_scrambler dut (.clk, .rst, .en, .data_in, .scrambled_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en      = ($urandom_range(0, 3) != 0);
      data_in = 1'($urandom);
      #1;
      exp = data_in ^ hist[0] ^ hist[1] ^ hist[3];
      checks++;
      if (scrambled_out !== exp) begin
        failures++;
        if (failures < 10) $display("cycle %0d: out %b expected %b", n, scrambled_out, exp);
      end
      checks++;
      if ((scrambled_out ^ hist[0] ^ hist[1] ^ hist[3]) !== data_in) failures++;
      @(posedge clk);
      if (en) hist = {hist[2:0], exp};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
