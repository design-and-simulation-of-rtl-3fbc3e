// tb_data_source: checks the serial packet stream of data_source.
//
// The testbench plays the packetizer itself (preamble addresses 0..25, then
// load_data for 174 steps) on a ce that is high on random cycles, and
// compares packet_bit, two enabled steps later, with the reference stream of
// qpsk_ref_pkg: Barker preamble, then "Hello world mmm" data scrambled across
// packets. Six packets are sent, so the data table counter wraps after the
// fourth. Watchdog: 20000 cycles.
module tb_data_source;
  import qpsk_ref_pkg::*;
  logic clk = 0, rst = 1, ce = 0, load_data = 0;
  logic [4:0] preamble_addr = '0;
  logic packet_bit;
  int checks = 0, failures = 0;
  bit exp_s[$], flag[$];

  data_source dut (.clk, .rst, .ce, .load_data, .preamble_addr, .packet_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step, npk, nscr;
    npk  = 6;
    nscr = 0;
    build_stream(4, npk, exp_s, flag);
    repeat (2) @(posedge clk);
    rst  <= 0;
    step = 0;
    while (step < npk * PKT + 2) begin
      @(negedge clk);
      ce = ($urandom_range(0, 1) != 0);
      if (ce) begin
        int j;
        j = step % PKT;
        load_data     = (j >= PRE) && (step < npk * PKT);
        preamble_addr = (j < PRE) ? 5'(j) : 5'd0;
        if (step >= 2) begin
          checks++;
          if (flag[step-2]) nscr++;
          if (packet_bit !== exp_s[step-2]) begin
            failures++;
            if (failures < 10)
              $display("bit %0d (packet %0d, pos %0d): got %b expected %b",
                       step - 2, (step - 2) / PKT, (step - 2) % PKT, packet_bit, exp_s[step-2]);
          end
        end
        step++;
      end
    end
    $display("data bits changed by scrambling: %0d", nscr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
