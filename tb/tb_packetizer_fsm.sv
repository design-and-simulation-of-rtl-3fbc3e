// tb_packetizer_fsm: checks the packet framing of packetizer_fsm.
//
// Enables the FSM on random cycles and, at every enabled step, compares
// load_data and preamble_addr with the expected framing: step j of a packet
// (j = 0..199) has address j and load_data low for j < 26, load_data high
// for the 174 steps after. Also checks the outputs hold on cycles without ce.
// Runs three packets. Watchdog: 20000 cycles.
module tb_packetizer_fsm;
  logic clk = 0, rst = 1, ce = 0;
  logic load_data;
  logic [4:0] preamble_addr;
  int checks = 0, failures = 0;

  packetizer_fsm dut (.clk, .rst, .ce, .load_data, .preamble_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step;
    logic       last_load;
    logic [4:0] last_addr;
    step = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    while (step < 3 * 200) begin
      @(negedge clk);
      ce = ($urandom_range(0, 2) != 0);
      if (ce) begin
        int j;
        j = step % 200;
        checks++;
        if (j < 26) begin
          if (load_data !== 1'b0 || preamble_addr !== 5'(j)) begin
            failures++;
            $display("step %0d: load=%b addr=%0d, expected preamble address %0d", step, load_data, preamble_addr, j);
          end
        end else if (load_data !== 1'b1) begin
          failures++;
          $display("step %0d: load_data low in data section", step);
        end
        step++;
      end else begin
        last_load = load_data;
        last_addr = preamble_addr;
        @(posedge clk);
        #1;
        checks++;
        if (load_data !== last_load || preamble_addr !== last_addr) begin
          failures++;
          $display("FSM moved without ce at step %0d", step);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
