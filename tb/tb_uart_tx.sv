// tb_uart_tx: checks the 8N1 serial transmitter with a sampling receiver.
//
// Random bytes are sent with CLKS_PER_BIT = 8.  An independent receiver in
// the testbench waits for the start bit, samples each bit in its middle and
// checks start, data and stop bits, and that one byte takes exactly
// 10 * CLKS_PER_BIT cycles between accept pulses when sent back to back.
module tb_uart_tx;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CPB = 8, NBYTES = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, txd;
  logic [7:0] in_data = '0;
  int checks = 0, failures = 0, cyc = 0, last_acc = -1;
  logic [7:0] sent [$];

  always #5ns clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // driver: back to back
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(txd == 1'b1, "idle high");
    for (int i = 0; i < NBYTES; i++) begin
      in_valid <= 1'b1; in_data <= 8'($urandom);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      sent.push_back(in_data);
      if (last_acc >= 0) check(cyc - last_acc == 10 * CPB, $sformatf("byte period %0d", cyc - last_acc));
      last_acc = cyc;
    end
    in_valid <= 1'b0;
  end

  // receiver
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    for (int i = 0; i < NBYTES; i++) begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      check(txd == 1'b0, "start bit");
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        b[k] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1'b1, "stop bit");
      wait (sent.size() > 0);
      check(b == sent.pop_front(), $sformatf("byte %0d = %h", i, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
