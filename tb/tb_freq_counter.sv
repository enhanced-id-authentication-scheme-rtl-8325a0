// tb_freq_counter: checks the gated ring-period counter.
//
// A ring clock of known period (18.4 ns) and a 20 ns system clock are
// generated here.  The testbench clears the counter, opens the gate for G
// system cycles and, after the hold time, reads the count.  The expected
// count is G*20/18.4 to within one period (gate edges are not aligned with
// the ring).  It also checks that clear returns the count to 0 and that a
// closed gate stops counting.
module tb_freq_counter;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime RO_HALF = 9.2ns;
  logic clk = 1'b0, ro_clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, gate = 1'b0;
  logic [31:0] count;
  int checks = 0, failures = 0;

  always #10ns clk = ~clk;
  always #(RO_HALF) ro_clk = ~ro_clk;

  freq_counter #(.M_BITS(32)) dut (.ro_clk, .rst_n, .clear, .gate, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int g);
    real exp_cnt;
    clear = 1'b1; repeat (8) @(posedge clk);
    check(count == 0, "cleared");
    clear = 1'b0;
    gate = 1'b1; repeat (g) @(posedge clk); gate = 1'b0;
    repeat (8) @(posedge clk);
    exp_cnt = real'(g) * 20.0 / (2.0 * 9.2);
    check(real'(count) >= exp_cnt - 1.0 && real'(count) <= exp_cnt + 1.0,
          $sformatf("gate %0d: count %0d expected %f", g, count, exp_cnt));
    begin
      logic [31:0] c0 = count;
      repeat (20) @(posedge clk);
      check(count == c0, "count frozen while gate closed");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    measure(100);
    measure(1000);
    measure(4321);
    measure(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
