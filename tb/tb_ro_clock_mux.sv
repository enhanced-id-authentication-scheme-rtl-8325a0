// tb_ro_clock_mux: checks ring selection and enable decoding.
//
// For every select value, with run high and low, the one-hot enable and the
// routed clock are compared with a reference computed in the testbench from
// random ring outputs.
module tb_ro_clock_mux;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 32;
  logic [4:0]   sel;
  logic         run;
  logic [N-1:0] ro_osc, ro_en;
  logic         clk_out;
  int checks = 0, failures = 0;

  ro_clock_mux #(.N_RO(N)) dut (.sel, .run, .ro_osc, .ro_en, .clk_out);

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int s = 0; s < N; s++) begin
        for (int k = 0; k < 4; k++) begin
          sel = 5'(s); run = r[0]; ro_osc = $urandom;
          #1ns;
          checks++;
          if (ro_en !== (r[0] ? (32'd1 << s) : 32'd0)) begin
            failures++; $display("FAIL: sel=%0d run=%0d en=%h", s, r, ro_en);
          end
          checks++;
          if (clk_out !== ro_osc[s]) begin
            failures++; $display("FAIL: sel=%0d clk_out=%b", s, clk_out);
          end
        end
      end
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
