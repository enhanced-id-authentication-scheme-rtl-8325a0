// tb_id_authenticator: checks the Euclidean-distance decision.
//
// A random reference ID is loaded.  Measured IDs are then presented as the
// reference plus random noise of several sizes; for each the testbench
// computes the sum of squared differences and the decision
// sqrt(S)/(2^K*sqrt(N_ELEM)) <= thr/2^24 in floating point, and compares
// dist_sq and match with the block's outputs.  The threshold is chosen
// per ID so that some IDs fall on each side, and one case sits exactly on
// the boundary (S equal to the limit must match).  It also checks that
// done comes two cycles after the last element.
module tb_id_authenticator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NE = 31, K = 21, TF = 24;
  localparam int unsigned ACC_W = 2 * K + 2 + $clog2(NE);
  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_we = 1'b0, elem_valid = 1'b0;
  logic [4:0] ref_addr = '0, elem_idx = '0;
  logic signed [K-1:0] ref_data = '0, elem_delta = '0;
  logic [TF-1:0] thr = '0;
  logic done, match;
  logic [ACC_W-1:0] dist_sq;
  int checks = 0, failures = 0, n_match = 0, n_reject = 0, cyc = 0, t_last = 0;
  int refv [NE];
  int meas [NE];

  always #5ns clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  id_authenticator #(.N_ELEM(NE), .K_BITS(K), .THR_FRAC(TF)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_id(input int noise, input int thr_val, input bit exact);
    longint s = 0;
    real d_norm, t_norm;
    bit exp_match;
    for (int i = 0; i < NE; i++) begin
      int e = (noise == 0) ? 0 : (int'($urandom % (2 * noise + 1)) - noise);
      meas[i] = refv[i] + e;
      if (meas[i] > (1 << (K-1)) - 1) meas[i] = (1 << (K-1)) - 1;
      if (meas[i] < -(1 << (K-1)))    meas[i] = -(1 << (K-1));
      s += longint'(meas[i] - refv[i]) * longint'(meas[i] - refv[i]);
    end
    thr <= TF'(thr_val);
    for (int i = 0; i < NE; i++) begin
      @(negedge clk);
      elem_valid = 1'b1; elem_idx = 5'(i); elem_delta = K'(meas[i]);
      t_last = cyc;
      if (i != NE - 1) repeat ($urandom % 2) begin @(negedge clk); elem_valid = 1'b0; end
    end
    @(negedge clk); elem_valid = 1'b0;
    wait (done);
    @(negedge clk);
    check(cyc - t_last == 2, $sformatf("done after %0d cycles", cyc - t_last));
    d_norm = $sqrt(real'(s)) / (real'(1 << K) * $sqrt(real'(NE)));
    t_norm = real'(thr_val) / real'(1 << TF);
    exp_match = exact ? 1'b1 : (d_norm <= t_norm);
    check(dist_sq == ACC_W'(s), $sformatf("dist_sq %0d expected %0d", dist_sq, s));
    check(match == exp_match, $sformatf("match %b expected %b (d=%g thr=%g)", match, exp_match, d_norm, t_norm));
    if (match) n_match++; else n_reject++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NE; i++) begin
      refv[i] = int'($urandom % 200000) - 100000;
      @(negedge clk);
      ref_we = 1'b1; ref_addr = 5'(i); ref_data = K'(refv[i]);
    end
    @(negedge clk); ref_we = 1'b0;
    // identical ID, zero threshold: distance 0 must match
    one_id(0, 0, 1'b0);
    // noise against thresholds around the typical distance
    for (int r = 0; r < 30; r++) begin
      int noise = 1 << ($urandom % 14);
      one_id(noise, int'($urandom % 4000), 1'b0);
    end
    // far away ID: every element +/- half range
    one_id(1 << 19, 4000, 1'b0);
    // exact boundary: every element differs by 2^K/2^12, so
    // d = 2^-12 exactly; thr = 2^-12 * 2^24 = 4096 must match
    begin
      longint s = 0;
      for (int i = 0; i < NE; i++) begin
        meas[i] = refv[i] + (1 << (K - 12));
        s += longint'(1 << (K - 12)) * longint'(1 << (K - 12));
      end
      thr <= TF'(4096);
      for (int i = 0; i < NE; i++) begin
        @(negedge clk);
        elem_valid = 1'b1; elem_idx = 5'(i); elem_delta = K'(meas[i]);
      end
      @(negedge clk); elem_valid = 1'b0;
      wait (done); @(negedge clk);
      check(match == 1'b1 && dist_sq == ACC_W'(s), "boundary distance matches");
      // one below the boundary must not match
      thr <= TF'(4095);
      for (int i = 0; i < NE; i++) begin
        @(negedge clk);
        elem_valid = 1'b1; elem_idx = 5'(i); elem_delta = K'(meas[i]);
      end
      @(negedge clk); elem_valid = 1'b0;
      wait (done); @(negedge clk);
      check(match == 1'b0, "just above threshold rejects");
    end
    check(n_match > 0 && n_reject > 0, $sformatf("both outcomes seen (%0d/%0d)", n_match, n_reject));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
