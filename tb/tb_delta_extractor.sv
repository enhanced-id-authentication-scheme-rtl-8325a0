// tb_delta_extractor: checks the neighbour-difference comparator.
//
// Runs of N random counts (some far apart, to hit both saturation limits)
// are pushed in with random valid gaps while the output ready toggles at
// random.  For every sample the testbench computes f_i - f_(i-1) itself,
// clamps it to the K-bit two's-complement range and compares; ring 0 of
// each run must carry no difference.  Twenty runs back to back check that s_last
// restarts the chain (ring 0 of every run has no difference).
module tb_delta_extractor;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 8, M = 32, K = 21;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid = 1'b0, s_ready, s_last = 1'b0;
  logic [2:0]  s_idx = '0;
  logic [M-1:0] s_freq = '0;
  logic o_valid, o_ready = 1'b0, o_has_delta;
  logic [2:0]  o_idx;
  logic [M-1:0] o_freq;
  logic signed [K-1:0] o_delta;
  int checks = 0, failures = 0, n_out = 0, n_satp = 0, n_satn = 0;
  longint exp_q [$];
  bit     has_q [$];

  always #5ns clk = ~clk;

  delta_extractor #(.N_RO(N), .M_BITS(M), .K_BITS(K)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always_ff @(posedge clk) begin
    o_ready <= ($urandom % 4 != 0);
    if (o_valid && o_ready) begin
      longint e; bit h;
      e = exp_q.pop_front(); h = has_q.pop_front();
      check(o_has_delta == h, $sformatf("has_delta idx %0d", o_idx));
      if (h) check(longint'(o_delta) == e, $sformatf("idx %0d delta %0d expected %0d", o_idx, o_delta, e));
      n_out <= n_out + 1;
    end
  end

  // Stimulus is generated up front and driven by a clocked process that
  // moves on only when the current sample has been taken.
  localparam int unsigned RUNS = 20, TOTAL = RUNS * N;
  logic [M-1:0] stim [TOTAL];
  int ptr = 0;

  task automatic make_stimulus();
    longint prev = 0, d, lim;
    lim = (longint'(1) << (K - 1));
    for (int n = 0; n < TOTAL; n++) begin
      logic [M-1:0] f;
      int i = n % N;
      if ($urandom % 4 == 0) f = 32'd50_000_000 + ($urandom % 4_000_000);  // may saturate
      else                   f = 32'd54_000_000 + ($urandom % 70_000);
      d = longint'(f) - prev;
      if (d > lim - 1) begin d = lim - 1; if (i != 0) n_satp++; end
      else if (d < -lim) begin d = -lim; if (i != 0) n_satn++; end
      exp_q.push_back(d); has_q.push_back(i != 0);
      prev = longint'(f);
      stim[n] = f;
    end
  endtask

  always_ff @(posedge clk) begin
    if (rst_n && (!s_valid || s_ready)) begin
      if (ptr < TOTAL && ($urandom % 3 != 0)) begin
        s_valid <= 1'b1;
        s_idx   <= 3'(ptr % N);
        s_freq  <= stim[ptr];
        s_last  <= (ptr % N == N - 1);
        ptr     <= ptr + 1;
      end else s_valid <= 1'b0;
    end
  end

  initial begin
    make_stimulus();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (ptr == TOTAL);
    repeat (40) @(posedge clk);
    check(n_out == TOTAL, $sformatf("outputs %0d", n_out));
    check(n_satp > 0 && n_satn > 0, "both saturation limits exercised");
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
