// tb_serial_packer: checks the byte framing of both output modes.
//
// Two runs of N samples go through the packer, one in MODE_RAW and one in
// MODE_ID, while the byte sink's ready toggles at random.  The testbench
// builds the expected byte list itself (RAW: index, 4 count bytes MSB
// first; ID: index-1, 3 difference bytes MSB first, nothing for ring 0)
// and compares it byte by byte with what the packer emits.
module tb_serial_packer;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;

  localparam int unsigned N = 6, M = 32, K = 21;
  logic clk = 1'b0, rst_n = 1'b0;
  out_mode_e mode = MODE_RAW;
  logic s_valid = 1'b0, s_ready, s_has_delta = 1'b0;
  logic [2:0] s_idx = '0;
  logic [M-1:0] s_freq = '0;
  logic signed [K-1:0] s_delta = '0;
  logic b_valid, b_ready = 1'b0;
  logic [7:0] b_data;
  int checks = 0, failures = 0, ptr = 0, n_bytes = 0;
  logic [7:0] exp_q [$];
  logic [M-1:0] f_stim [2*N];
  logic signed [K-1:0] d_stim [2*N];

  always #5ns clk = ~clk;

  serial_packer #(.N_RO(N), .M_BITS(M), .K_BITS(K)) dut (.*);

  always_ff @(posedge clk) begin
    b_ready <= ($urandom % 3 != 0);
    if (b_valid && b_ready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected byte %h", b_data); end
      else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        if (b_data != e) begin failures++; $display("FAIL: byte %0d = %h expected %h", n_bytes, b_data, e); end
      end
      n_bytes <= n_bytes + 1;
    end
  end

  // driver: samples 0..N-1 in RAW mode, N..2N-1 in ID mode
  always_ff @(posedge clk) begin
    if (rst_n && (!s_valid || s_ready)) begin
      if (ptr < 2 * N) begin
        s_valid     <= 1'b1;
        s_idx       <= 3'(ptr % N);
        s_freq      <= f_stim[ptr];
        s_has_delta <= (ptr % N != 0);
        s_delta     <= d_stim[ptr];
        mode        <= (ptr < N) ? MODE_RAW : MODE_ID;
        ptr         <= ptr + 1;
      end else s_valid <= 1'b0;
    end
  end

  initial begin
    for (int n = 0; n < 2 * N; n++) begin
      logic [23:0] d24;
      f_stim[n] = $urandom;
      d_stim[n] = K'($urandom);
      if (n < N) begin
        exp_q.push_back(8'(n % N));
        for (int b = 3; b >= 0; b--) exp_q.push_back(8'(f_stim[n] >> (8 * b)));
      end else if (n % N != 0) begin
        d24 = {{(24-K){d_stim[n][K-1]}}, d_stim[n]};
        exp_q.push_back(8'(n % N - 1));
        for (int b = 2; b >= 0; b--) exp_q.push_back(8'(d24 >> (8 * b)));
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (ptr == 2 * N);
    repeat (100) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_bytes != 5 * N + 4 * (N - 1)) begin
      failures++; $display("FAIL: %0d bytes, %0d missing", n_bytes, exp_q.size());
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
