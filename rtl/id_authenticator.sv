// id_authenticator: decides whether a freshly extracted ID matches an
// enrolled one.
//
// An ID is a vector R of N_ELEM = n-1 signed K_BITS elements.  Two IDs are
// compared by their Euclidean distance, normalised by the largest distance
// two such vectors can have, 2^K * sqrt(N_ELEM):
//     d = sqrt( sum_i (delta_i - ref_i)^2 ) / (2^K * sqrt(N_ELEM)).
// The IDs match when d does not exceed a threshold d_th.  To avoid the
// square root and the division, the block squares both sides and compares
//     S * 2^(2*THR_FRAC)  <=  thr^2 * N_ELEM * 2^(2*K)
// where S is the running sum of squared differences and thr = d_th *
// 2^THR_FRAC is the threshold as an unsigned fraction (THR_FRAC = 24
// fraction bits).  Both sides are exact integers, so the decision is exact.
//
// The reference ID (normally the mean of many measurements, worked out by
// the host) is written element by element through ref_we/ref_addr/ref_data
// and kept in a small register file.  Measured elements arrive one at a time
// on elem_valid with their index 0..N_ELEM-1; index 0 restarts the sum, the
// last index ends it.  One squaring and one addition happen per element.
//
// The document defines the distance, its normalisation and the threshold
// rule, and mentions that the decision is usually taken off-chip; doing it
// on-chip with the squared comparison is this design's choice.
//
// Timing: done pulses (with match and dist_sq valid until the next ID)
// two cycles after the last element has been presented.
module id_authenticator #(
  parameter int unsigned N_ELEM   = puf_pkg::N_RO - 1,
  parameter int unsigned K_BITS   = puf_pkg::K_BITS,
  parameter int unsigned THR_FRAC = 24,
  parameter int unsigned IDX_W    = $clog2(N_ELEM),
  parameter int unsigned ACC_W    = 2 * K_BITS + 2 + $clog2(N_ELEM)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // reference ID load
  input  logic                     ref_we,
  input  logic [IDX_W-1:0]         ref_addr,
  input  logic signed [K_BITS-1:0] ref_data,
  // normalised threshold, unsigned, THR_FRAC fraction bits
  input  logic [THR_FRAC-1:0]      thr,
  // measured ID elements
  input  logic                     elem_valid,
  input  logic [IDX_W-1:0]         elem_idx,
  input  logic signed [K_BITS-1:0] elem_delta,
  // decision
  output logic                     done,
  output logic                     match,
  output logic [ACC_W-1:0]         dist_sq
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam int unsigned CMP_W = ACC_W + 2 * THR_FRAC + 2;

  logic signed [K_BITS-1:0]  ref_mem [N_ELEM];
  logic signed [K_BITS:0]    diff;
  logic signed [2*K_BITS+1:0] prod;
  logic [2*K_BITS+1:0]       sq;
  logic [ACC_W-1:0]          acc;
  logic                      finish;
  logic [CMP_W-1:0]          lhs, rhs;

  always_ff @(posedge clk) begin
    if (ref_we && (32'(ref_addr) < N_ELEM)) ref_mem[ref_addr] <= ref_data;
  end

  always_comb begin
    diff = $signed({elem_delta[K_BITS-1], elem_delta})
         - $signed({ref_mem[elem_idx][K_BITS-1], ref_mem[elem_idx]});
    prod = diff * diff;
    sq   = $unsigned(prod);
  end

  assign lhs = CMP_W'(acc) << (2 * THR_FRAC);
  assign rhs = (CMP_W'(thr) * CMP_W'(thr) * CMP_W'(N_ELEM)) << (2 * K_BITS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      finish  <= 1'b0;
      done    <= 1'b0;
      match   <= 1'b0;
      dist_sq <= '0;
    end else begin
      finish <= 1'b0;
      done   <= 1'b0;
      if (elem_valid && (32'(elem_idx) < N_ELEM)) begin
        acc    <= ((elem_idx == '0) ? '0 : acc) + ACC_W'(sq);
        finish <= (32'(elem_idx) == N_ELEM - 1);
      end
      if (finish) begin
        done    <= 1'b1;
        match   <= (lhs <= rhs);
        dist_sq <= acc;
      end
    end
  end

endmodule
