// delta_extractor: turns the stream of ring frequencies into ID elements.
//
// This is the comparator of the ID extraction scheme.  It keeps the
// previous ring's count and, for every ring after the first, forms the
// neighbour difference delta_i = f_(i+1) - f_i.  Subtracting neighbours
// cancels whatever shifts all rings of a die equally (die-to-die process
// variation, temperature, supply voltage) and leaves the local,
// within-die variation that makes the die unique.  A difference needs far
// fewer bits than a raw count, so it is reduced to K_BITS two's-complement
// bits; the n-1 elements of one run form the ID vector.
//
// The document gives the difference, its k-bit two's-complement format and
// k = 21 for m = 32.  Saturating (rather than wrapping) a difference that
// does not fit in k bits is this design's choice.
//
// Interface: one-entry registered stage with valid/ready on both sides.
// The output carries the ring index, its raw count, whether a difference
// is present (not for ring 0) and the difference.  s_last resets the
// neighbour chain so the next run starts afresh.  Latency one cycle;
// throughput one sample per cycle.
module delta_extractor #(
  parameter int unsigned N_RO   = puf_pkg::N_RO,
  parameter int unsigned M_BITS = puf_pkg::M_BITS,
  parameter int unsigned K_BITS = puf_pkg::K_BITS,
  parameter int unsigned SEL_W  = $clog2(N_RO)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // raw frequency stream in
  input  logic                     s_valid,
  output logic                     s_ready,
  input  logic [SEL_W-1:0]         s_idx,
  input  logic [M_BITS-1:0]        s_freq,
  input  logic                     s_last,
  // sample with ID element out
  output logic                     o_valid,
  input  logic                     o_ready,
  output logic [SEL_W-1:0]         o_idx,
  output logic [M_BITS-1:0]        o_freq,
  output logic                     o_has_delta,
  output logic signed [K_BITS-1:0] o_delta
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam logic signed [M_BITS:0] K_MAX = (M_BITS+1)'((1 << (K_BITS - 1)) - 1);
  localparam logic signed [M_BITS:0] K_MIN = -(M_BITS+1)'(1 << (K_BITS - 1));

  logic [M_BITS-1:0]        prev;
  logic                     have_prev;
  logic signed [M_BITS:0]   diff;
  logic signed [K_BITS-1:0] diff_sat;

  always_comb begin
    diff = $signed({1'b0, s_freq}) - $signed({1'b0, prev});
    if (diff > K_MAX)      diff_sat = K_MAX[K_BITS-1:0];
    else if (diff < K_MIN) diff_sat = K_MIN[K_BITS-1:0];
    else                   diff_sat = diff[K_BITS-1:0];
  end

  assign s_ready = !o_valid || o_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev        <= '0;
      have_prev   <= 1'b0;
      o_valid     <= 1'b0;
      o_idx       <= '0;
      o_freq      <= '0;
      o_has_delta <= 1'b0;
      o_delta     <= '0;
    end else begin
      if (o_valid && o_ready) o_valid <= 1'b0;
      if (s_valid && s_ready) begin
        o_valid     <= 1'b1;
        o_idx       <= s_idx;
        o_freq      <= s_freq;
        o_has_delta <= have_prev;
        o_delta     <= have_prev ? diff_sat : '0;
        prev        <= s_freq;
        have_prev   <= !s_last;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           o_valid && !o_ready |=> o_valid && $stable(o_delta) && $stable(o_freq));

endmodule
