// puf_top: ring-oscillator PUF with ID extraction and authentication.
//
// The die's identity is hidden in tiny, fixed differences between the
// frequencies of nominally identical ring oscillators.  Absolute
// frequencies are useless as an ID because temperature, supply voltage and
// die-to-die process spread move all rings of a die together by far more
// than the local differences.  The design therefore measures every ring
// with one counter, one ring after another, and keeps only the differences
// between neighbouring rings, which cancel those common shifts.  The n-1
// differences form an ID vector that is sent to the host and can also be
// compared on-chip with an enrolled ID by Euclidean distance.
//
// Data path, in order:
//   measure_ctrl   - steps an index over the rings, times the counting gate
//   ro_clock_mux   - enables the selected ring, routes its output to the counter
//   ro_array       - the rings (behavioural model; hard macros on an FPGA)
//   freq_counter   - counts ring periods during the gate
//   delta_extractor- neighbour difference delta_i = f_(i+1) - f_i, K bits
//   serial_packer  - raw counts (MODE_RAW) or ID elements (MODE_ID) as bytes
//   uart_tx        - 8N1 serial line to the host
//   id_authenticator - distance to the enrolled ID, match decision
//
// Interface: start begins one run (mode is sampled at start); busy is high
// during it and done pulses at its end.  The ID elements are also brought
// out in parallel (id_valid/id_idx/id_delta) for an on-chip consumer.  The
// reference ID is loaded through ref_we/ref_addr/ref_data; thr is the
// normalised threshold with 24 fraction bits.  auth_done pulses once per
// run, with auth_match and auth_dist_sq.
// The die-model parameters (DIE_SEED, GLOBAL_SHIFT_PS, LOCAL_SPREAD_PS,
// JITTER_PS) only shape the behavioural ring model.
//
// Timing: a run takes about N_RO * (GATE_CYCLES + SETTLE_CYCLES +
// HOLD_CYCLES + 1) cycles when the serial link keeps up; in MODE_RAW with a
// short gate the link stalls the sequencer.
module puf_top #(
  parameter int unsigned N_RO            = puf_pkg::N_RO,
  parameter int unsigned M_BITS          = puf_pkg::M_BITS,
  parameter int unsigned K_BITS          = puf_pkg::K_BITS,
  parameter int unsigned GATE_CYCLES     = 1 << 20,
  parameter int unsigned SETTLE_CYCLES   = 16,
  parameter int unsigned HOLD_CYCLES     = 16,
  parameter int unsigned CLKS_PER_BIT    = 434,
  parameter int unsigned THR_FRAC        = 24,
  parameter int unsigned DIE_SEED        = 1,
  parameter int unsigned GLOBAL_SHIFT_PS = 0,
  parameter int unsigned LOCAL_SPREAD_PS = 12,
  parameter int unsigned JITTER_PS       = 2,
  parameter int unsigned SEL_W           = $clog2(N_RO),
  parameter int unsigned IDX_W           = $clog2(N_RO - 1),
  parameter int unsigned ACC_W           = 2 * K_BITS + 2 + $clog2(N_RO - 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  puf_pkg::out_mode_e       mode,
  output logic                     busy,
  output logic                     done,
  output logic                     uart_txd,
  // ID elements as they are produced
  output logic                     id_valid,
  output logic [IDX_W-1:0]         id_idx,
  output logic signed [K_BITS-1:0] id_delta,
  // reference ID and threshold for on-chip authentication
  input  logic                     ref_we,
  input  logic [IDX_W-1:0]         ref_addr,
  input  logic signed [K_BITS-1:0] ref_data,
  input  logic [THR_FRAC-1:0]      thr,
  output logic                     auth_done,
  output logic                     auth_match,
  output logic [ACC_W-1:0]         auth_dist_sq
);
  timeunit 1ns;
  timeprecision 1ps;

  import puf_pkg::*;

  out_mode_e mode_q;

  logic [SEL_W-1:0]  sel;
  logic              ro_run, cnt_clear, cnt_gate;
  logic [M_BITS-1:0] cnt_value;
  logic [N_RO-1:0]   ro_en, ro_osc;
  logic              ro_clk;

  logic              s_valid, s_ready, s_last;
  logic [SEL_W-1:0]  s_idx;
  logic [M_BITS-1:0] s_freq;

  logic                     d_valid, d_ready, d_has_delta;
  logic [SEL_W-1:0]         d_idx;
  logic [M_BITS-1:0]        d_freq;
  logic signed [K_BITS-1:0] d_delta;

  logic       b_valid, b_ready;
  logic [7:0] b_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             mode_q <= MODE_RAW;
    else if (start && !busy) mode_q <= mode;
  end

  measure_ctrl #(
    .N_RO(N_RO), .M_BITS(M_BITS), .GATE_CYCLES(GATE_CYCLES),
    .SETTLE_CYCLES(SETTLE_CYCLES), .HOLD_CYCLES(HOLD_CYCLES)
  ) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .sel, .ro_run, .cnt_clear, .cnt_gate, .cnt_value,
    .s_valid, .s_ready, .s_idx, .s_freq, .s_last
  );

  ro_clock_mux #(.N_RO(N_RO)) u_mux (
    .sel, .run(ro_run), .ro_osc, .ro_en, .clk_out(ro_clk)
  );

  ro_array #(
    .N_RO(N_RO), .LOCAL_SPREAD_PS(LOCAL_SPREAD_PS), .GLOBAL_SHIFT_PS(GLOBAL_SHIFT_PS),
    .JITTER_PS(JITTER_PS), .DIE_SEED(DIE_SEED)
  ) u_ros (
    .en(ro_en), .osc(ro_osc)
  );

  freq_counter #(.M_BITS(M_BITS)) u_cnt (
    .ro_clk, .rst_n, .clear(cnt_clear), .gate(cnt_gate), .count(cnt_value)
  );

  delta_extractor #(.N_RO(N_RO), .M_BITS(M_BITS), .K_BITS(K_BITS)) u_delta (
    .clk, .rst_n,
    .s_valid, .s_ready, .s_idx, .s_freq, .s_last,
    .o_valid(d_valid), .o_ready(d_ready), .o_idx(d_idx), .o_freq(d_freq),
    .o_has_delta(d_has_delta), .o_delta(d_delta)
  );

  serial_packer #(.N_RO(N_RO), .M_BITS(M_BITS), .K_BITS(K_BITS)) u_pack (
    .clk, .rst_n, .mode(mode_q),
    .s_valid(d_valid), .s_ready(d_ready), .s_idx(d_idx), .s_freq(d_freq),
    .s_has_delta(d_has_delta), .s_delta(d_delta),
    .b_valid, .b_ready, .b_data
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data), .txd(uart_txd)
  );

  // An ID element is produced when a sample with a difference leaves the
  // extractor; element i-1 belongs to rings i-1 and i.
  assign id_valid = d_valid && d_ready && d_has_delta;
  assign id_idx   = IDX_W'(d_idx - 1'b1);
  assign id_delta = d_delta;

  id_authenticator #(.N_ELEM(N_RO - 1), .K_BITS(K_BITS), .THR_FRAC(THR_FRAC)) u_auth (
    .clk, .rst_n, .ref_we, .ref_addr, .ref_data, .thr,
    .elem_valid(id_valid), .elem_idx(id_idx), .elem_delta(id_delta),
    .done(auth_done), .match(auth_match), .dist_sq(auth_dist_sq)
  );

endmodule
