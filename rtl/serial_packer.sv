// serial_packer: frames measurement results as bytes for the serial link.
//
// Two output modes, chosen per run (see puf_pkg::out_mode_e):
//   MODE_RAW - every ring's raw count is sent, for characterising the
//              rings off-chip: record = [ring index][count, 4 bytes, MSB
//              first];
//   MODE_ID  - only the n-1 ID elements are sent: record = [element index
//              i-1][difference sign-extended to 24 bits, 3 bytes, MSB
//              first].  Ring 0, which has no difference, sends nothing.
// The document reads raw samples out over a serial interface for
// off-chip analysis and reads the ID out sequentially; the record layout
// is this design's own.  It is written for M_BITS = 32 and K_BITS <= 24.
//
// Interface: takes one sample (valid/ready) and then emits its bytes one
// by one on b_valid/b_ready; it accepts the next sample only after the last
// byte of the record has been taken, which back-pressures the measurement
// pipeline when the link is slower than the measurements.
module serial_packer #(
  parameter int unsigned N_RO   = puf_pkg::N_RO,
  parameter int unsigned M_BITS = puf_pkg::M_BITS,
  parameter int unsigned K_BITS = puf_pkg::K_BITS,
  parameter int unsigned SEL_W  = $clog2(N_RO)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  puf_pkg::out_mode_e       mode,
  // samples from delta_extractor
  input  logic                     s_valid,
  output logic                     s_ready,
  input  logic [SEL_W-1:0]         s_idx,
  input  logic [M_BITS-1:0]        s_freq,
  input  logic                     s_has_delta,
  input  logic signed [K_BITS-1:0] s_delta,
  // byte stream to uart_tx
  output logic                     b_valid,
  input  logic                     b_ready,
  output logic [7:0]               b_data
);
  timeunit 1ns;
  timeprecision 1ps;

  import puf_pkg::*;

  logic [39:0] rec;        // record, next byte in the top 8 bits
  logic [2:0]  bytes_left;

  logic [31:0] freq32;
  logic [23:0] delta24;
  assign freq32  = 32'(s_freq);
  assign delta24 = 24'(s_delta);   // sign-extends the signed difference

  assign s_ready = (bytes_left == '0);
  assign b_valid = (bytes_left != '0);
  assign b_data  = rec[39:32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec        <= '0;
      bytes_left <= '0;
    end else if (bytes_left == '0) begin
      if (s_valid) begin
        if (mode == MODE_RAW) begin
          rec        <= {8'(s_idx), freq32};
          bytes_left <= 3'd5;
        end else if (s_has_delta) begin
          rec        <= {8'(s_idx - 1'b1), delta24, 8'h00};
          bytes_left <= 3'd4;
        end
      end
    end else if (b_ready) begin
      rec        <= {rec[31:0], 8'h00};
      bytes_left <= bytes_left - 1'b1;
    end
  end

endmodule
