// uart_tx: serial transmitter that carries results to the host computer.
//
// Measured frequencies or ID elements leave the chip over a serial link;
// the document names a serial interface but not its format.  This design
// uses the common asynchronous 8N1 frame: one start bit (0), eight data
// bits LSB first, one stop bit (1), each bit CLKS_PER_BIT system cycles
// long.  The default, 434 cycles, is 115200 baud from a 50 MHz clock.
//
// Interface: a byte is taken when in_valid and in_ready are both high;
// in_ready is high while the line is idle and in the last cycle of a
// stop bit.  txd idles at 1.
// Timing: one byte occupies 10 * CLKS_PER_BIT cycles on the line.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       txd
);
  timeunit 1ns;
  timeprecision 1ps;


  localparam int unsigned DIV_W = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic [8:0]       shreg;    // stop bit and data, shifted out LSB first
  logic [3:0]       bits_left;
  logic [DIV_W-1:0] div;
  logic             active;

  // The line can take the next byte in the last cycle of a stop bit, so
  // back-to-back bytes follow each other without an idle cycle.
  logic finishing;
  assign finishing = active && (div == '0) && (bits_left == '0);
  assign in_ready  = !active || finishing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      div       <= '0;
      active    <= 1'b0;
      txd       <= 1'b1;
    end else if (in_valid && in_ready) begin
      txd       <= 1'b0;                   // start bit
      shreg     <= {1'b1, in_data};
      bits_left <= 4'd9;
      div       <= DIV_W'(CLKS_PER_BIT - 1);
      active    <= 1'b1;
    end else if (!active) begin
      txd <= 1'b1;
    end else if (div != '0) begin
      div <= div - 1'b1;
    end else if (bits_left == '0) begin
      active <= 1'b0;                      // stop bit has had its full time
    end else begin
      txd       <= shreg[0];
      shreg     <= {1'b1, shreg[8:1]};
      bits_left <= bits_left - 1'b1;
      div       <= DIV_W'(CLKS_PER_BIT - 1);
    end
  end

endmodule
