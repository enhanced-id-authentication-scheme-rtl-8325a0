// ring_oscillator: behavioural model of one ring oscillator (RO) of the PUF.
//
// This is a simulation model, not synthesizable logic.  On the FPGA a ring
// is a hand-placed hard macro: a NAND gate whose first input is the enable
// and whose second input closes the loop, followed by STAGES inverters,
// one look-up table each.  With an even number of inverters the loop holds
// an odd number of inversions, so it oscillates while `en` is high, with a
// half period equal to the delay of the NAND plus all inverters.  While
// `en` is low the NAND output (which is the ring's output here) is held
// at 1.
//
// The model lumps the STAGES+1 gate delays into one half-period delay
// rather than simulating every stage, so that long counting windows stay
// cheap to simulate; the waveform seen at the output is the same.  The
// per-stage delay is a parameter, so an array of these rings can give every
// ring its own process variation.  An optional uniform jitter of up to
// +/- JITTER_PS picoseconds is added to each half period to mimic the
// small temporal fluctuation of a real ring.
//
// Interface: en (input, active high), osc (output, the ring signal).
// Timing: osc starts to toggle one half period after en rises and returns
// to 1 as soon as en falls.
module ring_oscillator #(
  parameter int unsigned STAGES         = puf_pkg::RO_STAGES, // inverters in the loop
  parameter int unsigned STAGE_DELAY_PS = 542,                // delay of one gate
  parameter int unsigned EXTRA_PS       = 0,                  // added to the half period
  parameter int unsigned JITTER_PS      = 2                   // +/- jitter per half period
) (
  input  logic en,
  output logic osc
);
  timeunit 1ns;
  timeprecision 1ps;

  // NAND gate plus STAGES inverters in one half period.
  localparam int unsigned HALF_PS = (STAGES + 1) * STAGE_DELAY_PS + EXTRA_PS;

  int unsigned jit;
  int          half_now;

  initial osc = 1'b1;

  always begin
    if (en) begin
      jit = (JITTER_PS == 0) ? 0 : ($urandom % (2 * JITTER_PS + 1));
      half_now = int'(HALF_PS) + int'(jit) - int'(JITTER_PS);
      #(half_now * 1ps);
      osc = en ? ~osc : 1'b1;
    end else begin
      osc = 1'b1;
      @(posedge en);
    end
  end

endmodule
