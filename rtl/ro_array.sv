// ro_array: behavioural model of the array of N_RO ring oscillators.
//
// This is a simulation model, not synthesizable logic.  It instantiates
// N_RO identical rings (16 inverters and a NAND each) and gives each one a
// half period made of three parts, mirroring the frequency model
// f = f_nominal + local process variation + global process variation +
// operating-condition offset:
//   * a nominal part, (STAGES+1) * NOMINAL_STAGE_PS, the same for all rings
//     (542 ps per gate gives about 54.3 MHz);
//   * a local part in [0, LOCAL_SPREAD_PS) that differs from ring to ring
//     and is a fixed pseudo-random function of the ring index and DIE_SEED,
//     so that each seed behaves like one physical die;
//   * a global part, GLOBAL_SHIFT_PS, common to all rings of the die, that
//     stands for die-to-die variation and for temperature or voltage.
// A die is therefore described by DIE_SEED; the same die at another
// temperature keeps its seed and changes GLOBAL_SHIFT_PS.
//
// Interface: en[i] enables ring i, osc[i] is its output.  Only the ring
// being measured needs to run.
module ro_array #(
  parameter int unsigned N_RO             = puf_pkg::N_RO,
  parameter int unsigned STAGES           = puf_pkg::RO_STAGES,
  parameter int unsigned NOMINAL_STAGE_PS = 542,
  parameter int unsigned LOCAL_SPREAD_PS  = 12,
  parameter int unsigned GLOBAL_SHIFT_PS  = 0,
  parameter int unsigned JITTER_PS        = 2,
  parameter int unsigned DIE_SEED         = 1
) (
  input  logic [N_RO-1:0] en,
  output logic [N_RO-1:0] osc
);
  timeunit 1ns;
  timeprecision 1ps;

  // Integer hash of (ring, die); any well-mixed function would do.
  function automatic int unsigned local_offset(int unsigned ring, int unsigned seed);
    logic [31:0] h;
    h = 32'(ring) * 32'h9E37_79B1 ^ 32'(seed) * 32'h85EB_CA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 13);
    return (LOCAL_SPREAD_PS == 0) ? 0 : int'(h % LOCAL_SPREAD_PS);
  endfunction

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    ring_oscillator #(
      .STAGES        (STAGES),
      .STAGE_DELAY_PS(NOMINAL_STAGE_PS),
      .EXTRA_PS      (local_offset(i, DIE_SEED) + GLOBAL_SHIFT_PS),
      .JITTER_PS     (JITTER_PS)
    ) u_ro (
      .en (en[i]),
      .osc(osc[i])
    );
  end

endmodule
