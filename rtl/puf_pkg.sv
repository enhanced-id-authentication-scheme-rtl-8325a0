// puf_pkg: constants and types shared by the ring-oscillator PUF blocks.
//
// The ring count (32), the counter width m (32 bits) and the width k of
// one ID element (21 bits) are the sizes of the published design.  The
// record types below carry one measured frequency or one ID element
// between the blocks of the evaluation pipeline.
package puf_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  // Number of ring oscillators in the array.
  localparam int unsigned N_RO      = 32;
  // Width m of the frequency counter and of one raw frequency sample.
  localparam int unsigned M_BITS    = 32;
  // Width k of one ID element (two's complement neighbour difference).
  localparam int unsigned K_BITS    = 21;
  // Inverters per ring (2^N with N = 4), plus one NAND enable gate.
  localparam int unsigned RO_STAGES = 16;

  // Output selection of the serial link.
  typedef enum logic {
    MODE_RAW = 1'b0,   // send every raw frequency count (characterisation)
    MODE_ID  = 1'b1    // send only the (n-1) ID elements
  } out_mode_e;

endpackage
