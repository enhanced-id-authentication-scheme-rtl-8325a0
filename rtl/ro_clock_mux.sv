// ro_clock_mux: selects one ring oscillator for the frequency counter.
//
// The rings are measured one after the other by a single counter, so their
// outputs are multiplexed onto one clock line.  The select value comes from
// the index counter of the measurement sequencer.  Besides the N:1 clock
// multiplexer this block decodes the same index into one-hot ring enables,
// so that only the ring being measured oscillates (run=1) and all others
// sit still; that choice is this design's, made to keep idle rings from
// disturbing the measured one through supply noise.
//
// Interface: sel picks the ring, run enables it; ro_en goes to the NAND
// enable inputs of the rings, ro_osc comes back from them, clk_out feeds
// the counter.  Purely combinational: clk_out follows ro_osc[sel] after one
// multiplexer delay.  sel must only change while run is low, so the
// counter never sees a shortened pulse from a live ring.
module ro_clock_mux #(
  parameter int unsigned N_RO  = puf_pkg::N_RO,
  parameter int unsigned SEL_W = $clog2(N_RO)
) (
  input  logic [SEL_W-1:0] sel,
  input  logic             run,
  input  logic [N_RO-1:0]  ro_osc,
  output logic [N_RO-1:0]  ro_en,
  output logic             clk_out
);
  timeunit 1ns;
  timeprecision 1ps;


  always_comb begin
    ro_en = '0;
    if (run && (32'(sel) < N_RO)) ro_en[sel] = 1'b1;
  end

  assign clk_out = (32'(sel) < N_RO) ? ro_osc[sel] : 1'b0;

endmodule
