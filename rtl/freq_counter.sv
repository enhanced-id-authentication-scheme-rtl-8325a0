// freq_counter: the single m-bit counter that measures a ring frequency.
//
// The counter is clocked by the selected ring itself, so it counts ring
// periods directly and needs no sampling of a fast signal.  Its gate and
// clear controls come from the system-clock sequencer and are brought into
// the ring's clock domain by two-flip-flop synchronisers.  Because opening
// and closing the gate pass through the same synchroniser, the window in
// which edges are counted is the sequencer's gate length to within one ring
// period.  The count is a quasi-static value: the sequencer reads it only
// after the gate has been closed for several ring periods, so no
// synchroniser is needed on the way back.
//
// One counter serves all rings (the document's choice, which removes any
// bias between per-ring counters).  Synchronisers and the wrap-around
// behaviour are this design's choices; with 32 bits the count does not wrap
// for any realistic window.
//
// Interface: ro_clk (the selected ring), rst_n (asynchronous, active low),
// clear and gate (system domain, level), count (ring domain, stable once the
// gate has been low for three ring periods).
module freq_counter #(
  parameter int unsigned M_BITS = puf_pkg::M_BITS
) (
  input  logic              ro_clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              gate,
  output logic [M_BITS-1:0] count
);
  timeunit 1ns;
  timeprecision 1ps;


  logic [1:0] gate_sync, clear_sync;

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_sync  <= '0;
      clear_sync <= '0;
    end else begin
      gate_sync  <= {gate_sync[0], gate};
      clear_sync <= {clear_sync[0], clear};
    end
  end

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n)             count <= '0;
    else if (clear_sync[1]) count <= '0;
    else if (gate_sync[1])  count <= count + 1'b1;
  end

endmodule
