// measure_ctrl: sequencer that measures every ring once, one after another.
//
// A run starts on `start`.  An index counter steps through the rings
// 0..N_RO-1; its value drives the clock multiplexer, as in the document,
// where the multiplexer is controlled by a counter value that switches the
// rings in succession.  For each ring the sequencer
//   SETTLE: enables the ring and holds the counter in clear for SETTLE_CYCLES,
//   GATE:   opens the counter gate for exactly GATE_CYCLES system cycles,
//   HOLD:   closes the gate and waits HOLD_CYCLES so the count is stable,
//   OUT:    latches the count and offers it downstream (valid/ready),
//           stalling until it is taken,
// and then moves to the next ring.  The ring is switched off in OUT, so
// the select only changes while no ring runs.
//
// The document gives the single counter, the multiplexer and its
// index counter; the state sequence, the settle and hold times and the
// downstream handshake are this design's choices.  The gate length sets
// the scale of the counts: count = f_ring * GATE_CYCLES / f_clk.
// SETTLE_CYCLES and HOLD_CYCLES must cover three periods of the slowest
// ring (the synchroniser depth in freq_counter plus one).
//
// Timing: one ring takes SETTLE+GATE+HOLD+1 cycles plus any stall; a
// full run is N_RO times that.  done pulses for one cycle after the last
// sample has been taken.
module measure_ctrl #(
  parameter int unsigned N_RO          = puf_pkg::N_RO,
  parameter int unsigned M_BITS        = puf_pkg::M_BITS,
  parameter int unsigned GATE_CYCLES   = 1 << 20,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned HOLD_CYCLES   = 16,
  parameter int unsigned SEL_W         = $clog2(N_RO)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // to ro_clock_mux and freq_counter
  output logic [SEL_W-1:0]  sel,
  output logic              ro_run,
  output logic              cnt_clear,
  output logic              cnt_gate,
  input  logic [M_BITS-1:0] cnt_value,
  // measured frequency stream
  output logic              s_valid,
  input  logic              s_ready,
  output logic [SEL_W-1:0]  s_idx,
  output logic [M_BITS-1:0] s_freq,
  output logic              s_last
);
  timeunit 1ns;
  timeprecision 1ps;


  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_GATE, S_HOLD, S_OUT} state_e;

  localparam int unsigned TMR_W = $clog2(GATE_CYCLES + SETTLE_CYCLES + HOLD_CYCLES + 1);

  state_e           state;
  logic [TMR_W-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      timer  <= '0;
      sel    <= '0;
      s_freq <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          sel   <= '0;
          timer <= TMR_W'(SETTLE_CYCLES - 1);
          state <= S_SETTLE;
        end
        S_SETTLE: begin
          if (timer == '0) begin
            timer <= TMR_W'(GATE_CYCLES - 1);
            state <= S_GATE;
          end else timer <= timer - 1'b1;
        end
        S_GATE: begin
          if (timer == '0) begin
            timer <= TMR_W'(HOLD_CYCLES - 1);
            state <= S_HOLD;
          end else timer <= timer - 1'b1;
        end
        S_HOLD: begin
          if (timer == '0) begin
            s_freq <= cnt_value;
            state  <= S_OUT;
          end else timer <= timer - 1'b1;
        end
        S_OUT: if (s_ready) begin
          if (32'(sel) == N_RO - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            sel   <= sel + 1'b1;
            timer <= TMR_W'(SETTLE_CYCLES - 1);
            state <= S_SETTLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign ro_run    = (state == S_SETTLE) || (state == S_GATE) || (state == S_HOLD);
  assign cnt_clear = (state == S_SETTLE);
  assign cnt_gate  = (state == S_GATE);
  assign s_valid   = (state == S_OUT);
  assign s_idx     = sel;
  assign s_last    = (32'(sel) == N_RO - 1);

  // A sample on offer stays on offer, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           s_valid && !s_ready |=> s_valid && $stable(s_freq) && $stable(s_idx));

endmodule
