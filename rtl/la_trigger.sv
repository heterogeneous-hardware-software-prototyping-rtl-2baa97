// la_trigger: trigger logic and capture sequencer of the LA_RCS analyser.
//
// The analyser is activated ("armed") by a command from the control interface.
// While armed it compares the probe with a trigger pattern (value under mask,
// mask 0 = don't care) on every clock edge; the first matching edge, or a
// trigger forced by command, starts the capture, and the triggering sample is
// the first one offered for capture. An arm command that also forces the
// trigger starts the capture at once, with the sample of the following edge.
// Capture runs until the capture memory
// reports that a sample could not be stored, or until a stop command. A new
// arm command restarts from any state, so one analyser can be used several
// times in a row.
//
// Interface: arm/force_trig/stop are one-cycle command pulses; full comes from
// the run-length encoder; state is IDLE/ARMED/RUN/DONE; window is high on the
// edges whose sample belongs to the capture (before the CED is applied);
// fired pulses on the triggering edge.
// Timing: window and fired are combinational from the (registered) probe, the
// state changes on the next rising edge. Synchronous active-high reset.
// Arming, triggering from a pattern and forced triggering follow the described
// analyser; the four-state sequencer and the stop command are this design's own.
module la_trigger
  import apsi_pkg::*;
#(
  parameter int unsigned PROBE_W = 64
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               arm,
  input  logic               force_trig,
  input  logic               stop,
  input  logic               full,
  input  logic [PROBE_W-1:0] probe,
  input  logic [PROBE_W-1:0] value,
  input  logic [PROBE_W-1:0] mask,
  output la_state_e          state,
  output logic               window,
  output logic               fired
);
  logic match;

  always_comb begin
    match  = ((probe ^ value) & mask) == '0;
    fired  = (state == LA_ARMED) && (match || force_trig) && !arm && !stop;
    window = fired || ((state == LA_RUN) && !full && !arm && !stop);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= LA_IDLE;
    end else if (arm) begin
      state <= force_trig ? LA_RUN : LA_ARMED;
    end else begin
      unique case (state)
        LA_IDLE:  state <= LA_IDLE;
        LA_ARMED: if (stop) state <= LA_DONE;
                  else if (fired) state <= LA_RUN;
        LA_RUN:   if (stop || full) state <= LA_DONE;
        LA_DONE:  state <= LA_DONE;
        default:  state <= LA_IDLE;
      endcase
    end
  end
endmodule
