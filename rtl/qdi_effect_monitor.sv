// qdi_effect_monitor: classifies the effect of an injected fault from the
// activity of the victim stage.
//
// The faulty pipeline and a fault-free twin run in lock step from the same
// reset and the same source timing, so until the fault acts their gate
// outputs are equal tick by tick. The monitor compares the 18 gate outputs of
// the victim stage of both. At the first tick at which they differ it asks
// which side moved: if a faulty output changed where the fault-free one did
// not, the fault produced an extra transition (stimulated transition, i.e.
// premature firing); otherwise the fault held back a transition (inhibited).
// It also counts the transitions of the faulty stage's latch control after
// the injection: each is the stage entering its next DATA or NULL phase.
// When the faulty stage has been quiet for DL_TICKS ticks it is declared
// deadlocked and the effect is fixed:
//   IF  the stage never reached another phase; extra transitions may still
//       have corrupted the phase it was stuck in;
//   PF  the stage kept moving and the first deviation was a stimulated
//       transition;
//   LD  the stage kept moving and the first deviation was inhibited;
//   NONE the stage never deviated from the fault-free one.
// These criteria are this design's reading of the three effects named for
// the experiment. While active is low (before injection) nothing is
// recorded; after the fault is removed the result holds.
module qdi_effect_monitor
  import qdi_pkg::*;
#(
  parameter int unsigned DL_TICKS = 256
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              active,    // fault present
  input  logic [N_OBS-1:0]  f_obs,     // victim stage, faulty pipeline
  input  logic [N_OBS-1:0]  g_obs,     // victim stage, fault-free pipeline
  input  logic              f_ctrl,    // latch control of the faulty stage
  output logic              injected,  // a fault has been active
  output logic              diverged,
  output logic              stimulated,
  output logic              deadlock,
  output logic [7:0]        phases,
  output logic [15:0]       freeze_ticks, // injection to last activity
  output effect_t           effect
);

  logic [N_OBS-1:0] f_prev, g_prev;
  logic             ctrl_prev;
  logic [15:0]      quiet, elapsed;
  logic             differ, stim_now, f_moved;

  assign differ   = (f_obs != g_obs);
  assign stim_now = |((f_obs ^ f_prev) & ~(g_obs ^ g_prev));
  assign f_moved  = (f_obs != f_prev);

  always_ff @(posedge clk) begin
    if (rst) begin
      f_prev       <= '0;
      g_prev       <= '0;
      ctrl_prev    <= 1'b0;
      injected     <= 1'b0;
      diverged     <= 1'b0;
      stimulated   <= 1'b0;
      deadlock     <= 1'b0;
      phases       <= '0;
      quiet        <= '0;
      elapsed      <= '0;
      freeze_ticks <= '0;
    end else begin
      f_prev    <= f_obs;
      g_prev    <= g_obs;
      ctrl_prev <= f_ctrl;
      if (active && !deadlock) begin
        injected <= 1'b1;
        elapsed  <= elapsed + 16'd1;
        if (!diverged && differ) begin
          diverged   <= 1'b1;
          stimulated <= stim_now;
        end
        if (injected && (f_ctrl != ctrl_prev) && (phases != 8'hff))
          phases <= phases + 8'd1;
        if (f_moved) begin
          quiet        <= '0;
          freeze_ticks <= elapsed;
        end else if (quiet + 16'd1 >= 16'(DL_TICKS)) begin
          deadlock <= 1'b1;
        end else begin
          quiet <= quiet + 16'd1;
        end
      end
    end
  end

  always_comb begin
    if (!diverged)        effect = EFF_NONE;
    else if (phases == 0) effect = EFF_IF;
    else if (stimulated)  effect = EFF_PF;
    else                  effect = EFF_LD;
  end

endmodule
