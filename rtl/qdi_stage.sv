// qdi_stage: one QDI pipeline stage, an optional DIMS half adder followed
// by the return-to-zero latch.
//
// With HAS_HA the stage computes {carry, sum} of its two dual-rail inputs
// before latching; without it the stage only latches. With VICTIM the stage
// accepts the injected fault; otherwise its gates see no fault. Fault pins:
// half adder 0..21, latch 22..54 (see qdi_pkg).
//
// obs = {latch obs (11), half-adder obs (7)}; the half-adder part is 0 when
// the stage has no half adder. ctrl is the latch control signal; each of its
// transitions marks the stage entering the next phase (DATA or NULL).
module qdi_stage
  import qdi_pkg::*;
#(
  parameter bit HAS_HA = 1'b1,
  parameter bit VICTIM = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  input  fault_t            fault,
  input  dr_t  [NSIG-1:0]   d,
  output logic              ack_out,
  output dr_t  [NSIG-1:0]   q,
  input  logic              ack_in,
  output logic              ctrl,
  output logic [N_OBS-1:0]  obs
);

  fault_t f;
  dr_t [NSIG-1:0] lin;
  logic [N_OBS_HA-1:0] ha_obs;
  logic [N_OBS_LATCH-1:0] l_obs;

  assign f = VICTIM ? fault : NO_FAULT;

  if (HAS_HA) begin : g_ha
    qdi_dims_ha #(.LOC(0)) u_ha (
      .clk, .rst, .fault(f), .x(d), .y(lin), .obs(ha_obs));
  end else begin : g_wire
    assign lin    = d;
    assign ha_obs = '0;
  end

  qdi_latch #(.LOC(N_LOC_HA)) u_latch (
    .clk, .rst, .fault(f), .d(lin), .ack_out, .q, .ack_in, .ctrl,
    .obs(l_obs));

  assign obs = {l_obs, ha_obs};

endmodule
