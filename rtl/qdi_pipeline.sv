// qdi_pipeline: three-stage QDI pipeline S1 -> S2 -> S3.
//
// S2 is the victim stage: it holds the DIMS half adder and its latch, and
// only its gates can carry the injected stuck-at fault. S1 is the upstream
// environment of S2 and S3 the downstream environment; both are plain
// latches. Data travel as two dual-rail signals with a four-phase
// return-to-zero handshake: each stage's right completion detector
// acknowledges its upstream neighbour, and the last stage is acknowledged by
// the sink.
//
// Placing the half adder in S2 only, and leaving S1 and S3 without logic, is
// this design's reading of a three-stage pipeline whose victim stage alone is
// counted as having half-adder fault locations.
//
// Outputs for monitoring: the 18 gate outputs of every stage (s1_obs,
// s2_obs, s3_obs), and the control signal and acknowledge of every stage.
module qdi_pipeline
  import qdi_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  fault_t            fault,
  input  dr_t  [NSIG-1:0]   din,
  output logic              ack_src,
  output dr_t  [NSIG-1:0]   dout,
  input  logic              ack_snk,
  output logic [N_OBS-1:0]  s2_obs,
  output logic [2:0]        stage_ack,
  output logic [2:0]        stage_ctrl,
  output logic [N_OBS-1:0]  s1_obs,
  output logic [N_OBS-1:0]  s3_obs
);

  dr_t  [NSIG-1:0] q1, q2;
  logic a1, a2, a3;
  logic c1, c2, c3;

  qdi_stage #(.HAS_HA(1'b0), .VICTIM(1'b0)) u_s1 (
    .clk, .rst, .fault, .d(din), .ack_out(a1), .q(q1), .ack_in(a2),
    .ctrl(c1), .obs(s1_obs));

  qdi_stage #(.HAS_HA(1'b1), .VICTIM(1'b1)) u_s2 (
    .clk, .rst, .fault, .d(q1), .ack_out(a2), .q(q2), .ack_in(a3),
    .ctrl(c2), .obs(s2_obs));

  qdi_stage #(.HAS_HA(1'b0), .VICTIM(1'b0)) u_s3 (
    .clk, .rst, .fault, .d(q2), .ack_out(a3), .q(dout), .ack_in(ack_snk),
    .ctrl(c3), .obs(s3_obs));

  assign ack_src   = a1;
  assign stage_ack  = {a3, a2, a1};
  assign stage_ctrl = {c3, c2, c1};

endmodule
