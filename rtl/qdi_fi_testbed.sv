// qdi_fi_testbed: fault-injection set-up for a three-stage QDI pipeline.
//
// Two copies of the pipeline run side by side from one reset. The first
// (faulty) copy has its victim stage S2 exposed to a single stuck-at fault
// given on the fault port: any input or output pin of any of the 18 gates of
// S2 (55 locations), stuck at 0 or 1, switched on and off at run time. The
// second (golden) copy never sees a fault. Each copy has its own ideal
// source and ideal sink with the same T_src and T_snk, so until the fault
// acts both copies move in lock step.
//
// The effect monitor compares the gate outputs of the two S2 stages and
// classifies the fault as immediate freeze, late detection or premature
// firing once the faulty pipeline has deadlocked. The trace checkers compare
// every token reaching each sink with the correct half-adder result; errors
// are split into those seen while the fault was present and those seen after
// it was removed. The trace comparator records every transition of the
// output rails of both pipelines and compares the two traces in order. A testbench (or an on-chip controller) runs one experiment
// as: reset, set fault.en at the injection time, wait for deadlock, clear
// fault.en, let the source finish, read the counters.
//
// Ports: t_src / t_snk in ticks (>= 1); n_tokens per run. All outputs are
// plain status signals. Timing: one emulation-clock tick is the time unit of
// all gate delays (see qdi_pkg).
module qdi_fi_testbed
  import qdi_pkg::*;
#(
  parameter int unsigned DL_TICKS    = 256,
  parameter int unsigned TRACE_DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst,
  input  fault_t       fault,
  input  logic         en,
  input  logic [15:0]  n_tokens,
  input  logic [7:0]   t_src,
  input  logic [7:0]   t_snk,
  // effect classification
  output effect_t      effect,
  output logic         injected,
  output logic         deadlock,
  output logic         diverged,
  output logic         stimulated,
  output logic [7:0]   phases,
  output logic [15:0]  freeze_ticks,
  // output traces
  output logic [15:0]  f_sent,
  output logic [15:0]  f_tokens,
  output logic [15:0]  f_err_pre,
  output logic [15:0]  f_err_post,
  output logic         f_illegal,
  output logic         f_src_done,
  output logic [15:0]  g_tokens,
  output logic [15:0]  g_errors,
  output logic         g_src_done,
  output logic         g_illegal,
  // output transition traces, faulty against golden
  output logic         tr_mismatch,
  output logic         tr_mismatch_pre,
  output logic [15:0]  tr_first,
  output logic [15:0]  tr_f_events,
  output logic [15:0]  tr_g_events,
  output logic         tr_overflow
);

  // ---------------------------------------------------------- faulty copy
  dr_t [NSIG-1:0] f_din, f_dout;
  logic f_ack_src, f_ack_snk, f_tv;
  logic [1:0]  f_tval;
  logic [15:0] f_tidx, f_cnt, f_ntok;
  logic [N_OBS-1:0] f_s1, f_s2, f_s3;
  logic [2:0] f_sack, f_sctrl;
  logic released;

  qdi_source u_src_f (
    .clk, .rst, .en, .n_tokens, .t_src, .ack(f_ack_src), .dout(f_din),
    .sent(f_sent), .done(f_src_done));

  qdi_pipeline u_pipe_f (
    .clk, .rst, .fault, .din(f_din), .ack_src(f_ack_src), .dout(f_dout),
    .ack_snk(f_ack_snk), .s2_obs(f_s2), .stage_ack(f_sack),
    .stage_ctrl(f_sctrl), .s1_obs(f_s1), .s3_obs(f_s3));

  qdi_sink u_snk_f (
    .clk, .rst, .t_snk, .din(f_dout), .ack(f_ack_snk), .tok_valid(f_tv),
    .tok_value(f_tval), .tok_index(f_tidx), .count(f_cnt),
    .illegal(f_illegal));

  qdi_trace_checker u_chk_f (
    .clk, .rst, .released, .tok_valid(f_tv), .tok_value(f_tval),
    .tok_index(f_tidx), .n_tok(f_ntok), .err_pre(f_err_pre),
    .err_post(f_err_post));

  assign f_tokens = f_cnt;

  // ---------------------------------------------------------- golden copy
  dr_t [NSIG-1:0] g_din, g_dout;
  logic g_ack_src, g_ack_snk, g_tv;
  logic [1:0]  g_tval;
  logic [15:0] g_tidx, g_sent, g_ntok, g_err_post;
  logic [N_OBS-1:0] g_s1, g_s2, g_s3;
  logic [2:0] g_sack, g_sctrl;

  qdi_source u_src_g (
    .clk, .rst, .en, .n_tokens, .t_src, .ack(g_ack_src), .dout(g_din),
    .sent(g_sent), .done(g_src_done));

  qdi_pipeline u_pipe_g (
    .clk, .rst, .fault(NO_FAULT), .din(g_din), .ack_src(g_ack_src),
    .dout(g_dout), .ack_snk(g_ack_snk), .s2_obs(g_s2),
    .stage_ack(g_sack), .stage_ctrl(g_sctrl), .s1_obs(g_s1), .s3_obs(g_s3));

  qdi_sink u_snk_g (
    .clk, .rst, .t_snk, .din(g_dout), .ack(g_ack_snk), .tok_valid(g_tv),
    .tok_value(g_tval), .tok_index(g_tidx), .count(g_tokens),
    .illegal(g_illegal));

  qdi_trace_checker u_chk_g (
    .clk, .rst, .released(1'b0), .tok_valid(g_tv), .tok_value(g_tval),
    .tok_index(g_tidx), .n_tok(g_ntok), .err_pre(g_errors),
    .err_post(g_err_post));

  // ------------------------------------------------------- classification
  qdi_effect_monitor #(.DL_TICKS(DL_TICKS)) u_mon (
    .clk, .rst, .active(fault.en), .f_obs(f_s2), .g_obs(g_s2),
    .f_ctrl(f_sctrl[1]), .injected, .diverged, .stimulated, .deadlock,
    .phases, .freeze_ticks, .effect);

  qdi_trace_compare #(.DEPTH(TRACE_DEPTH)) u_trace (
    .clk, .rst, .released, .f_rails(f_dout), .g_rails(g_dout),
    .f_events(tr_f_events), .g_events(tr_g_events), .mismatch(tr_mismatch),
    .mismatch_pre(tr_mismatch_pre), .first_mismatch(tr_first),
    .overflow(tr_overflow));

  always_ff @(posedge clk) begin
    if (rst)                     released <= 1'b0;
    else if (injected && !fault.en) released <= 1'b1;
  end

endmodule
