// tb_qdi_fi_campaign: exhaustive stuck-at fault-injection campaign on the
// victim stage of the QDI pipeline.
//
// The sweep covers every fault pin of the victim stage (22 in the half
// adder, 33 in the latch), both polarities (SA0, SA1), a fast and a slow
// source and sink (T_src, T_snk in {2, 40} ticks: balanced, bubble-limited
// with T_snk > T_src, token-limited with T_src > T_snk), and every injection
// time within one token period of the fault-free pipeline, starting when the
// fourth token has been acknowledged (the pipeline is then in its steady
// state), in steps of one tick, which is below the
// smallest gate delay. Slower settings have longer periods and so get more
// injections. Nine more tokens follow, enough to exercise every minterm. For each experiment: inject, wait until the faulty pipeline
// deadlocks, remove the fault, let the source finish and compare the sink's
// tokens with the correct results.
//
// Reported per T_src/T_snk setting: the share of immediate freeze (IF), late
// detection (LD) and premature firing (PF), faults that never acted, and the
// share of experiments ending with incorrect results after the fault was
// removed, split into silent data corruption (wrong data reached the sink
// while the fault was present) and latent state corruption (the wrong data
// appeared only after the repair).
//
// Checks per experiment: the fault-free twin delivers every token correctly;
// a fault that made the victim stage deviate halts the faulty pipeline before
// all tokens are delivered; the effect code agrees with the evidence.
// Checks over the campaign: all three effects occur, and faults that corrupt
// the state as well as faults after which the pipeline resumes correctly both
// occur.
`timescale 1ns/1ps
module tb_qdi_fi_campaign;
  import qdi_pkg::*;

  localparam int unsigned NTOK      = 13;
  localparam int unsigned START_TOK = 4;
  localparam int NSPEED = 2;
  localparam logic [7:0] SPEED [NSPEED] = '{8'd2, 8'd40};

  logic clk = 1'b0;
  logic rst;
  fault_t fault;
  logic en;
  logic [15:0] n_tokens;
  logic [7:0] t_src, t_snk;
  effect_t effect;
  logic injected, deadlock, diverged, stimulated, f_illegal, f_src_done;
  logic g_src_done, g_illegal;
  logic [7:0] phases;
  logic [15:0] freeze_ticks, f_sent, f_tokens, f_err_pre, f_err_post;
  logic [15:0] g_tokens, g_errors;
  logic tr_mismatch, tr_mismatch_pre, tr_overflow;
  logic [15:0] tr_first, tr_f_events, tr_g_events;

  int checks = 0, failures = 0;

  qdi_fi_testbed dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // outcome counters: [effect][0 = correct, 1 = SDC, 2 = LSC]
  int cnt [4][3];
  // per setting: share of the incorrect cases by effect, and incorrect share
  real sh_if [NSPEED*NSPEED], sh_ld [NSPEED*NSPEED], sh_pf [NSPEED*NSPEED];
  real sh_bad [NSPEED*NSPEED];
  int n_trace = 0, n_trace_pre = 0;
  int n_ill = 0, n_wrong_pre = 0, n_wrong_post = 0, n_stuck = 0;
  int tot [4][3];

  task automatic experiment(int loc, bit sa, logic [7:0] ts, logic [7:0] tk,
                            int offset);
    int t;
    bit ok, ill_pre;
    int outcome;
    fault    = NO_FAULT;
    en       = 1'b0;
    n_tokens = 16'(NTOK);
    t_src    = ts;
    t_snk    = tk;
    rst      = 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    en  <= 1'b1;
    t = 0;
    while (f_sent < 16'(START_TOK) && t < 4000) begin @(posedge clk); t++; end
    repeat (offset) @(posedge clk);
    fault <= '{en: 1'b1, sa: sa, loc: loc_t'(loc)};
    t = 0;
    while (!deadlock && t < 8000) begin @(posedge clk); t++; end
    @(posedge clk);
    if (diverged) begin
      check(deadlock && f_tokens < 16'(NTOK),
            $sformatf("loc %0d sa%0d t%0d/%0d +%0d: no halt", loc, sa, ts, tk, offset));
    end
    unique case (effect)
      EFF_PF:  check(diverged && stimulated && phases != 0, "PF code");
      EFF_IF:  check(diverged && phases == 0, "IF code");
      EFF_LD:  check(diverged && !stimulated && phases != 0, "LD code");
      default: check(!diverged, "NONE code");
    endcase
    ill_pre = f_illegal;
    fault <= NO_FAULT;
    ok = 1'b0;
    for (int i = 0; i < 8000; i++) begin
      @(posedge clk);
      if (f_src_done && g_src_done && f_tokens == 16'(NTOK) &&
          g_tokens == 16'(NTOK)) begin
        ok = 1'b1;
        break;
      end
    end
    // let the last NULL spacer reach the sink
    repeat (100) @(posedge clk);
    check(g_errors == 0 && g_tokens == 16'(NTOK) && !g_illegal,
          "fault-free twin delivers every token correctly");
    if (tr_mismatch || tr_f_events != tr_g_events) n_trace++;
    if (tr_mismatch && tr_mismatch_pre) n_trace_pre++;
    check(!tr_overflow, "trace memory large enough");
    if (ill_pre) n_ill++;
    if (f_err_pre != 0) n_wrong_pre++;
    if (f_err_post != 0) n_wrong_post++;
    if (!ok) n_stuck++;
    if (ok && f_err_pre == 0 && f_err_post == 0 && !f_illegal) outcome = 0;
    else if (f_err_pre != 0 || ill_pre) outcome = 1;
    else outcome = 2;
    cnt[int'(effect)][outcome]++;
  endtask

  // token period of the fault-free pipeline: ticks between two tokens sent
  task automatic measure_period(logic [7:0] ts, logic [7:0] tk, output int p);
    int t0;
    fault = NO_FAULT; en = 1'b0; n_tokens = 16'(NTOK); t_src = ts; t_snk = tk;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    en  <= 1'b1;
    while (f_sent < 16'(START_TOK)) @(posedge clk);
    t0 = 0;
    while (f_sent < 16'(START_TOK + 1)) begin @(posedge clk); t0++; end
    p = t0;
  endtask

  task automatic show_range(string what, real v [NSPEED*NSPEED]);
    real lo, hi, sum;
    lo = v[0]; hi = v[0]; sum = 0.0;
    for (int i = 0; i < NSPEED * NSPEED; i++) begin
      if (v[i] < lo) lo = v[i];
      if (v[i] > hi) hi = v[i];
      sum += v[i];
    end
    $display("%s: %5.1f%% / %5.1f%% / %5.1f%%", what, lo, sum / real'(NSPEED * NSPEED), hi);
  endtask

  function automatic real pct(int a, int b);
    return (b == 0) ? 0.0 : 100.0 * real'(a) / real'(b);
  endfunction

  initial begin
    int n, nif, nld, npf, nnone, nbad, nsdc, nlsc, period;
    for (int e = 0; e < 4; e++) for (int o = 0; o < 3; o++) tot[e][o] = 0;
    $display("T_src T_snk period  exps    IF%%    LD%%    PF%%  none%%  incorrect%%  (SDC%%  LSC%%)");
    for (int si = 0; si < NSPEED; si++) begin
      for (int ki = 0; ki < NSPEED; ki++) begin
        for (int e = 0; e < 4; e++) for (int o = 0; o < 3; o++) cnt[e][o] = 0;
        measure_period(SPEED[si], SPEED[ki], period);
        for (int loc = 0; loc < int'(N_LOC); loc++)
          for (int sa = 0; sa < 2; sa++)
            for (int off = 0; off < period; off++)
              experiment(loc, sa[0], SPEED[si], SPEED[ki], off);
        n = 0; nbad = 0; nsdc = 0; nlsc = 0;
        for (int e = 0; e < 4; e++) begin
          for (int o = 0; o < 3; o++) begin
            n += cnt[e][o];
            tot[e][o] += cnt[e][o];
          end
          nsdc += cnt[e][1];
          nlsc += cnt[e][2];
        end
        nbad = nsdc + nlsc;
        nnone = cnt[0][0] + cnt[0][1] + cnt[0][2];
        nif   = cnt[1][0] + cnt[1][1] + cnt[1][2];
        nld   = cnt[2][0] + cnt[2][1] + cnt[2][2];
        npf   = cnt[3][0] + cnt[3][1] + cnt[3][2];
        sh_if[si*NSPEED+ki]  = pct(cnt[1][1] + cnt[1][2], nbad);
        sh_ld[si*NSPEED+ki]  = pct(cnt[2][1] + cnt[2][2], nbad);
        sh_pf[si*NSPEED+ki]  = pct(cnt[3][1] + cnt[3][2], nbad);
        sh_bad[si*NSPEED+ki] = pct(nbad, n);
        $display("%5d %5d %6d %6d %6.1f %6.1f %6.1f %6.1f %10.1f   (%5.1f %5.1f)",
                 SPEED[si], SPEED[ki], period, n, pct(nif, n), pct(nld, n), pct(npf, n),
                 pct(nnone, n), pct(nbad, n), pct(nsdc, n), pct(nlsc, n));
      end
    end
    begin
      int all, bad, ebad [4], eall [4];
      all = 0; bad = 0;
      for (int e = 0; e < 4; e++) begin
        eall[e] = tot[e][0] + tot[e][1] + tot[e][2];
        ebad[e] = tot[e][1] + tot[e][2];
        all += eall[e];
        bad += ebad[e];
      end
      $display("all settings: %0d experiments, incorrect after repair %0.1f%%", all, pct(bad, all));
      $display("  share of incorrect cases: IF %0.1f%%  LD %0.1f%%  PF %0.1f%%  none %0.1f%%",
               pct(ebad[1], bad), pct(ebad[2], bad), pct(ebad[3], bad), pct(ebad[0], bad));
      $display("  incorrect within effect:  IF %0.1f%%  LD %0.1f%%  PF %0.1f%%",
               pct(ebad[1], eall[1]), pct(ebad[2], eall[2]), pct(ebad[3], eall[3]));
      $display("incorrect operation after repair, over the settings (min / avg / max):");
      show_range("  share of incorrect cases from IF", sh_if);
      show_range("  share of incorrect cases from LD", sh_ld);
      show_range("  share of incorrect cases from PF", sh_pf);
      show_range("  incorrect cases of all injections", sh_bad);
      check(eall[1] > 0 && eall[2] > 0 && eall[3] > 0, "IF, LD and PF all occur");
      check(bad > 0 && bad < all, "both corrupted and clean recoveries occur");
    end
    $display("  experiments with: illegal code word at the sink before repair %0d,",
             n_ill);
    $display("    wrong value before repair %0d, wrong value after repair %0d,",
             n_wrong_pre, n_wrong_post);
    $display("    pipeline not completing after repair %0d", n_stuck);
    $display("  output transition trace differs from the golden one: %0d (first difference before repair: %0d)",
             n_trace, n_trace_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("  experiments with: illegal code word at the sink before repair %0d,",
             n_ill);
    $display("    wrong value before repair %0d, wrong value after repair %0d,",
             n_wrong_pre, n_wrong_post);
    $display("    pipeline not completing after repair %0d", n_stuck);
    $display("  output transition trace differs from the golden one: %0d (first difference before repair: %0d)",
             n_trace, n_trace_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
