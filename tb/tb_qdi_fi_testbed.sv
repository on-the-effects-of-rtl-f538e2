// tb_qdi_fi_testbed: end-to-end test of the fault-injection set-up.
//
// First a fault-free run: both pipelines must carry every token with the
// correct half-adder result, in lock step, and no deadlock may be reported.
// Then one experiment per fault (55 pins x SA0/SA1) at a fixed injection
// point, for a bubble-limited and a token-limited source/sink setting. Each
// experiment: reset, start, inject after the first token has entered, wait
// for the deadlock, remove the fault, let the source finish, read the
// result. Checks: the golden pipeline is always correct; every fault that
// made the victim stage deviate ends in a deadlock (a QDI pipeline halts on a
// permanent fault); the effect code matches the recorded evidence; a fault on
// the latch control output freezes the pipeline at once. Each mechanism
// (deadlock, immediate freeze, late detection, premature firing, fail-stop
// recovery, state corruption, output trace deviation) must occur at least
// once. A wrong token at the sink must also show as a trace deviation.
`timescale 1ns/1ps
module tb_qdi_fi_testbed;
  import qdi_pkg::*;

  localparam int unsigned NTOK = 12;

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
  int n_deadlock = 0, n_if = 0, n_ld = 0, n_pf = 0, n_none = 0;
  int n_fs = 0, n_sdc = 0, n_lsc = 0, n_exp = 0, n_trace = 0;
  longint unsigned ticks = 0;

  qdi_fi_testbed dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ticks <= ticks + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic start_run(logic [7:0] ts, logic [7:0] tk);
    fault    = NO_FAULT;
    en       = 1'b0;
    n_tokens = 16'(NTOK);
    t_src    = ts;
    t_snk    = tk;
    rst      = 1'b1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    en  <= 1'b1;
  endtask

  // Wait until the condition holds, at most max ticks; returns 1 on success.
  task automatic wait_done(output bit ok, input int max);
    ok = 1'b0;
    for (int i = 0; i < max; i++) begin
      @(posedge clk);
      if (f_src_done && g_src_done && f_tokens == 16'(NTOK) &&
          g_tokens == 16'(NTOK)) begin
        ok = 1'b1;
        break;
      end
    end
    // let the last NULL spacer reach the sink
    repeat (100) @(posedge clk);
  endtask

  task automatic experiment(int loc, bit sa, logic [7:0] ts, logic [7:0] tk,
                            int offset);
    bit ok, ill_pre;
    int t;
    start_run(ts, tk);
    // inject after the first token has entered the pipeline
    t = 0;
    while (f_sent == 0 && t < 2000) begin @(posedge clk); t++; end
    repeat (offset) @(posedge clk);
    fault <= '{en: 1'b1, sa: sa, loc: loc_t'(loc)};
    t = 0;
    while (!deadlock && t < 4000) begin @(posedge clk); t++; end
    @(posedge clk);
    n_exp++;
    if (diverged) begin
      check(deadlock, $sformatf("loc %0d sa%0d: deviated but no deadlock", loc, sa));
    end
    if (diverged) begin
      check(f_tokens < 16'(NTOK),
            $sformatf("loc %0d sa%0d: halted only after the last token", loc, sa));
    end
    ill_pre = f_illegal;
    if (deadlock) n_deadlock++;
    // effect code consistent with the evidence
    case (effect)
      EFF_PF: begin n_pf++; check(diverged && stimulated && phases != 0, "PF code"); end
      EFF_IF: begin n_if++; check(diverged && phases == 0, "IF code"); end
      EFF_LD: begin n_ld++; check(diverged && !stimulated && phases != 0, "LD code"); end
      default: begin n_none++; check(!diverged, "NONE code"); end
    endcase
    // remove the fault and let the pipeline finish
    fault <= NO_FAULT;
    wait_done(ok, 6000);
    check(g_errors == 0 && g_tokens == 16'(NTOK) && !g_illegal,
          $sformatf("loc %0d sa%0d: golden pipeline wrong", loc, sa));
    if (tr_mismatch || tr_f_events != tr_g_events) n_trace++;
    // a wrong token at the sink always shows in the transition trace too
    if (f_err_pre != 0 || f_err_post != 0 || f_illegal)
      check(tr_mismatch || tr_f_events != tr_g_events,
            $sformatf("loc %0d sa%0d: wrong token but equal traces", loc, sa));
    if (ok && !tr_mismatch)
      check(tr_f_events == tr_g_events, "clean run has a complete trace");
    if (ok && f_err_pre == 0 && f_err_post == 0 && !f_illegal) n_fs++;
    else if (f_err_pre != 0 || ill_pre) n_sdc++;
    else n_lsc++;
  endtask

  initial begin
    bit ok;
    // ---------------- fault-free run
    start_run(8'd4, 8'd4);
    wait_done(ok, 5000);
    check(ok, "fault-free run completes");
    check(f_err_pre == 0 && f_err_post == 0 && g_errors == 0, "fault-free results correct");
    check(!f_illegal && !g_illegal, "no illegal code words");
    check(!deadlock && !injected && effect == EFF_NONE, "no effect without a fault");
    check(dut.u_mon.f_obs == dut.u_mon.g_obs, "twins in lock step");
    check(!tr_mismatch && !tr_overflow && tr_f_events == tr_g_events &&
          tr_f_events >= 16'(2 * NTOK), "output traces equal");

    // ---------------- control C-element output stuck at 0 during a DATA phase
    experiment(N_LOC_HA + LOC_L_CTRL + 2, 1'b0, 8'd4, 8'd4, 0);

    // ---------------- all faults, bubble-limited and token-limited
    for (int setting = 0; setting < 2; setting++) begin
      for (int loc = 0; loc < int'(N_LOC); loc++) begin
        for (int sa = 0; sa < 2; sa++) begin
          if (setting == 0) experiment(loc, sa[0], 8'd2, 8'd20, 7);
          else              experiment(loc, sa[0], 8'd20, 8'd2, 7);
        end
      end
    end

    $display("experiments=%0d deadlock=%0d IF=%0d LD=%0d PF=%0d none=%0d FS=%0d SDC=%0d LSC=%0d trace=%0d",
             n_exp, n_deadlock, n_if, n_ld, n_pf, n_none, n_fs, n_sdc, n_lsc, n_trace);
    check(n_deadlock > 0, "deadlock occurred");
    check(n_if > 0, "immediate freeze occurred");
    check(n_ld > 0, "late detection occurred");
    check(n_pf > 0, "premature firing occurred");
    check(n_fs > 0, "fail-stop recovery occurred");
    check(n_sdc + n_lsc > 0, "state corruption occurred");
    check(n_trace > 0, "output trace deviation occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
