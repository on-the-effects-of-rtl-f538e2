// tb_qdi_effect_monitor: self-checking test of the effect classifier.
//
// Drives synthetic activity for the faulty and fault-free victim stage:
// a faulty output moving where the fault-free one does not, followed by a
// control phase (premature firing) or by nothing (immediate freeze); a fault-free output moving where the faulty one does not, with
// and without later control transitions (late detection, immediate freeze);
// and no deviation at all. Checks the effect code, the phase count, that the
// deadlock is declared exactly DL_TICKS quiet ticks after the last activity,
// and that nothing is recorded before the fault is active.
`timescale 1ns/1ps
module tb_qdi_effect_monitor;
  import qdi_pkg::*;

  localparam int unsigned DL = 40;

  logic clk = 1'b0, rst, active, f_ctrl;
  logic [N_OBS-1:0] f_obs, g_obs;
  logic injected, diverged, stimulated, deadlock;
  logic [7:0] phases;
  logic [15:0] freeze_ticks;
  effect_t effect;
  int checks = 0, failures = 0;

  qdi_effect_monitor #(.DL_TICKS(DL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic restart();
    rst = 1; active = 0; f_obs = '0; g_obs = '0; f_ctrl = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // lock-step activity before injection must not be recorded
    for (int i = 0; i < 10; i++) begin
      f_obs = N_OBS'($urandom); g_obs = f_obs; f_ctrl = ~f_ctrl;
      @(negedge clk);
    end
    check(!injected && !diverged && phases == 0, "nothing recorded before injection");
    f_ctrl = 0; f_obs = '0; g_obs = '0;
    @(negedge clk);
  endtask

  // keep toggling bit 0 on both sides for n ticks
  task automatic lockstep(int n);
    for (int i = 0; i < n; i++) begin
      f_obs[0] = ~f_obs[0]; g_obs[0] = ~g_obs[0];
      @(negedge clk);
    end
  endtask

  // tick counter and the tick at which the faulty side last moved
  int cyc = 0, last_move = 0;
  logic [N_OBS-1:0] f_seen = '0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (f_obs != f_seen) last_move <= cyc;
    f_seen <= f_obs;
  end

  task automatic wait_deadlock(int expect_ticks);
    int t = 0;
    while (!deadlock && t < 1000) begin @(negedge clk); t++; end
    // deadlock was set at edge cyc-1; the last move was seen at last_move
    check(cyc - 1 - last_move == expect_ticks,
          $sformatf("deadlock %0d ticks after last move, exp %0d", cyc - 1 - last_move, expect_ticks));
  endtask

  initial begin
    // ---- premature firing: faulty bit 5 rises, fault-free does not
    restart();
    active = 1;
    lockstep(5);
    f_obs[5] = 1;
    @(negedge clk);
    check(diverged && stimulated, "stimulated transition seen");
    f_ctrl = 1; f_obs[N_OBS-1] = 1;
    lockstep(3);
    wait_deadlock(int'(DL));
    check(effect == EFF_PF && phases == 1, "PF");

    // ---- extra transition, but the stage never changes phase: IF
    restart();
    active = 1;
    lockstep(4);
    f_obs[9] = 1;
    @(negedge clk);
    check(diverged && stimulated, "stimulated transition seen (frozen)");
    wait_deadlock(int'(DL));
    check(effect == EFF_IF && phases == 0, "IF after a stimulated transition");

    // ---- immediate freeze: fault-free bit 3 rises, faulty stays
    restart();
    active = 1;
    lockstep(3);
    g_obs[3] = 1;
    @(negedge clk);
    check(diverged && !stimulated, "inhibited transition seen");
    wait_deadlock(int'(DL));
    check(effect == EFF_IF && phases == 0, "IF");

    // ---- late detection: deviation, then two more control phases
    restart();
    active = 1;
    lockstep(2);
    g_obs[7] = 1;
    @(negedge clk);
    f_ctrl = 1; f_obs[N_OBS-1] = 1;
    lockstep(4);
    f_ctrl = 0; f_obs[N_OBS-1] = 0;
    lockstep(4);
    wait_deadlock(int'(DL));
    check(effect == EFF_LD && phases == 2, $sformatf("LD with %0d phases", phases));

    // ---- no deviation
    restart();
    active = 1;
    lockstep(6);
    wait_deadlock(int'(DL));
    check(effect == EFF_NONE && !diverged, "NONE");
    // result holds after the fault is removed
    active = 0;
    g_obs = '1;
    repeat (5) @(negedge clk);
    check(effect == EFF_NONE && deadlock, "result held after removal");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
