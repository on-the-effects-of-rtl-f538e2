// tb_qdi_trace_compare: self-checking test of the output trace comparator.
//
// Plays two rail streams into the comparator. Identical event sequences
// with the second one delayed must not mismatch; an extra glitch, a
// missing event and a changed value must each be found at the right event
// position, with the before/after-repair attribution of that event. The
// event counters and the overflow flag of a small memory are checked too.
`timescale 1ns/1ps
module tb_qdi_trace_compare;
  import qdi_pkg::*;

  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0, rst, released;
  logic [NRAIL-1:0] f_rails, g_rails;
  logic [15:0] f_events, g_events, first_mismatch;
  logic mismatch, mismatch_pre, overflow;
  int checks = 0, failures = 0;
  logic [NRAIL-1:0] seq [40];

  qdi_trace_compare #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // a legal-looking trace: DATA word, NULL, DATA word, ...
  task automatic make_seq();
    for (int i = 0; i < 40; i++) begin
      if (i % 2 == 1) seq[i] = '0;
      else seq[i] = {($urandom_range(0, 1) ? 2'b10 : 2'b01), ($urandom_range(0, 1) ? 2'b10 : 2'b01)};
    end
  endtask

  task automatic reset_dut();
    rst = 1; released = 0; f_rails = '0; g_rails = '0;
    repeat (2) @(negedge clk);
    rst = 0;
  endtask

  // play seq on the golden side, then on the faulty side with an edit:
  // mode 0 none, 1 extra glitch before event k, 2 event k dropped,
  // 3 event k changed. rel_at: event index at which released rises.
  task automatic play(int mode, int k, int rel_at);
    for (int i = 0; i < 40; i++) begin
      g_rails = seq[i];
      repeat (3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      if (i == rel_at) released = 1;
      if (mode == 1 && i == k) begin
        f_rails = f_rails ^ 4'b0100;
        repeat (2) @(negedge clk);
      end
      if (!(mode == 2 && i == k)) begin
        f_rails = (mode == 3 && i == k) ? (seq[i] ^ 4'b0011) : seq[i];
        repeat (1 + $urandom_range(0, 4)) @(negedge clk);
      end
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    make_seq();
    // identical, delayed
    reset_dut();
    play(0, 0, 100);
    check(!mismatch && f_events == 40 && g_events == 40, "equal traces match");
    // extra glitch before event 10, before repair
    reset_dut();
    play(1, 10, 20);
    check(mismatch && first_mismatch == 10 && mismatch_pre, "extra glitch found");
    check(f_events == 41, "extra event counted");
    // event 14 dropped, after repair
    reset_dut();
    play(2, 14, 5);
    check(mismatch && first_mismatch == 14 && !mismatch_pre, "missing event found");
    // event 22 changed
    reset_dut();
    play(3, 22, 30);
    check(mismatch && first_mismatch == 22 && mismatch_pre, "changed event found");
    // overflow of the memory
    reset_dut();
    for (int i = 0; i < int'(DEPTH) + 4; i++) begin
      f_rails = f_rails ^ 4'b0001;
      g_rails = g_rails ^ 4'b0001;
      @(negedge clk);
    end
    @(negedge clk);
    check(overflow && f_events == 16'(DEPTH) && !mismatch, "overflow flagged");
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
