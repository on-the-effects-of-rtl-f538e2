// tb_qdi_celem: self-checking test of the Muller C-element.
//
// Checks the set / reset / hold behaviour for every input sequence of a
// plain and an inverting-input instance, the delay of exactly D_CELEM ticks
// from input change to output, and stuck-at faults on the input and output
// pins, including that removing an output fault restores the held state.
`timescale 1ns/1ps
module tb_qdi_celem;
  import qdi_pkg::*;

  logic clk = 1'b0, rst;
  logic a, b;
  logic y, yi;
  fault_t fault;
  int checks = 0, failures = 0;

  qdi_celem #(.LOC(10)) dut (.clk, .rst, .fault, .a, .b, .y);
  qdi_celem #(.LOC(20), .INV_B(1'b1)) dut_i (.clk, .rst, .fault, .a, .b, .y(yi));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // apply inputs, wait D_CELEM ticks, compare with the reference model
  task automatic step(logic na, logic nb);
    logic exp_y, exp_yi;
    exp_y  = (na & nb) | (y & (na | nb));
    exp_yi = (na & ~nb) | (yi & (na | ~nb));
    @(negedge clk); a = na; b = nb;
    for (int i = 1; i < int'(D_CELEM); i++) begin
      @(negedge clk);
    end
    @(negedge clk);
    check(y == exp_y, $sformatf("C(%0d,%0d) y=%0d exp %0d", na, nb, y, exp_y));
    check(yi == exp_yi, $sformatf("Cinv(%0d,%0d) y=%0d exp %0d", na, nb, yi, exp_yi));
  endtask

  initial begin
    fault = NO_FAULT; a = 0; b = 0; rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    check(y == 0, "reset value");
    // walk through sequences including holds
    for (int n = 0; n < 64; n++) step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    step(1, 1); step(0, 1); step(1, 0); step(0, 0); step(1, 0); step(0, 1);
    step(1, 1); step(1, 0); step(0, 0);

    // exact delay: output must not change before D_CELEM ticks
    @(negedge clk); a = 1; b = 1;
    for (int i = 1; i < int'(D_CELEM); i++) begin
      @(negedge clk);
      check(y == 0, "output changed before D_CELEM ticks");
    end
    @(negedge clk);
    check(y == 1, "output changed after D_CELEM ticks");

    // fault on input a (pin 10) stuck at 0: the gate keeps its 1 while
    // a real input drop would not change it, then cannot fall until b falls
    @(negedge clk); fault = '{en: 1, sa: 0, loc: 7'd10};
    a = 1; b = 0;
    repeat (D_CELEM + 1) @(negedge clk);
    check(y == 0, "SA0 on a: falls when b falls");
    b = 1;
    repeat (D_CELEM + 1) @(negedge clk);
    check(y == 0, "SA0 on a: cannot rise");
    // fault on output (pin 12) stuck at 1 masks the held 0
    fault = '{en: 1, sa: 1, loc: 7'd12};
    @(negedge clk);
    check(y == 1, "SA1 on output");
    fault = NO_FAULT;
    repeat (D_CELEM) @(negedge clk);
    check(y == 1, "state after removing fault: a=b=1 now sets");
    // fault on inverting instance input b (pin 21) stuck at 1 -> seen as 0
    a = 1; b = 0;
    fault = '{en: 1, sa: 1, loc: 7'd21};
    repeat (D_CELEM + 1) @(negedge clk);
    a = 0;
    repeat (D_CELEM + 1) @(negedge clk);
    check(yi == 0, "SA1 on inverted b: falls with a low");
    a = 1;
    repeat (D_CELEM + 1) @(negedge clk);
    check(yi == 0, "SA1 on inverted b: cannot rise");
    fault = NO_FAULT;
    repeat (D_CELEM + 1) @(negedge clk);
    check(yi == 1, "rises after fault removal");

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
