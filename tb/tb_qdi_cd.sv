// tb_qdi_cd: self-checking test of the completion detector.
//
// done must rise only when both dual-rail signals carry DATA, fall only when
// both are NULL, and hold in between, D_OR2 + D_CELEM ticks after the last
// input change. Also checks the OR outputs in obs and a stuck-at-1 fault on
// the join C-element's output.
`timescale 1ns/1ps
module tb_qdi_cd;
  import qdi_pkg::*;

  logic clk = 1'b0, rst;
  fault_t fault;
  dr_t [NSIG-1:0] d;
  logic done;
  logic [2:0] obs;
  int checks = 0, failures = 0;
  logic model;

  localparam int unsigned LAT = D_OR2 + D_CELEM;

  qdi_cd #(.LOC(0)) dut (.clk, .rst, .fault, .d, .done, .obs);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic v0, v1;
    fault = NO_FAULT; d = '0; rst = 1; model = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      // random legal code word per signal: NULL, DATA0 or DATA1
      for (int s = 0; s < int'(NSIG); s++) begin
        case ($urandom_range(0, 2))
          0: d[s] = '0;
          1: d[s] = dr_enc(1'b0);
          default: d[s] = dr_enc(1'b1);
        endcase
      end
      v0 = dr_valid(d[0]); v1 = dr_valid(d[1]);
      if (v0 && v1) model = 1;
      else if (!v0 && !v1) model = 0;
      repeat (LAT) @(negedge clk);
      check(done == model, $sformatf("done=%0d exp %0d", done, model));
      check(obs[1:0] == {v1, v0}, "OR outputs");
    end
    // SA1 on the join output (pin 8)
    d = '0;
    repeat (LAT) @(negedge clk);
    fault = '{en: 1, sa: 1, loc: 7'd8};
    @(negedge clk);
    check(done == 1, "SA1 on output forces done");
    fault = NO_FAULT;
    @(negedge clk);
    check(done == 0, "done returns after fault removal");
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
