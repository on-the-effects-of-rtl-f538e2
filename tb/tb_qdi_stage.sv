// tb_qdi_stage: self-checking test of a pipeline stage.
//
// Two stages in a row: a victim stage with half adder and a plain latch stage
// that takes no fault. The testbench acts as source and sink with a
// four-phase handshake, sends random tokens and checks that each comes out
// as its half-adder result. A stuck-at-1 on the half adder's sum.t output
// must be seen only by the victim stage and must make the pipeline halt.
`timescale 1ns/1ps
module tb_qdi_stage;
  import qdi_pkg::*;

  logic clk = 1'b0, rst;
  fault_t fault;
  dr_t [NSIG-1:0] d, q1, q2;
  logic a1, a2, ack_snk, c1, c2;
  logic [N_OBS-1:0] o1, o2;
  int checks = 0, failures = 0;

  qdi_stage #(.HAS_HA(1'b1), .VICTIM(1'b1)) dut (
    .clk, .rst, .fault, .d, .ack_out(a1), .q(q1), .ack_in(a2), .ctrl(c1), .obs(o1));
  qdi_stage #(.HAS_HA(1'b0), .VICTIM(1'b0)) dut2 (
    .clk, .rst, .fault, .d(q1), .ack_out(a2), .q(q2), .ack_in(ack_snk), .ctrl(c2), .obs(o2));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one token and receive one result; returns 0 on a timeout
  task automatic transfer(input logic [1:0] v, output logic [1:0] r, output bit ok);
    int t;
    ok = 1;
    d[0] = dr_enc(v[0]); d[1] = dr_enc(v[1]);
    t = 0;
    while (!(dr_valid(q2[0]) && dr_valid(q2[1])) && t < 200) begin @(negedge clk); t++; end
    if (t >= 200) ok = 0;
    r = {q2[1].t, q2[0].t};
    ack_snk = 1;
    t = 0;
    while (!a1 && t < 200) begin @(negedge clk); t++; end
    d = '0;
    while (!(dr_null(q2[0]) && dr_null(q2[1])) && t < 400) begin @(negedge clk); t++; end
    ack_snk = 0;
    while (a1 && t < 600) begin @(negedge clk); t++; end
    if (t >= 600) ok = 0;
  endtask

  initial begin
    logic [1:0] v, r;
    bit ok;
    fault = NO_FAULT; d = '0; ack_snk = 0; rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 40; n++) begin
      v = 2'($urandom_range(0, 3));
      transfer(v, r, ok);
      check(ok, "token passes");
      check(r == half_add(v), $sformatf("in %0d out %0d exp %0d", v, r, half_add(v)));
    end
    check(o2[N_OBS_HA-1:0] == '0, "no half adder in the plain stage");
    // a fault on pin 54 (victim control output) SA1: the plain stage must
    // not see it (its control keeps toggling), the victim stage halts
    fault = '{en: 1, sa: 0, loc: 7'(N_LOC_HA + LOC_L_CTRL + 2)};
    transfer(2'b11, r, ok);
    check(!ok, "victim stage halts on control SA0");
    check(dr_null(q2[0]) && dr_null(q2[1]), "no token passes the frozen stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
