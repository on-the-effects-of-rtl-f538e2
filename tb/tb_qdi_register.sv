// tb_qdi_register: self-checking test of the C-element register.
//
// With control high the register must take DATA and keep it when the input
// returns to NULL; with control low it must return to NULL once the input is
// NULL and must not take DATA. Random sequences are compared with a rail by
// rail C-element model, D_CELEM ticks after each change.
`timescale 1ns/1ps
module tb_qdi_register;
  import qdi_pkg::*;

  logic clk = 1'b0, rst;
  fault_t fault;
  dr_t [NSIG-1:0] d, q;
  logic ctrl;
  logic [NRAIL-1:0] obs, model, din;
  int checks = 0, failures = 0;

  qdi_register #(.LOC(0)) dut (.clk, .rst, .fault, .d, .ctrl, .q, .obs);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    fault = NO_FAULT; d = '0; ctrl = 0; rst = 1; model = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // directed: capture DATA, hold over NULL, release on ctrl low
    d[0] = dr_enc(1); d[1] = dr_enc(0); ctrl = 1;
    repeat (D_CELEM) @(negedge clk);
    check(q[0] == dr_enc(1) && q[1] == dr_enc(0), "DATA captured");
    d = '0;
    repeat (D_CELEM + 2) @(negedge clk);
    check(q[0] == dr_enc(1) && q[1] == dr_enc(0), "DATA held while control high");
    ctrl = 0;
    repeat (D_CELEM) @(negedge clk);
    check(q == '0, "NULL after control low");
    d[0] = dr_enc(0); d[1] = dr_enc(1);
    repeat (D_CELEM + 2) @(negedge clk);
    check(q == '0, "DATA not taken while control low");
    // random
    model = '0;
    d = '0; ctrl = 0;
    repeat (D_CELEM) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      for (int s = 0; s < int'(NSIG); s++) begin
        case ($urandom_range(0, 2))
          0: d[s] = '0;
          1: d[s] = dr_enc(1'b0);
          default: d[s] = dr_enc(1'b1);
        endcase
      end
      ctrl = 1'($urandom_range(0, 1));
      din = {d[1].f, d[1].t, d[0].f, d[0].t};
      for (int r = 0; r < int'(NRAIL); r++)
        model[r] = (din[r] & ctrl) | (model[r] & (din[r] | ctrl));
      repeat (D_CELEM) @(negedge clk);
      check(obs == model, $sformatf("rails %b exp %b", obs, model));
      check({q[1].f, q[1].t, q[0].f, q[0].t} == model, "q matches obs");
    end
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
