// tb_qdi_latch: self-checking test of the QDI return-to-zero latch.
//
// The testbench plays the upstream and downstream neighbours. It checks the
// four-phase sequence: DATA is captured only once the downstream stage has
// acknowledged the previous NULL; the captured DATA is held, and NULL is not
// taken, until the downstream acknowledge rises; ack_out follows the
// captured token. It also checks that a stuck-at-0 on the control output
// freezes the latch in its NULL phase (an inhibited transition).
`timescale 1ns/1ps
module tb_qdi_latch;
  import qdi_pkg::*;

  logic clk = 1'b0, rst;
  fault_t fault;
  dr_t [NSIG-1:0] d, q;
  logic ack_out, ack_in, ctrl;
  logic [N_OBS_LATCH-1:0] obs;
  int checks = 0, failures = 0;

  // LCD -> CTRL -> REG -> RCD
  localparam int unsigned FWD = (D_OR2 + D_CELEM) + D_CELEM + D_CELEM;
  localparam int unsigned ACK = FWD + D_OR2 + D_CELEM;

  qdi_latch #(.LOC(0)) dut (.clk, .rst, .fault, .d, .ack_out, .q, .ack_in,
                            .ctrl, .obs);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [1:0] v;
    int t;
    fault = NO_FAULT; d = '0; ack_in = 0; rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 20; n++) begin
      v = 2'($urandom_range(0, 3));
      // DATA arrives, downstream has taken NULL (ack_in low)
      d[0] = dr_enc(v[0]); d[1] = dr_enc(v[1]);
      t = 0;
      while (!ack_out && t < 100) begin @(negedge clk); t++; end
      check(t == int'(ACK), $sformatf("DATA acknowledged after %0d ticks, exp %0d", t, ACK));
      check(q[0] == dr_enc(v[0]) && q[1] == dr_enc(v[1]), "DATA captured");
      check(ctrl == 1, "control high in DATA phase");
      // upstream returns to NULL, downstream has not yet acknowledged DATA
      d = '0;
      repeat (3 * ACK) @(negedge clk);
      check(ack_out == 1 && q[0] == dr_enc(v[0]) && q[1] == dr_enc(v[1]),
            "DATA held until downstream acknowledges");
      ack_in = 1;
      t = 0;
      while (ack_out && t < 100) begin @(negedge clk); t++; end
      check(t == int'(D_CELEM + D_CELEM + D_OR2 + D_CELEM),
            $sformatf("NULL acknowledged after %0d ticks", t));
      check(q == '0 && ctrl == 0, "NULL captured");
      // next DATA must wait for downstream to take the NULL
      d[0] = dr_enc(~v[0]); d[1] = dr_enc(v[1]);
      repeat (3 * ACK) @(negedge clk);
      check(q == '0 && ack_out == 0, "DATA waits for downstream acknowledge of NULL");
      d = '0;
      repeat (ACK) @(negedge clk);
      ack_in = 0;
      repeat (D_CELEM) @(negedge clk);
    end
    // control output stuck at 0: DATA is never captured
    fault = '{en: 1, sa: 0, loc: 7'(LOC_L_CTRL + 2)};
    d[0] = dr_enc(1); d[1] = dr_enc(1);
    repeat (4 * ACK) @(negedge clk);
    check(q == '0 && ack_out == 0, "SA0 on control output freezes the latch");
    fault = NO_FAULT;
    repeat (ACK) @(negedge clk);
    check(ack_out == 1 && q[0] == dr_enc(1), "latch continues after fault removal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
