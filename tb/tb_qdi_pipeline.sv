// tb_qdi_pipeline: self-checking test of the three-stage pipeline.
//
// A source process and a sink process in the testbench run the four-phase
// handshake concurrently at random speeds. Every token must come out as the
// half-adder result of the token sent, in order. Checks that two
// tokens are in flight when the sink is slow (the pipeline fills), and
// that a stuck-at fault on the victim stage's right completion detector
// halts the flow while the upstream stage keeps its last token.
`timescale 1ns/1ps
module tb_qdi_pipeline;
  import qdi_pkg::*;

  localparam int NTOK = 60;

  logic clk = 1'b0, rst;
  fault_t fault;
  dr_t [NSIG-1:0] din, dout;
  logic ack_src, ack_snk;
  logic [N_OBS-1:0] s1_obs, s2_obs, s3_obs;
  logic [2:0] stage_ack, stage_ctrl;
  int checks = 0, failures = 0;
  logic [1:0] sent_v [NTOK];
  int n_sent = 0, n_recv = 0, max_fill = 0;
  int snk_delay = 1;

  qdi_pipeline dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (n_sent - n_recv > max_fill) max_fill = n_sent - n_recv;

  initial begin
    fault = NO_FAULT; din = '0; ack_snk = 0; rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      begin : source
        for (int k = 0; k < NTOK; k++) begin
          logic [1:0] v;
          v = 2'($urandom_range(0, 3));
          sent_v[k] = v;
          repeat ($urandom_range(1, 8)) @(negedge clk);
          din[0] = dr_enc(v[0]); din[1] = dr_enc(v[1]);
          n_sent++;
          while (!ack_src) @(negedge clk);
          repeat ($urandom_range(1, 8)) @(negedge clk);
          din = '0;
          while (ack_src) @(negedge clk);
        end
      end
      begin : sink
        for (int k = 0; k < NTOK; k++) begin
          snk_delay = (k < NTOK / 2) ? 60 : 1;
          while (!(dr_valid(dout[0]) && dr_valid(dout[1]))) @(negedge clk);
          check({dout[1].t, dout[0].t} == half_add(sent_v[k]),
                $sformatf("token %0d: out %0d exp %0d", k, {dout[1].t, dout[0].t},
                          half_add(sent_v[k])));
          repeat (snk_delay) @(negedge clk);
          ack_snk = 1;
          n_recv++;
          while (!(dr_null(dout[0]) && dr_null(dout[1]))) @(negedge clk);
          repeat ($urandom_range(1, 8)) @(negedge clk);
          ack_snk = 0;
        end
      end
    join
    check(n_recv == NTOK, "all tokens received");
    // each stage holds a DATA token or a NULL spacer, so three stages hold
    // at most two DATA tokens
    check(max_fill == 2, $sformatf("pipeline filled to %0d tokens", max_fill));

    // SA0 on the victim RCD join output: S1 never sees its acknowledge
    fault = '{en: 1, sa: 0, loc: 7'(N_LOC_HA + LOC_L_RCD + 8)};
    din[0] = dr_enc(1); din[1] = dr_enc(0);
    repeat (200) @(negedge clk);
    check(stage_ack[1] == 0, "victim acknowledge stuck");
    check(s2_obs[N_OBS - 1] == 1, "victim control still in DATA phase");
    din = '0;
    repeat (200) @(negedge clk);
    check(stage_ack[0] == 1, "S1 keeps its DATA token");
    check(stage_ctrl[0] == 1, "S1 stuck in its DATA phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
