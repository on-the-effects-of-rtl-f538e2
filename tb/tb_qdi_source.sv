// tb_qdi_source: self-checking test of the ideal source.
//
// The testbench acknowledges each token after a random delay and checks:
// the DATA values follow src_value(k); the source changes its output exactly
// t_src ticks after it first sees the acknowledge change; it sends exactly
// n_tokens tokens, then stays NULL and reports done; it never drives DATA
// while the acknowledge is still high.
`timescale 1ns/1ps
module tb_qdi_source;
  import qdi_pkg::*;

  localparam int NTOK = 25;

  logic clk = 1'b0, rst, en, ack;
  logic [15:0] n_tokens, sent;
  logic [7:0] t_src;
  dr_t [NSIG-1:0] dout;
  logic done;
  int checks = 0, failures = 0;

  qdi_source dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit all_valid();
    return dr_valid(dout[0]) && dr_valid(dout[1]);
  endfunction

  initial begin
    int t;
    for (int ts = 1; ts <= 9; ts += 4) begin
      rst = 1; en = 0; ack = 0; n_tokens = 16'(NTOK); t_src = 8'(ts);
      repeat (3) @(negedge clk);
      rst = 0;
      check(dout == '0 && !done, "NULL while disabled");
      en = 1;
      for (int k = 0; k < NTOK; k++) begin
        t = 0;
        while (!all_valid() && t < 100) begin @(negedge clk); t++; end
        if (k > 0) check(t == ts, $sformatf("DATA %0d ticks after ack low, exp %0d", t, ts));
        check({dout[1].t, dout[0].t} == src_value(16'(k)), $sformatf("token %0d value", k));
        repeat ($urandom_range(0, 5)) @(negedge clk);
        check(all_valid(), "DATA held until acknowledged");
        ack = 1;
        @(negedge clk);
        t = 1;
        while (dout != '0 && t < 100) begin @(negedge clk); t++; end
        check(t == ts, $sformatf("NULL %0d ticks after ack high, exp %0d", t, ts));
        repeat ($urandom_range(0, 5)) @(negedge clk);
        check(dout == '0, "NULL held while ack high");
        ack = 0;
      end
      repeat (20) @(negedge clk);
      check(dout == '0 && done && sent == 16'(NTOK), "stops after n_tokens");
    end
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
