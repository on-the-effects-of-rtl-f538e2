// tb_qdi_sink: self-checking test of the ideal sink.
//
// The testbench drives DATA and NULL code words on the sink input and checks
// that the acknowledge rises exactly t_snk ticks after complete DATA and
// falls t_snk ticks after complete NULL, that partial words are not
// acknowledged, that every token is recorded once with its value and index,
// and that a word with both rails high sets the illegal flag.
`timescale 1ns/1ps
module tb_qdi_sink;
  import qdi_pkg::*;

  logic clk = 1'b0, rst;
  logic [7:0] t_snk;
  dr_t [NSIG-1:0] din;
  logic ack, tok_valid, illegal;
  logic [1:0] tok_value;
  logic [15:0] tok_index, count;
  int checks = 0, failures = 0;
  int n_pulses = 0;
  logic [1:0] last_value;

  qdi_sink dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && tok_valid) begin
    n_pulses++;
    last_value = tok_value;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [1:0] v;
    int t;
    for (int ts = 1; ts <= 7; ts += 3) begin
      rst = 1; din = '0; t_snk = 8'(ts); n_pulses = 0;
      repeat (3) @(negedge clk);
      rst = 0;
      for (int k = 0; k < 20; k++) begin
        v = 2'($urandom_range(0, 3));
        din[0] = dr_enc(v[0]);
        repeat (10) @(negedge clk);
        check(!ack, "partial DATA not acknowledged");
        din[1] = dr_enc(v[1]);
        t = 0;
        while (!ack && t < 100) begin @(negedge clk); t++; end
        check(t == ts, $sformatf("ack after %0d ticks, exp %0d", t, ts));
        @(negedge clk);
        check(last_value == v && tok_index == 16'(k) && count == 16'(k + 1),
              $sformatf("token %0d recorded", k));
        din[0] = '0;
        repeat (10) @(negedge clk);
        check(ack, "partial NULL not acknowledged");
        din[1] = '0;
        t = 0;
        while (ack && t < 100) begin @(negedge clk); t++; end
        check(t == ts, $sformatf("ack low after %0d ticks, exp %0d", t, ts));
      end
      check(n_pulses == 20, "one record per token");
      check(!illegal, "no illegal word seen");
      din[0] = '{t: 1'b1, f: 1'b1};
      @(negedge clk); @(negedge clk);
      check(illegal, "illegal word flagged");
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
