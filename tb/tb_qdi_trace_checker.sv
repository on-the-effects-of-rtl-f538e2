// tb_qdi_trace_checker: self-checking test of the sink trace checker.
//
// Feeds a stream of recorded tokens, some correct (the half-adder result of
// src_value(k)) and some deliberately wrong, before and after the release
// flag, and compares the token and error counters with a count kept here.
`timescale 1ns/1ps
module tb_qdi_trace_checker;
  import qdi_pkg::*;

  logic clk = 1'b0, rst, released, tok_valid;
  logic [1:0] tok_value;
  logic [15:0] tok_index, n_tok, err_pre, err_post;
  int checks = 0, failures = 0;
  int e_pre = 0, e_post = 0;

  qdi_trace_checker dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [1:0] good;
    rst = 1; released = 0; tok_valid = 0; tok_value = 0; tok_index = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      if (k == 100) released = 1;
      // reference: sum = a ^ b, carry = a & b
      good = src_value(16'(k));
      good = {good[1] & good[0], good[1] ^ good[0]};
      tok_index = 16'(k);
      if ($urandom_range(0, 3) == 0) begin
        tok_value = good ^ 2'($urandom_range(1, 3));
        if (released) e_post++; else e_pre++;
      end else begin
        tok_value = good;
      end
      tok_valid = 1;
      @(negedge clk);
      tok_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      check(n_tok == 16'(k + 1), "token count");
      check(err_pre == 16'(e_pre) && err_post == 16'(e_post),
            $sformatf("errors %0d/%0d exp %0d/%0d", err_pre, err_post, e_pre, e_post));
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
