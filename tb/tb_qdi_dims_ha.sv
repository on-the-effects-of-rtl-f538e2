// tb_qdi_dims_ha: self-checking test of the DIMS dual-rail half adder.
//
// For every pair of DATA inputs: with only one input valid the outputs must
// stay NULL (the minterms wait for complete input); with both valid the sum
// and carry must be correct within D_CELEM + D_OR3 ticks and never show an
// illegal code word; after both inputs return to NULL the outputs must
// return to NULL. Also checks the seven observed gate outputs (exactly one
// minterm high) and a stuck-at-0 fault on the a.t-b.t minterm output.
`timescale 1ns/1ps
module tb_qdi_dims_ha;
  import qdi_pkg::*;

  logic clk = 1'b0, rst;
  fault_t fault;
  dr_t [1:0] x, y;
  logic [N_OBS_HA-1:0] obs;
  int checks = 0, failures = 0;

  localparam int unsigned LAT = D_CELEM + D_OR3;

  qdi_dims_ha dut (.clk, .rst, .fault, .x, .y, .obs);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit is_null2(dr_t [1:0] v);
    return dr_null(v[0]) && dr_null(v[1]);
  endfunction

  initial begin
    logic [1:0] r;
    fault = NO_FAULT; x = '0; rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 4; v++) begin
        // first input only
        @(negedge clk); x[0] = dr_enc(v[0]);
        repeat (LAT + 2) @(negedge clk);
        check(is_null2(y), "outputs wait for the second input");
        // both inputs
        x[1] = dr_enc(v[1]);
        for (int t = 1; t <= int'(LAT); t++) begin
          @(negedge clk);
          check(!(y[0].t & y[0].f) && !(y[1].t & y[1].f), "no illegal code word");
        end
        r = half_add(2'(v));
        check(dr_valid(y[0]) && dr_valid(y[1]), $sformatf("valid after %0d ticks", LAT));
        check(y[0].t == r[0] && y[1].t == r[1],
              $sformatf("x=%0d sum/carry=%0d%0d exp %0d%0d", v, y[1].t, y[0].t, r[1], r[0]));
        check($countones(obs[3:0]) == 1, "one minterm high");
        // return to NULL: one input first, outputs hold
        x[1] = '0;
        repeat (LAT + 2) @(negedge clk);
        check(dr_valid(y[0]) && dr_valid(y[1]), "outputs hold until both inputs NULL");
        x[0] = '0;
        repeat (LAT) @(negedge clk);
        check(is_null2(y) && obs == '0, "outputs NULL");
      end
    end
    // stuck-at-0 on the output of minterm a.t b.t (pin 11)
    fault = '{en: 1, sa: 0, loc: 7'(LOC_HA_M11 + 2)};
    @(negedge clk); x[0] = dr_enc(1); x[1] = dr_enc(1);
    repeat (LAT + 2) @(negedge clk);
    check(dr_null(y[1]) && y[0].f == 0 && y[0].t == 0, "minterm m11 SA0 blocks the result");
    fault = NO_FAULT;
    repeat (LAT) @(negedge clk);
    check(y[1].t && y[0].f, "result after fault removal");

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
