// qdi_trace_checker: compares the tokens a sink records with the correct
// results of the pipeline.
//
// The k-th token at the sink must equal half_add(src_value(k)), the half-adder
// result of the k-th token the source sent; any lost, duplicated or corrupted
// token therefore shows up as a mismatch. This takes the place of comparing
// the sink trace with a fault-free reference run. Mismatches are counted
// separately before the fault is removed (err_pre: incorrect data reached the
// output while the fault was present) and after it (err_post: the pipeline
// state was corrupted and stays wrong after the repair).
//
// Timing: one result per tok_valid pulse; counters update on the next edge.
module qdi_trace_checker
  import qdi_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         released,   // fault has been removed
  input  logic         tok_valid,
  input  logic [1:0]   tok_value,
  input  logic [15:0]  tok_index,
  output logic [15:0]  n_tok,
  output logic [15:0]  err_pre,
  output logic [15:0]  err_post
);

  logic [1:0] expected;
  assign expected = half_add(src_value(tok_index));

  always_ff @(posedge clk) begin
    if (rst) begin
      n_tok    <= '0;
      err_pre  <= '0;
      err_post <= '0;
    end else if (tok_valid) begin
      n_tok <= n_tok + 16'd1;
      if (tok_value != expected) begin
        if (released) err_post <= err_post + 16'd1;
        else          err_pre  <= err_pre + 16'd1;
      end
    end
  end

endmodule
