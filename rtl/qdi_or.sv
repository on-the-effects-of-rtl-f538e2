// qdi_or: N-input OR gate with pin fault injection.
//
// Used to join the two rails of a dual-rail signal in a completion detector
// and to merge minterms in the DIMS half adder. The output shows the OR of
// the inputs DELAY emulation-clock ticks after they change; it resets to 0.
//
// Fault pins: input i at LOC+i, the output at LOC+N.
module qdi_or
  import qdi_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned DELAY = qdi_pkg::D_OR2,
  parameter int unsigned LOC   = 0
) (
  input  logic         clk,
  input  logic         rst,
  input  fault_t       fault,
  input  logic [N-1:0] a,
  output logic         y
);

  logic [N-1:0]   af;
  logic [DELAY:0] dly;

  for (genvar i = 0; i < N; i++) begin : g_pin
    assign af[i] = pin(a[i], fault, LOC + i);
  end

  assign dly[0] = |af;

  for (genvar i = 1; i <= DELAY; i++) begin : g_dly
    always_ff @(posedge clk) begin
      if (rst) dly[i] <= 1'b0;
      else     dly[i] <= dly[i-1];
    end
  end

  assign y = pin(dly[DELAY], fault, LOC + N);

  initial begin
    assert (DELAY >= 1) else $error("qdi_or: DELAY must be at least 1");
  end

endmodule
