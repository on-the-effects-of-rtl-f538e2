// qdi_celem: two-input Muller C-element with pin fault injection.
//
// The output goes high when both inputs are high, low when both are low, and
// otherwise keeps its value (an AND gate with hysteresis). Input b can be
// inverted (INV_B), which the latch uses to combine its left completion
// detector with the acknowledge of the next stage.
//
// Timing: the internal state node follows the inputs one tick after they
// change; the output pin shows that node DELAY ticks after the inputs changed
// (transport delay). The state is reset to RST_VAL.
//
// Fault pins: a at LOC, b at LOC+1 (before the optional inversion) and the
// output at LOC+2. A stuck input is seen only by this gate; a stuck output
// forces the pin but leaves the state node alone, so removing the fault
// restores the gate's true state.
module qdi_celem
  import qdi_pkg::*;
#(
  parameter int unsigned DELAY   = qdi_pkg::D_CELEM,
  parameter int unsigned LOC     = 0,
  parameter bit          INV_B   = 1'b0,
  parameter bit          RST_VAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst,
  input  fault_t fault,
  input  logic   a,
  input  logic   b,
  output logic   y
);

  logic af, bf, bi, nxt;
  logic [DELAY:0] dly;  // dly[1] is the state node, dly[DELAY] the output

  assign af  = pin(a, fault, LOC);
  assign bf  = pin(b, fault, LOC + 1);
  assign bi  = INV_B ? ~bf : bf;
  assign nxt = (af & bi) | (dly[1] & (af | bi));
  assign dly[0] = nxt;

  for (genvar i = 1; i <= DELAY; i++) begin : g_dly
    always_ff @(posedge clk) begin
      if (rst) dly[i] <= RST_VAL;
      else     dly[i] <= dly[i-1];
    end
  end

  assign y = pin(dly[DELAY], fault, LOC + 2);

  initial begin
    assert (DELAY >= 1) else $error("qdi_celem: DELAY must be at least 1");
  end

endmodule
