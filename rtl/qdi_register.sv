// qdi_register: dual-rail register made of one Muller C-element per rail.
//
// Each rail's C-element combines the incoming rail with the latch control
// signal. Control high arms the register for DATA: a rail that is high at
// the input goes high at the output. Control low arms it for NULL: a rail
// falls once its input has fallen. In between, the C-elements hold the
// stored token, so the register is opaque until the control logic opens it
// for the next phase.
//
// Rail r = 2*signal + (0 for the true rail, 1 for the false rail). Fault
// pins from LOC, three per rail: data input, control input, output.
// obs = the four rail outputs. Timing: D_CELEM ticks.
module qdi_register
  import qdi_pkg::*;
#(
  parameter int unsigned LOC = 0
) (
  input  logic              clk,
  input  logic              rst,
  input  fault_t            fault,
  input  dr_t  [NSIG-1:0]   d,
  input  logic              ctrl,
  output dr_t  [NSIG-1:0]   q,
  output logic [NRAIL-1:0]  obs
);

  for (genvar s = 0; s < NSIG; s++) begin : g_sig
    qdi_celem #(.LOC(LOC + 6*s)) u_t (
      .clk, .rst, .fault, .a(d[s].t), .b(ctrl), .y(q[s].t));
    qdi_celem #(.LOC(LOC + 6*s + 3)) u_f (
      .clk, .rst, .fault, .a(d[s].f), .b(ctrl), .y(q[s].f));
    assign obs[2*s]   = q[s].t;
    assign obs[2*s+1] = q[s].f;
  end

endmodule
