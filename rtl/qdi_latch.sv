// qdi_latch: locally-opened, normally-closed QDI return-to-zero latch.
//
// Structure (33 fault pins from LOC):
//   LCD   completion detector on the register input: high when the next
//         token is DATA, low when it is NULL;
//   REG   one C-element per rail (qdi_register);
//   RCD   completion detector on the register output; its output is the
//         acknowledge sent upstream (high: DATA captured, low: NULL
//         captured);
//   CTRL  C-element joining the LCD with the inverted acknowledge of the
//         downstream stage. It goes high (arming the register for DATA)
//         when DATA waits at the input and the next stage has taken the
//         previous NULL, and low when NULL waits and the next stage has taken
//         the previous DATA.
// The arrangement follows the latch the pipeline is described with; the
// inverting input on the control C-element is this design's reading of
// "the previous NULL (DATA) token has been processed".
//
// obs = {ctrl, rcd[2:0], reg[3:0], lcd[2:0]} (11 gate outputs).
// Handshake: four-phase return-to-zero; ack_out follows the captured token.
module qdi_latch
  import qdi_pkg::*;
#(
  parameter int unsigned LOC = 0
) (
  input  logic                   clk,
  input  logic                   rst,
  input  fault_t                 fault,
  input  dr_t  [NSIG-1:0]        d,
  output logic                   ack_out,
  output dr_t  [NSIG-1:0]        q,
  input  logic                   ack_in,
  output logic                   ctrl,
  output logic [N_OBS_LATCH-1:0] obs
);

  logic       lcd;
  logic [2:0] lcd_obs, rcd_obs;
  logic [NRAIL-1:0] reg_obs;

  qdi_cd #(.LOC(LOC + LOC_L_LCD)) u_lcd (
    .clk, .rst, .fault, .d(d), .done(lcd), .obs(lcd_obs));

  qdi_celem #(.LOC(LOC + LOC_L_CTRL), .INV_B(1'b1)) u_ctrl (
    .clk, .rst, .fault, .a(lcd), .b(ack_in), .y(ctrl));

  qdi_register #(.LOC(LOC + LOC_L_REG)) u_reg (
    .clk, .rst, .fault, .d(d), .ctrl(ctrl), .q(q), .obs(reg_obs));

  qdi_cd #(.LOC(LOC + LOC_L_RCD)) u_rcd (
    .clk, .rst, .fault, .d(q), .done(ack_out), .obs(rcd_obs));

  assign obs = {ctrl, rcd_obs, reg_obs, lcd_obs};

endmodule
