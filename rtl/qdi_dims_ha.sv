// qdi_dims_ha: dual-rail half adder in delay-insensitive minterm synthesis
// (DIMS).
//
// Each of the four input minterms (a.f b.f, a.f b.t, a.t b.f, a.t b.t) is
// detected by a Muller C-element, so a minterm rises only when a complete
// DATA code word is present on both inputs and falls only when both inputs
// have returned to NULL. The output rails are ORs of minterms:
//   sum.t   = m01 | m10        sum.f   = m00 | m11
//   carry.t = m11              carry.f = m00 | m01 | m10
// The netlist has 22 fault pins: 4 C-elements x 3, two OR2 x 3, one OR3 x 4,
// numbered from LOC as in qdi_pkg. The structure follows the DIMS method the
// pipeline is described with; pin numbering and gate delays are this
// design's choice.
//
// Interface: x[0] is input D1 (a), x[1] input D2 (b); y[0] is the sum, y[1]
// the carry. obs gives the seven gate outputs {carry.f, sum.f, sum.t, m11,
// m10, m01, m00} for activity monitoring.
// Timing: a DATA or NULL wave passes in D_CELEM + D_OR3 ticks at most.
module qdi_dims_ha
  import qdi_pkg::*;
#(
  parameter int unsigned LOC = 0
) (
  input  logic              clk,
  input  logic              rst,
  input  fault_t            fault,
  input  dr_t  [1:0]        x,
  output dr_t  [1:0]        y,
  output logic [N_OBS_HA-1:0] obs
);

  logic m00, m01, m10, m11, sum_t, sum_f, car_f;

  qdi_celem #(.LOC(LOC + LOC_HA_M00)) u_m00 (
    .clk, .rst, .fault, .a(x[0].f), .b(x[1].f), .y(m00));
  qdi_celem #(.LOC(LOC + LOC_HA_M01)) u_m01 (
    .clk, .rst, .fault, .a(x[0].f), .b(x[1].t), .y(m01));
  qdi_celem #(.LOC(LOC + LOC_HA_M10)) u_m10 (
    .clk, .rst, .fault, .a(x[0].t), .b(x[1].f), .y(m10));
  qdi_celem #(.LOC(LOC + LOC_HA_M11)) u_m11 (
    .clk, .rst, .fault, .a(x[0].t), .b(x[1].t), .y(m11));

  qdi_or #(.N(2), .DELAY(D_OR2), .LOC(LOC + LOC_HA_SUMT)) u_sum_t (
    .clk, .rst, .fault, .a({m10, m01}), .y(sum_t));
  qdi_or #(.N(2), .DELAY(D_OR2), .LOC(LOC + LOC_HA_SUMF)) u_sum_f (
    .clk, .rst, .fault, .a({m11, m00}), .y(sum_f));
  qdi_or #(.N(3), .DELAY(D_OR3), .LOC(LOC + LOC_HA_CARF)) u_car_f (
    .clk, .rst, .fault, .a({m10, m01, m00}), .y(car_f));

  assign y[0] = '{t: sum_t, f: sum_f};
  assign y[1] = '{t: m11,   f: car_f};
  assign obs  = {car_f, sum_f, sum_t, m11, m10, m01, m00};

endmodule
