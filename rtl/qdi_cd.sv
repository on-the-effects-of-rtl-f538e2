// qdi_cd: completion detector for a two-signal dual-rail bus.
//
// One OR gate per dual-rail signal joins its two rails (high when the signal
// carries DATA); a Muller C-element joins the two OR outputs. The output
// therefore rises only when every signal holds DATA and falls only when every
// signal has returned to NULL, which is the completion detector the latch of
// the pipeline is built from. Nine fault pins from LOC: OR of signal 0
// (3 pins), OR of signal 1 (3 pins), C-element (3 pins).
//
// obs = {done, or1, or0}. Timing: D_OR2 + D_CELEM ticks from the last rail.
module qdi_cd
  import qdi_pkg::*;
#(
  parameter int unsigned LOC = 0
) (
  input  logic            clk,
  input  logic            rst,
  input  fault_t          fault,
  input  dr_t [NSIG-1:0]  d,
  output logic            done,
  output logic [2:0]      obs
);

  logic [NSIG-1:0] valid;

  for (genvar s = 0; s < NSIG; s++) begin : g_or
    qdi_or #(.N(2), .DELAY(D_OR2), .LOC(LOC + 3*s)) u_or (
      .clk, .rst, .fault, .a({d[s].f, d[s].t}), .y(valid[s]));
  end

  qdi_celem #(.LOC(LOC + 3*NSIG)) u_join (
    .clk, .rst, .fault, .a(valid[0]), .b(valid[1]), .y(done));

  assign obs = {done, valid};

  initial begin
    assert (NSIG == 2) else $error("qdi_cd: built for two dual-rail signals");
  end

endmodule
