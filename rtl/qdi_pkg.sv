// qdi_pkg: types, constants and helper functions shared by the QDI pipeline
// fault-injection design.
//
// The design is a gate-level model of a three-stage quasi-delay-insensitive
// (QDI) pipeline that uses dual-rail one-hot encoding and a four-phase
// return-to-zero handshake. Every gate of the victim stage has numbered pins
// (inputs and output) on which a single stuck-at fault can be injected. The
// pin numbering of the victim stage is fixed here: 22 pins in the DIMS half
// adder and 33 in the latch, 55 fault locations in all, as in the source
// description of the experiment.
//
// Time is modelled in ticks of an emulation clock: every gate updates its
// output a fixed number of ticks after its inputs change. The gate delays
// below are this design's choice (a C-element, with its keeper and larger
// logical effort, is modelled slower than an OR gate); the injection time can
// then be stepped by one tick, which is smaller than the smallest gate delay.
package qdi_pkg;

  // ---------------------------------------------------------------- encoding
  // One dual-rail signal: t = true rail, f = false rail.
  // {0,0} = NULL (spacer), {1,0} = DATA 1, {0,1} = DATA 0, {1,1} = illegal.
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  // Number of dual-rail signals in the datapath (2-bit datapath).
  localparam int unsigned NSIG = 2;
  // Number of rails in the datapath.
  localparam int unsigned NRAIL = 2 * NSIG;

  // ------------------------------------------------------------- gate delays
  // Delays in emulation-clock ticks, all >= 1.
  localparam int unsigned D_OR2   = 2;
  localparam int unsigned D_OR3   = 3;
  localparam int unsigned D_CELEM = 3;

  // ---------------------------------------------------------- fault control
  localparam int unsigned LOC_W = 7;
  typedef logic [LOC_W-1:0] loc_t;

  typedef struct packed {
    logic en;  // fault present
    logic sa;  // stuck-at value (0 = SA0, 1 = SA1)
    loc_t loc; // pin number inside the victim stage
  } fault_t;

  localparam fault_t NO_FAULT = '{en: 1'b0, sa: 1'b0, loc: '0};

  // Pin map of one stage: half adder first, then the latch.
  localparam int unsigned N_LOC_HA    = 22;
  localparam int unsigned N_LOC_LATCH = 33;
  localparam int unsigned N_LOC       = N_LOC_HA + N_LOC_LATCH;

  // Half adder (base 0): four minterm C-elements of 3 pins each, then
  // OR2 sum.t, OR2 sum.f and OR3 carry.f.
  localparam int unsigned LOC_HA_M00   = 0;
  localparam int unsigned LOC_HA_M01   = 3;
  localparam int unsigned LOC_HA_M10   = 6;
  localparam int unsigned LOC_HA_M11   = 9;
  localparam int unsigned LOC_HA_SUMT  = 12;
  localparam int unsigned LOC_HA_SUMF  = 15;
  localparam int unsigned LOC_HA_CARF  = 18;

  // Latch (offsets from the latch base): LCD (9 pins), register (4 x 3),
  // RCD (9 pins), control C-element (3 pins).
  localparam int unsigned LOC_L_LCD  = 0;
  localparam int unsigned LOC_L_REG  = 9;
  localparam int unsigned LOC_L_RCD  = 21;
  localparam int unsigned LOC_L_CTRL = 30;

  // A completion detector: OR2 per signal, then one C-element.
  localparam int unsigned N_LOC_CD = 3 * NSIG + 3;

  // Observed gate outputs of one stage: 7 in the half adder, 11 in the latch.
  localparam int unsigned N_OBS_HA    = 7;
  localparam int unsigned N_OBS_LATCH = 11;
  localparam int unsigned N_OBS       = N_OBS_HA + N_OBS_LATCH;

  // Pin value as seen by a gate: the net value, or the stuck value when the
  // fault sits on this pin.
  function automatic logic pin(logic v, fault_t f, int unsigned loc);
    return (f.en && (int'(f.loc) == loc)) ? f.sa : v;
  endfunction

  // ---------------------------------------------------------------- effects
  typedef enum logic [1:0] {
    EFF_NONE = 2'd0,  // no deviation observed
    EFF_IF   = 2'd1,  // immediate freeze
    EFF_LD   = 2'd2,  // late detection
    EFF_PF   = 2'd3   // premature firing
  } effect_t;

  // ------------------------------------------------------------ data tokens
  // Value of the k-th DATA token the source emits (D2 in bit 1, D1 in bit 0):
  // (k + k/4) mod 4. Every block of four tokens holds all four input values,
  // so seven consecutive tokens exercise every minterm of the half adder, and
  // the rotation from block to block makes a lost or duplicated token show
  // up as a data error in the tokens that follow.
  function automatic logic [1:0] src_value(logic [15:0] k);
    return k[1:0] + k[3:2];
  endfunction

  // Half adder: result {carry, sum} of the 2-bit input {b, a}.
  function automatic logic [1:0] half_add(logic [1:0] x);
    return {x[1] & x[0], x[1] ^ x[0]};
  endfunction

  // Dual-rail encode / decode helpers.
  function automatic dr_t dr_enc(logic v);
    return '{t: v, f: ~v};
  endfunction

  function automatic logic dr_valid(dr_t d);
    return d.t ^ d.f;
  endfunction

  function automatic logic dr_null(dr_t d);
    return ~d.t & ~d.f;
  endfunction

endpackage
