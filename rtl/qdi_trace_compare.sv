// qdi_trace_compare: compares the transition traces at the outputs of the
// faulty and the fault-free pipeline.
//
// Every change of the four output rails (the sink input) is a trace event.
// Each pipeline's events are written in order into its own trace memory of
// DEPTH entries, 4 bits each (the new rail values). A compare pointer walks
// both memories as soon as both hold an entry at that position and flags the
// first position where the rail values differ. Events are compared by order,
// not by time, so a faulty pipeline that is only delayed is not a mismatch,
// while an extra glitch, a missing transition or a wrong value is. Unlike
// the token check this also catches rail pulses that never form a complete
// code word. The faulty trace also records whether each event happened
// before the fault was removed, so a mismatch can be attributed to the
// faulty run or to the run after the repair.
//
// Outputs: f_events / g_events count events (saturating at DEPTH, with
// overflow set); mismatch and first_mismatch give the first differing
// position, mismatch_pre whether that faulty event came before the repair.
// Equal counts at the end of a run are checked by the user of the counters.
// Timing: an event is compared at the earliest one tick after both are
// written. DEPTH is this design's choice.
module qdi_trace_compare
  import qdi_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              released,
  input  logic [NRAIL-1:0]  f_rails,
  input  logic [NRAIL-1:0]  g_rails,
  output logic [15:0]       f_events,
  output logic [15:0]       g_events,
  output logic              mismatch,
  output logic              mismatch_pre,
  output logic [15:0]       first_mismatch,
  output logic              overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    logic             pre;    // recorded while the fault was present
    logic [NRAIL-1:0] rails;
  } fev_t;

  fev_t             f_mem [DEPTH];
  logic [NRAIL-1:0] g_mem [DEPTH];
  logic [NRAIL-1:0] f_prev, g_prev;
  logic [15:0]      ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      f_prev   <= '0;
      g_prev   <= '0;
      f_events <= '0;
      g_events <= '0;
      overflow <= 1'b0;
    end else begin
      f_prev <= f_rails;
      g_prev <= g_rails;
      if (f_rails != f_prev) begin
        if (f_events < 16'(DEPTH)) f_events <= f_events + 16'd1;
        else                       overflow <= 1'b1;
      end
      if (g_rails != g_prev) begin
        if (g_events < 16'(DEPTH)) g_events <= g_events + 16'd1;
        else                       overflow <= 1'b1;
      end
    end
  end

  // trace memories (no reset: entries are written before they are read)
  always_ff @(posedge clk) begin
    if (!rst && f_rails != f_prev && f_events < 16'(DEPTH))
      f_mem[AW'(f_events)] <= '{pre: ~released, rails: f_rails};
    if (!rst && g_rails != g_prev && g_events < 16'(DEPTH))
      g_mem[AW'(g_events)] <= g_rails;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr            <= '0;
      mismatch       <= 1'b0;
      mismatch_pre   <= 1'b0;
      first_mismatch <= '0;
    end else if (!mismatch && ptr < f_events && ptr < g_events) begin
      if (f_mem[AW'(ptr)].rails != g_mem[AW'(ptr)]) begin
        mismatch       <= 1'b1;
        mismatch_pre   <= f_mem[AW'(ptr)].pre;
        first_mismatch <= ptr;
      end else begin
        ptr <= ptr + 16'd1;
      end
    end
  end

endmodule
