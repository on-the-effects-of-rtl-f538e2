// qdi_source: ideal data source for the QDI pipeline.
//
// The source sends n_tokens DATA tokens, each followed by a NULL spacer,
// under the four-phase return-to-zero protocol. Its only timing is T_src:
// t_src ticks after it sees the acknowledge rise (DATA taken) it drives NULL,
// and t_src ticks after it sees the acknowledge fall it drives the next DATA
// token. The k-th DATA token carries qdi_pkg::src_value(k). The source is
// called ideal because its outputs switch all rails at once and never
// glitch. Sending starts after reset when en is high; t_src must be >= 1.
// The token sequence and the run-time setting of T_src are this design's
// choice.
//
// Outputs: dout (two dual-rail signals), sent = DATA tokens acknowledged so
// far, done = all tokens sent and the last NULL driven.
module qdi_source
  import qdi_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [15:0]      n_tokens,
  input  logic [7:0]       t_src,
  input  logic             ack,
  output dr_t  [NSIG-1:0]  dout,
  output logic [15:0]      sent,
  output logic             done
);

  typedef enum logic {SRC_NULL, SRC_DATA} src_state_t;

  src_state_t  state;
  logic [7:0]  timer;
  logic [1:0]  val;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= SRC_NULL;
      sent  <= '0;
      timer <= '0;
    end else begin
      unique case (state)
        SRC_NULL: begin
          if (!ack && en && (sent < n_tokens)) begin
            if (timer + 8'd1 >= t_src) begin
              state <= SRC_DATA;
              timer <= '0;
            end else begin
              timer <= timer + 8'd1;
            end
          end else begin
            timer <= '0;
          end
        end
        SRC_DATA: begin
          if (ack) begin
            if (timer + 8'd1 >= t_src) begin
              state <= SRC_NULL;
              sent  <= sent + 16'd1;
              timer <= '0;
            end else begin
              timer <= timer + 8'd1;
            end
          end else begin
            timer <= '0;
          end
        end
        default: state <= SRC_NULL;
      endcase
    end
  end

  assign val = src_value(sent);

  for (genvar s = 0; s < NSIG; s++) begin : g_out
    assign dout[s] = (state == SRC_DATA) ? dr_enc(val[s]) : '0;
  end

  assign done = (state == SRC_NULL) && (sent >= n_tokens);

endmodule
