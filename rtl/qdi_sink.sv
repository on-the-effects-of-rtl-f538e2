// qdi_sink: ideal data sink for the QDI pipeline.
//
// The sink watches the two dual-rail signals at the pipeline output. When
// both carry DATA it waits T_snk (t_snk ticks, >= 1), records the token and
// raises its acknowledge; when both have returned to NULL it waits t_snk
// ticks and lowers the acknowledge. It is called ideal because it detects
// completion without gates of its own that could fail.
//
// Outputs: ack to the last stage; tok_valid pulses for one tick with the
// recorded token value (bit s = true rail of signal s) and its index
// tok_index; count = tokens recorded; illegal goes high (sticky) when a
// signal shows both rails high, which no fault-free QDI circuit produces.
module qdi_sink
  import qdi_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [7:0]       t_snk,
  input  dr_t  [NSIG-1:0]  din,
  output logic             ack,
  output logic             tok_valid,
  output logic [1:0]       tok_value,
  output logic [15:0]      tok_index,
  output logic [15:0]      count,
  output logic             illegal
);

  logic       all_data, all_null, any_bad;
  logic [7:0] timer;

  always_comb begin
    all_data = 1'b1;
    all_null = 1'b1;
    any_bad  = 1'b0;
    for (int s = 0; s < NSIG; s++) begin
      all_data &= dr_valid(din[s]);
      all_null &= dr_null(din[s]);
      any_bad  |= din[s].t & din[s].f;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ack       <= 1'b0;
      timer     <= '0;
      count     <= '0;
      tok_valid <= 1'b0;
      tok_value <= '0;
      tok_index <= '0;
      illegal   <= 1'b0;
    end else begin
      tok_valid <= 1'b0;
      if (any_bad) illegal <= 1'b1;
      if ((!ack && all_data) || (ack && all_null)) begin
        if (timer + 8'd1 >= t_snk) begin
          timer <= '0;
          ack   <= ~ack;
          if (!ack) begin
            tok_valid <= 1'b1;
            tok_index <= count;
            for (int s = 0; s < NSIG; s++) tok_value[s] <= din[s].t;
            count <= count + 16'd1;
          end
        end else begin
          timer <= timer + 8'd1;
        end
      end else begin
        timer <= '0;
      end
    end
  end

endmodule
