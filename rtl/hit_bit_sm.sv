// hit_bit_sm: delay and width state machine of the hit-bit trigger.
//
// A one-clock trigger edge from the selected mode (window, table overlap or
// boolean overlap) is delayed by hits_dly clocks and then stretched into a
// t_hit pulse of live_width + 2 clocks. A live_width of zero gives no pulse
// and the trigger is dropped. While a delay or pulse is in progress, new
// trigger edges are ignored. trig_en pulses on the clock a trigger is accepted,
// telling the pattern register to load. The "+2" width rule and the "0 gives
// no pulse" rule come from the Live Trig Out WIDTH register; the register
// description also adds a fixed 14 clocks to every delay, measured from the
// FPGA input, which here is the pipeline in front of this block plus hits_dly.
// The three-state encoding is this design's own.
//
// Interface: trig (one-clock edge), hits_dly, live_width in; t_hit, trig_en,
// busy out. Timing: t_hit rises hits_dly + 1 clocks after the clock on which
// trig is high and stays high live_width + 2 clocks.
module hit_bit_sm #(
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          trig,
  input  logic [CW-1:0] hits_dly,
  input  logic [CW-1:0] live_width,
  output logic          trig_en,
  output logic          t_hit,
  output logic          busy
);
  typedef enum logic [1:0] {S_IDLE, S_DELAY, S_WIDTH} state_e;

  state_e      state;
  logic [CW:0] cnt;

  assign trig_en = (state == S_IDLE) && trig && (live_width != '0);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      t_hit <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (trig_en) begin
            if (hits_dly == '0) begin
              state <= S_WIDTH;
              cnt   <= {1'b0, live_width} + 1'b1;
              t_hit <= 1'b1;
            end else begin
              state <= S_DELAY;
              cnt   <= {1'b0, hits_dly} - 1'b1;
            end
          end
        end
        S_DELAY: begin
          if (cnt == '0) begin
            state <= S_WIDTH;
            cnt   <= {1'b0, live_width} + 1'b1;
            t_hit <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_WIDTH: begin
          if (cnt == '0) begin
            state <= S_IDLE;
            t_hit <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: begin
          state <= S_IDLE;
          t_hit <= 1'b0;
        end
      endcase
    end
  end

endmodule
