// extern_fifo_write: live trigger and the write of the 32-bit hit word into
// the external HIT/SUM FIFO.
//
// sel_sum picks the trigger and the pattern: T_HIT with the hit pattern, or
// T_SUM with the sum pattern. The chosen trigger is driven out as live_trig.
// On a rising edge of the live trigger, if the previous trigger is finished and
// trig_ready from the VME FPGA is high, the hit word {event number, pattern}
// is latched onto fifo_data, latched_trig goes high, and fifo_clk gives one
// high pulse of FIFO_CLK_HI clocks, starting one clock after the data, to
// write the word into the external FIFO. The VME FPGA acknowledges by pulling
// trig_ready low; latched_trig then falls. Triggers that come while a word is
// in progress, or while trig_ready is low, are ignored. The event number
// counts accepted triggers from 1 after reset. This is the handshake of the
// live trigger timing diagram; the 2-flop synchroniser on trig_ready, the
// data set-up clock and FIFO_CLK_HI are this design's choices.
//
// Interface: t_hit, t_sum, hit_pattern, sum_pattern, sel_sum, trig_ready in;
// live_trig, latched_trig, fifo_clk, fifo_data, event_num out, plus
// one-clock strobes accepted / ignored_busy / ignored_not_ready.
// Timing: live_trig follows the selected trigger by one clock; latched_trig
// and fifo_data change one clock after live_trig rises; fifo_clk rises one
// clock after that.
module extern_fifo_write #(
  parameter int unsigned PW          = 16,
  parameter int unsigned FIFO_CLK_HI = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            t_hit,
  input  logic            t_sum,
  input  logic [PW-1:0]   hit_pattern,
  input  logic [PW-1:0]   sum_pattern,
  input  logic            sel_sum,
  input  logic            trig_ready,
  output logic            live_trig,
  output logic            latched_trig,
  output logic            fifo_clk,
  output logic [2*PW-1:0] fifo_data,
  output logic [PW-1:0]   event_num,
  output logic            accepted,
  output logic            ignored_busy,
  output logic            ignored_not_ready
);
  typedef enum logic [1:0] {S_IDLE, S_CLK, S_ACK} state_e;

  state_e        state;
  logic          ready_m, ready_s;
  logic          live_prev, live_rise;
  logic [PW-1:0] pat_q;
  logic [$clog2(FIFO_CLK_HI+1)-1:0] clk_cnt;

  // Live trigger and the pattern that goes with it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      live_trig <= 1'b0;
      live_prev <= 1'b0;
      pat_q     <= '0;
      ready_m   <= 1'b0;
      ready_s   <= 1'b0;
    end else begin
      live_trig <= sel_sum ? t_sum : t_hit;
      live_prev <= live_trig;
      pat_q     <= sel_sum ? sum_pattern : hit_pattern;
      ready_m   <= trig_ready;
      ready_s   <= ready_m;
    end
  end
  assign live_rise = live_trig && !live_prev;

  assign accepted          = live_rise && (state == S_IDLE) && ready_s;
  assign ignored_busy      = live_rise && (state != S_IDLE);
  assign ignored_not_ready = live_rise && (state == S_IDLE) && !ready_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      latched_trig <= 1'b0;
      fifo_clk     <= 1'b0;
      fifo_data    <= '0;
      event_num    <= '0;
      clk_cnt      <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (accepted) begin
            event_num    <= event_num + 1'b1;
            fifo_data    <= {event_num + 1'b1, pat_q};
            latched_trig <= 1'b1;
            clk_cnt      <= '0;
            state        <= S_CLK;
          end
        end
        S_CLK: begin
          fifo_clk <= 1'b1;
          clk_cnt  <= clk_cnt + 1'b1;
          if (clk_cnt == FIFO_CLK_HI[$bits(clk_cnt)-1:0]) begin
            fifo_clk <= 1'b0;
            state    <= S_ACK;
          end
        end
        S_ACK: begin
          if (!ready_s) begin
            latched_trig <= 1'b0;
            state        <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
