// one_shot: non-retriggerable one shot on every hit bit.
//
// The hit bits arrive active high with whatever width the ADC FPGA gave them.
// A rising edge on bit i starts a pulse on fixed[i] that lasts width[i] + 1
// clocks, so that all bits reach the trigger logic with the same, programmed
// width. While a pulse is running, further rising edges on that bit are
// ignored (non-retriggerable). The per-bit widths and the "one clock longer"
// rule come from the HITBITS_WIDTH registers (16 of them, one per bit).
//
// Interface: hit_in (N bits), width (one CW-bit count per bit),
// fixed (N bits). Timing: fixed[i] rises on the clock edge after the one on
// which hit_in[i] is first sampled high following a low sample.
module one_shot #(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  hit_in,
  input  logic [CW-1:0] width [N],
  output logic [N-1:0]  fixed
);
  logic [N-1:0]  hit_prev;
  logic [CW-1:0] cnt [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_prev <= '0;
      fixed    <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      hit_prev <= hit_in;
      for (int i = 0; i < N; i++) begin
        if (fixed[i]) begin
          if (cnt[i] == '0) fixed[i] <= 1'b0;
          else              cnt[i]   <= cnt[i] - 1'b1;
        end else if (hit_in[i] && !hit_prev[i]) begin
          fixed[i] <= 1'b1;
          cnt[i]   <= width[i];
        end
      end
    end
  end

endmodule
