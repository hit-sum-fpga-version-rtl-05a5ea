// sum_top: board sum and sum trigger.
//
// The two 16-bit sums of the ADC FPGAs are added into the board sum bsum. A
// board holds sixteen 12-bit ADCs, so the total cannot exceed 16 x 4095 =
// 65520 and fits 16 bits; the carry is dropped. bsum goes to the serial link
// (Aurora over the MGT, outside this RTL) and is compared with the
// programmable threshold. t_sum pulses high for one clock when bsum rises
// above the threshold (strictly greater, as the SUM Threshold register says);
// it fires again only after bsum has dropped back to or below it. sum_pattern
// is bsum delayed to line up with t_sum, for the external FIFO. The adder,
// compare, edge detector and delay follow the SUM diagram; the delay length is
// this design's choice.
//
// Interface: sum0, sum1, thresh in; bsum, t_sum, sum_pattern out.
// Timing: bsum is registered one clock after the inputs; t_sum and
// sum_pattern two clocks after bsum.
module sum_top #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] sum0,
  input  logic [W-1:0] sum1,
  input  logic [W-1:0] thresh,
  output logic [W-1:0] bsum,
  output logic         t_sum,
  output logic [W-1:0] sum_pattern
);
  logic         above, above_prev;
  logic [W-1:0] bsum_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bsum        <= '0;
      above       <= 1'b0;
      above_prev  <= 1'b0;
      t_sum       <= 1'b0;
      bsum_d      <= '0;
      sum_pattern <= '0;
    end else begin
      bsum        <= sum0 + sum1;
      above       <= (bsum > thresh);
      above_prev  <= above;
      t_sum       <= above && !above_prev;
      bsum_d      <= bsum;
      sum_pattern <= bsum_d;
    end
  end

endmodule
