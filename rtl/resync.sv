// resync: brings the hit bits and sums of the two ADC FPGAs into the Hit Sum
// clock domain.
//
// Each ADC FPGA sends 8 hit bits and a 16-bit sum together with its own
// ClockOut. For each link the word is captured in an input register on that
// ClockOut and written every ClockOut cycle into a dual-clock FIFO
// (resync_fifo) once the hard reset, registered in the Hit Sum clock, has been
// released. On the Hit Sum side the FIFO is read whenever it is not empty and
// its output is registered once more. This is the structure of the resync
// diagram. Carrying both the 8 hit bits and the 16-bit sum of a link in one
// 24-bit FIFO word is this design's choice (the diagram draws a 13-bit path).
//
// Interface: adc_clk[i], adc_hit[i], adc_sum[i] for link i = 0, 1; clk and
// hard_reset_n of the Hit Sum FPGA. Outputs hit_bits = {link 1 hits, link 0
// hits}, sum0, sum1 and link_valid (a word was read on that link in the last
// cycle). While a FIFO is empty its last word is held.
// Timing: from the ADC clock edge that captures a word to the outputs is the
// input register, two synchroniser stages, the FIFO read and the output
// register: about five Hit Sum clocks.
module resync #(
  parameter int unsigned HIT_PER_ADC = 8,
  parameter int unsigned SUM_W       = 16,
  parameter int unsigned FIFO_DEPTH  = 15
) (
  input  logic                     clk,
  input  logic                     hard_reset_n,
  input  logic [1:0]               adc_clk,
  input  logic [HIT_PER_ADC-1:0]   adc_hit [2],
  input  logic [SUM_W-1:0]         adc_sum [2],
  output logic [2*HIT_PER_ADC-1:0] hit_bits,
  output logic [SUM_W-1:0]         sum0,
  output logic [SUM_W-1:0]         sum1,
  output logic [1:0]               link_valid
);
  localparam int unsigned LW = HIT_PER_ADC + SUM_W;

  // Write enable: hard reset registered in the Hit Sum clock (resync diagram).
  logic wr_enable;
  always_ff @(posedge clk or negedge hard_reset_n) begin
    if (!hard_reset_n) wr_enable <= 1'b0;
    else               wr_enable <= 1'b1;
  end

  logic [LW-1:0] link_out [2];

  for (genvar i = 0; i < 2; i++) begin : g_link
    logic [LW-1:0] iob_q;
    logic [LW-1:0] fifo_q;
    logic          fifo_empty;
    logic          fifo_full;
    logic          rd_fire;

    // Input (IOB) register on the ADC ClockOut.
    always_ff @(posedge adc_clk[i] or negedge hard_reset_n) begin
      if (!hard_reset_n) iob_q <= '0;
      else               iob_q <= {adc_hit[i], adc_sum[i]};
    end

    resync_fifo #(.DATA_W(LW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wr_clk   (adc_clk[i]),
      .wr_rst_n (hard_reset_n),
      .wr_en    (wr_enable),
      .wr_data  (iob_q),
      .full     (fifo_full),
      .rd_clk   (clk),
      .rd_rst_n (hard_reset_n),
      .rd_en    (!fifo_empty),
      .rd_data  (fifo_q),
      .empty    (fifo_empty)
    );

    // Output register in the Hit Sum clock.
    always_ff @(posedge clk or negedge hard_reset_n) begin
      if (!hard_reset_n) begin
        link_out[i]   <= '0;
        rd_fire       <= 1'b0;
        link_valid[i] <= 1'b0;
      end else begin
        rd_fire       <= !fifo_empty;
        link_valid[i] <= rd_fire;
        link_out[i]   <= fifo_q;
      end
    end
  end

  assign hit_bits = {link_out[1][LW-1 -: HIT_PER_ADC], link_out[0][LW-1 -: HIT_PER_ADC]};
  assign sum0     = link_out[0][SUM_W-1:0];
  assign sum1     = link_out[1][SUM_W-1:0];

endmodule
