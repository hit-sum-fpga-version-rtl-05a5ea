// overlap: boolean overlap mode of the hit-bit trigger.
//
// bo_trig is high for as long as every fixed-width hit bit selected in
// qual_bits is high at the same time, so its width is the length of the
// overlap. A qual_bits of zero selects nothing and keeps bo_trig low (this
// design's choice). bo_pattern is the fixed-width hit word, delayed to line up
// with bo_trig. As in the Overlap diagram, the overlap condition and the
// pattern each pass through two registers. The document draws the overlap
// pulse both active low and active high; it is active high here, as the
// trigger multiplexer expects.
//
// Interface: fixed and qual_bits in, bo_trig and bo_pattern out.
// Timing: bo_trig follows fixed with a latency of two clocks.
module overlap #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] fixed,
  input  logic [N-1:0] qual_bits,
  output logic         bo_trig,
  output logic [N-1:0] bo_pattern
);
  logic         all_high, ov_q;
  logic [N-1:0] pat_q;

  assign all_high = (qual_bits != '0) && ((fixed & qual_bits) == qual_bits);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ov_q       <= 1'b0;
      bo_trig    <= 1'b0;
      pat_q      <= '0;
      bo_pattern <= '0;
    end else begin
      ov_q       <= all_high;
      bo_trig    <= ov_q;
      pat_q      <= fixed;
      bo_pattern <= pat_q;
    end
  end

endmodule
