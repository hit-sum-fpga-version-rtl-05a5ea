// tb_sum_top: self-checking test of the board sum and sum trigger.
// Random partial sums (each at most 8 x 4095, as from eight 12-bit ADCs) and
// thresholds. Expected values come from the input history: bsum is the sum one
// clock after the inputs; t_sum is high for one clock when the sum crosses
// above the threshold; sum_pattern is bsum two clocks later. The number of
// t_sum pulses is checked against the number of upward crossings.
module tb_sum_top;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] sum0 = '0, sum1 = '0, thresh = '0, bsum, sum_pattern;
  logic t_sum;
  int S [$];
  int checks = 0, failures = 0, crossings = 0, pulses = 0;

  sum_top #(.W(W)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    thresh = 16'd30000;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      if (c % 1000 == 0) thresh = W'($urandom_range(1000, 60000));
      if ($urandom_range(0, 3) == 0) begin
        sum0 = W'($urandom_range(0, 8 * 4095));
        sum1 = W'($urandom_range(0, 8 * 4095));
      end
      @(posedge clk);
      S.push_back(int'(sum0) + int'(sum1));
      #1;
      n = S.size() - 1;
      checks++;
      if (bsum !== W'(S[n])) begin failures++; if (failures < 10) $display("bsum %0d exp %0d", bsum, S[n]); end
      if (n >= 3) begin
        automatic logic exp_t = (S[n-2] > int'(thresh)) && !(S[n-3] > int'(thresh));
        checks += 2;
        if (t_sum !== exp_t) begin failures++; if (failures < 10) $display("t_sum %0b exp %0b at %0t", t_sum, exp_t, $time); end
        if (sum_pattern !== W'(S[n-2])) begin failures++; if (failures < 10) $display("sum_pattern %0d exp %0d", sum_pattern, S[n-2]); end
        if (exp_t) crossings++;
        if (t_sum) pulses++;
      end
      // threshold changes make the history check ambiguous for 3 clocks
      if (c % 1000 == 998) S.delete();
    end
    checks++;
    if (crossings == 0 || pulses != crossings) begin failures++; $display("pulses %0d crossings %0d", pulses, crossings); end
    $display("t_sum fired %0d times", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
