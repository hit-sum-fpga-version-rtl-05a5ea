// tb_resync: self-checking test of the two-link resynchroniser.
// Each ADC link runs at the Hit Sum clock frequency with its own phase and
// sends a numbered word every clock: the sum is the word number, the 8 hit bits
// a fixed function of it. On the Hit Sum side every word read must carry
// matching hit bits and sum, and the word numbers must follow one another
// without gap or repeat, on both links (a leading zero word, the input
// register's reset value, is allowed). After reset the outputs must be zero.
module tb_resync;
  logic clk = 0, hard_reset_n = 0;
  logic [1:0] adc_clk = 2'b00;
  logic [7:0]  adc_hit [2];
  logic [15:0] adc_sum [2];
  logic [15:0] hit_bits, sum0, sum1;
  logic [1:0]  link_valid;
  int checks = 0, failures = 0, words [2];
  logic [15:0] last [2];
  bit seen [2];

  resync dut (.*);

  function automatic logic [7:0] f(input logic [15:0] j, input int link);
    return j[7:0] ^ j[15:8] ^ 8'(8'h3C + link);
  endfunction

  function automatic logic [15:0] sum_of(input int i);
    return (i == 0) ? sum0 : sum1;
  endfunction

  always #2 clk = ~clk;
  initial begin #0.7; forever #2 adc_clk[0] = ~adc_clk[0]; end
  initial begin #1.9; forever #2 adc_clk[1] = ~adc_clk[1]; end

  for (genvar i = 0; i < 2; i++) begin : g_src
    logic [15:0] n = 16'h0100 * 16'(i + 1);
    always @(posedge adc_clk[i]) begin
      #0.3;
      n <= n + 1'b1;
      adc_sum[i] <= n;
      adc_hit[i] <= f(n, i);
    end
  end

  initial begin
    #400000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (hard_reset_n) begin
      for (int i = 0; i < 2; i++) begin
        // the input register's reset value may be the first word through
        if (link_valid[i] && !(!seen[i] && sum_of(i) == 0)) begin
          automatic logic [15:0] s = (i == 0) ? sum0 : sum1;
          automatic logic [7:0]  h = (i == 0) ? hit_bits[7:0] : hit_bits[15:8];
          checks++;
          if (h != f(s, i)) begin failures++; if (failures < 10) $display("link %0d: hit bits %h do not match sum %h", i, h, s); end
          if (seen[i]) begin
            checks++;
            if (s != last[i] + 1'b1) begin failures++; if (failures < 10) $display("link %0d: word %h after %h", i, s, last[i]); end
          end
          seen[i] = 1; last[i] = s; words[i]++;
        end
      end
    end
  end

  initial begin
    adc_hit[0] = '0; adc_hit[1] = '0; adc_sum[0] = '0; adc_sum[1] = '0;
    seen[0] = 0; seen[1] = 0; words[0] = 0; words[1] = 0;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (hit_bits != 0 || sum0 != 0 || sum1 != 0) begin failures++; $display("outputs not zero in reset"); end
    @(negedge clk) hard_reset_n = 1;
    repeat (5000) @(posedge clk);
    checks++;
    if (words[0] < 4900 || words[1] < 4900) begin failures++; $display("words %0d %0d", words[0], words[1]); end
    $display("words received %0d / %0d", words[0], words[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
