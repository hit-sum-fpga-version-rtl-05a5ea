// tb_overlap: self-checking test of boolean overlap mode.
// Random fixed-width words and qualified-bit masks; the expected bo_trig is
// "every qualified bit high" on the word sampled two clock edges earlier (never with an empty mask), the
// expected bo_pattern is the word two clocks earlier. Also checks that the
// trigger width equals the overlap length in a directed case.
module tb_overlap;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] fixed = '0, qual_bits = '0, bo_pattern;
  logic bo_trig;
  logic [N-1:0] hf [$], hq [$];
  int checks = 0, failures = 0, width = 0;

  overlap #(.N(N)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_check();
    @(posedge clk);
    hf.push_back(fixed); hq.push_back(qual_bits);
    #1;
    if (hf.size() > 1) begin
      automatic logic [N-1:0] f = hf.pop_front();
      automatic logic [N-1:0] q = hq.pop_front();
      automatic logic exp = (q != 0) && ((f & q) == q);
      checks += 2;
      if (bo_trig !== exp) begin failures++; if (failures < 10) $display("bo_trig %0b exp %0b f=%h q=%h", bo_trig, exp, f, q); end
      if (bo_pattern !== f) begin failures++; if (failures < 10) $display("bo_pattern %h exp %h", bo_pattern, f); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // directed: bits 0..3 qualified, overlap of 5 clocks
    qual_bits = 16'h000F;
    @(negedge clk) fixed = 16'h0003;
    step_check();
    for (int i = 0; i < 14; i++) begin
      @(negedge clk) fixed = (i < 5) ? 16'h000F : 16'h0007;
      step_check();
      if (bo_trig) width++;
    end
    checks++;
    if (width != 5) begin failures++; $display("overlap of 5 clocks gave bo_trig %0d clocks", width); end
    // random
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      if (c % 64 == 0) qual_bits = N'($urandom) & N'($urandom) & N'($urandom);
      fixed = N'($urandom) | N'($urandom);
      step_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
