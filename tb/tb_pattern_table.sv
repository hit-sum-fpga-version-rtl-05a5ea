// tb_pattern_table: self-checking test of the 65536 x 1 selection table.
// Checks the all-zero start, writes of the four example patterns (1, 125,
// 1000, 5235), random writes against a shadow array, and the one-clock read
// latency with read-before-write on the same address.
module tb_pattern_table;
  logic clk = 0;
  logic we = 0, wr_data = 0, rd_data;
  logic [15:0] wr_adr = '0, rd_adr = '0;
  bit shadow [65536];
  int checks = 0, failures = 0;

  pattern_table dut (.clk, .we, .wr_adr, .wr_data, .rd_adr, .rd_data);

  always #2 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input bit d);
    @(negedge clk); we = 1; wr_adr = 16'(a); wr_data = d;
    @(negedge clk); we = 0;
    shadow[a] = d;
  endtask

  task automatic rd_check(input int a);
    @(negedge clk); rd_adr = 16'(a);
    @(posedge clk); #1;
    checks++;
    if (rd_data !== shadow[a]) begin
      failures++;
      if (failures < 10) $display("adr %0d read %0b expected %0b", a, rd_data, shadow[a]);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    for (int a = 0; a < 65536; a += 97) rd_check(a);
    wr(1, 1); wr(125, 1); wr(1000, 1); wr(5235, 1);
    rd_check(1); rd_check(125); rd_check(1000); rd_check(5235); rd_check(2); rd_check(124);
    for (int i = 0; i < 3000; i++) begin
      automatic int a = $urandom_range(0, 65535);
      wr(a, 1'($urandom));
      rd_check(($urandom_range(0, 1) == 1) ? a : $urandom_range(0, 65535));
    end
    // same-address read during write returns the old entry
    wr(77, 0);
    @(negedge clk); we = 1; wr_adr = 77; wr_data = 1; rd_adr = 77;
    @(posedge clk); #1; checks++;
    if (rd_data !== 1'b0) begin failures++; $display("read-during-write returned new data"); end
    @(negedge clk); we = 0; shadow[77] = 1;
    rd_check(77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
