// tb_one_shot: self-checking test of the non-retriggerable one shot.
// Random hit bits and per-bit widths are driven; a reference model that counts
// the clocks left in each pulse predicts every output bit on every clock.
// A directed part checks that width W gives exactly W + 1 high clocks and that
// a second edge inside a pulse does not extend it.
module tb_one_shot;
  localparam int N = 16, CW = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0]  hit_in = '0;
  logic [CW-1:0] width [N];
  logic [N-1:0]  fixed;
  int checks = 0, failures = 0;
  int rem [N];
  logic [N-1:0] hp;

  one_shot #(.N(N), .CW(CW)) dut (.clk, .rst_n, .hit_in, .width, .fixed);

  always #2 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step();
    for (int i = 0; i < N; i++) begin
      if (rem[i] > 0) rem[i]--;
      else if (hit_in[i] && !hp[i]) rem[i] = int'(width[i]) + 1;
    end
    hp = hit_in;
  endtask

  task automatic check_all(string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (fixed[i] !== (rem[i] > 0)) begin
        failures++;
        if (failures < 10) $display("%s: bit %0d fixed=%0b expected %0b at %0t", what, i, fixed[i], rem[i] > 0, $time);
      end
    end
  endtask

  initial begin
    int high;
    for (int i = 0; i < N; i++) begin width[i] = CW'(i % 6); rem[i] = 0; end
    hp = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // directed: width 3 on bit 5, second edge inside the pulse
    width[5] = 3;
    @(negedge clk) hit_in[5] = 1;
    @(posedge clk); model_step(); #1 check_all("directed");
    @(negedge clk) hit_in[5] = 0;
    @(posedge clk); model_step(); #1 check_all("directed");
    @(negedge clk) hit_in[5] = 1;   // ignored: pulse still running
    high = 2;
    for (int c = 0; c < 8; c++) begin
      @(posedge clk); model_step(); #1 check_all("directed");
      if (fixed[5]) high++;
      @(negedge clk) hit_in[5] = 0;
    end
    checks++;
    if (high != 4) begin failures++; $display("width 3 gave %0d high clocks, expected 4", high); end
    // random
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      hit_in = N'($urandom) & N'($urandom);
      if (c % 500 == 0) for (int i = 0; i < N; i++) width[i] = CW'($urandom_range(0, 7));
      @(posedge clk); model_step(); #1 check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
