// tb_extern_fifo_write: self-checking test of the live trigger and external
// FIFO write handshake.
// The testbench plays the VME FPGA: it answers latched_trig by pulling
// trig_ready low after a random time and raises it again later. Each round
// sends one trigger that must be written (hit path or sum path, chosen at
// random), one while the previous word is still in progress (must be ignored,
// "X1") and one while trig_ready is low (must be ignored, "X2"). Every
// fifo_clk rising edge is checked against the expected {event number,
// pattern}; fifo_clk must stay high FIFO_CLK_HI clocks, latched_trig must not
// fall before trig_ready does, and live_trig must follow the selected trigger.
module tb_extern_fifo_write;
  localparam int PW = 16;
  logic clk = 0, rst_n = 0;
  logic t_hit = 0, t_sum = 0, sel_sum = 0, trig_ready = 0;
  logic [PW-1:0] hit_pattern = '0, sum_pattern = '0, event_num;
  logic live_trig, latched_trig, fifo_clk, accepted, ignored_busy, ignored_not_ready;
  logic [2*PW-1:0] fifo_data;
  logic [2*PW-1:0] expq [$];
  int checks = 0, failures = 0, writes = 0, x1 = 0, x2 = 0, clk_hi = 0;
  logic fifo_clk_d = 0;

  extern_fifo_write #(.PW(PW)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO model: capture on the rising edge of fifo_clk
  always @(posedge clk) begin
    fifo_clk_d <= fifo_clk;
    if (fifo_clk) clk_hi++;
    if (fifo_clk && !fifo_clk_d) begin
      checks++; writes++;
      if (expq.size() == 0) begin failures++; $display("unexpected FIFO write %h", fifo_data); end
      else begin
        automatic logic [2*PW-1:0] e = expq.pop_front();
        if (fifo_data !== e) begin failures++; $display("FIFO word %h expected %h", fifo_data, e); end
      end
    end
    if (!fifo_clk && fifo_clk_d) begin
      checks++;
      if (clk_hi != 2) begin failures++; $display("fifo_clk high %0d clocks", clk_hi); end
      clk_hi = 0;
    end
    if (rst_n && trig_ready && $fell(latched_trig)) begin
      checks++; failures++; $display("latched_trig fell while trig_ready high");
    end
  end

  task automatic fire(input logic [PW-1:0] p, input int len);
    @(negedge clk);
    if (sel_sum) begin t_sum = 1; sum_pattern = p; end
    else         begin t_hit = 1; hit_pattern = p; end
    repeat (len) @(negedge clk);
    t_hit = 0; t_sum = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [PW-1:0] p;
    automatic int evt = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    trig_ready = 1;
    repeat (5) @(negedge clk);
    for (int r = 0; r < 60; r++) begin
      sel_sum = 1'($urandom);
      p = PW'($urandom);
      evt++;
      expq.push_back({PW'(evt), p});
      fire(p, $urandom_range(1, 4));
      checks++;
      if (!latched_trig) begin failures++; $display("latched_trig not high after accepted trigger"); end
      // X1: trigger while the word is in progress
      fire(PW'($urandom), 1); x1++;
      // VME FPGA acknowledges
      repeat ($urandom_range(0, 6)) @(negedge clk);
      trig_ready = 0;
      wait (!latched_trig);
      @(negedge clk);
      // X2: trigger while trig_ready is low
      fire(PW'($urandom), 2); x2++;
      repeat ($urandom_range(0, 4)) @(negedge clk);
      trig_ready = 1;
      repeat (4) @(negedge clk);
    end
    // live_trig follows the selected trigger by one clock
    sel_sum = 0; trig_ready = 0;
    @(negedge clk) t_hit = 1;
    @(posedge clk); #1; checks++;
    if (!live_trig) begin failures++; $display("live_trig did not follow t_hit"); end
    @(negedge clk) t_hit = 0;
    repeat (4) @(negedge clk);
    checks += 2;
    if (writes != 60 || expq.size() != 0) begin failures++; $display("writes %0d, %0d left", writes, expq.size()); end
    if (event_num != PW'(60)) begin failures++; $display("event_num %0d", event_num); end
    $display("writes %0d, ignored while busy %0d, ignored while not ready %0d", writes, x1, x2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
