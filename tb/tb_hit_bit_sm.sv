// tb_hit_bit_sm: self-checking test of the delay / width state machine.
// Random one-clock triggers with random delays and widths (zero included).
// A reference model keeps "clocks of delay left" and "clocks of pulse left"
// and predicts t_hit and trig_en every clock. Directed cases check the
// register rules: width W gives W + 2 high clocks, width 0 gives none, and
// t_hit rises D + 1 clocks after the trigger clock, up to the largest
// settings (65535 clocks of delay and 65535 + 2 of width).
module tb_hit_bit_sm;
  localparam int CW = 16;
  logic clk = 0, rst_n = 0, trig = 0;
  logic [CW-1:0] hits_dly = '0, live_width = '0;
  logic trig_en, t_hit, busy;
  int checks = 0, failures = 0;
  int dly_left = 0, high_left = 0;
  int accepted = 0, ignored = 0;

  hit_bit_sm #(.CW(CW)) dut (.*);
  always #2 clk = ~clk;

  initial begin
    #3000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock: compare trig_en before the edge, then advance the model
  task automatic step();
    automatic bit idle = (dly_left == 0) && (high_left == 0);
    automatic bit exp_en = idle && trig && (live_width != 0);
    #1;
    checks++;
    if (trig_en !== exp_en) begin failures++; if (failures < 10) $display("trig_en %0b exp %0b at %0t", trig_en, exp_en, $time); end
    @(posedge clk);
    if (high_left > 0) high_left--;
    else if (dly_left > 0) begin
      dly_left--;
      if (dly_left == 0) high_left = int'(live_width) + 2;
    end else if (exp_en) begin
      if (hits_dly == 0) high_left = int'(live_width) + 2;
      else dly_left = int'(hits_dly);
      accepted++;
    end else if (trig) ignored++;
    if (!idle && trig) ignored++;
    #1;
    checks++;
    if (t_hit !== (high_left > 0)) begin failures++; if (failures < 10) $display("t_hit %0b exp %0b at %0t", t_hit, high_left > 0, $time); end
    @(negedge clk);
  endtask

  task automatic directed(input int d, input int w);
    int rise_at = -1, highs = 0;
    hits_dly = CW'(d); live_width = CW'(w);
    trig = 1; step(); trig = 0;
    for (int i = 0; i < d + w + 6; i++) begin
      if (t_hit && rise_at < 0) rise_at = i;
      if (t_hit) highs++;
      step();
    end
    checks += 2;
    if (w == 0) begin
      if (highs != 0) begin failures++; $display("width 0 gave a pulse"); end
    end else begin
      if (highs != w + 2) begin failures++; $display("width %0d gave %0d clocks", w, highs); end
      if (rise_at != d) begin failures++; $display("delay %0d: t_hit rose %0d clocks after trigger clock + 1", d, rise_at); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    directed(0, 3); directed(5, 1); directed(2, 0); directed(14, 7);
    directed(65535, 65535);               // longest delay and width: 262.14 us each
    for (int c = 0; c < 20000; c++) begin
      if (c % 300 == 0) begin
        hits_dly   = CW'($urandom_range(0, 12));
        live_width = CW'($urandom_range(0, 9));
      end
      trig = ($urandom_range(0, 9) == 0);
      step();
    end
    checks++;
    if (accepted == 0 || ignored == 0) begin failures++; $display("accepted %0d ignored %0d", accepted, ignored); end
    $display("triggers accepted %0d, ignored %0d", accepted, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
