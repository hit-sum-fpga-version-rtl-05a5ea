// tb_hit_sum_top: end-to-end test of the Hit Sum FPGA at its default sizes.
// The testbench plays both ADC FPGAs (link clocks at the Hit Sum frequency,
// each with its own phase), the VME FPGA (control bus and the Trig_Ready
// handshake) and the external FIFO (captures fifo_data on each fifo_clk
// rising edge).
//  1. Table mode: the selection table is loaded through the auto-incrementing
//     data register with ones at 1, 125, 1000 and 5235; hits with patterns
//     1, 1000, 125, 1, 5235 must leave exactly the FIFO words
//     {1,1} {2,1000} {3,125} {4,1} {5,5235}.
//  2. Table read-back of the first 1001 entries.
//  3. A trigger while a word is still being acknowledged (ignored), and one
//     while Trig_Ready is low (ignored).
//  4. Boolean overlap mode, window mode and the sum trigger, each writing a
//     word with the right event number and pattern.
//  5. The programmable delay: raising HITS_DLY by 10 delays the live trigger by
//     exactly 10 clocks; live trigger width is LIVE WIDTH + 2.
//  6. The P2 multiplexer in both settings, the board sum output and the status
//     register.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_hit_sum_top;
  import hit_sum_pkg::*;
  logic clk = 0, hard_reset_n = 0;
  logic [1:0] adc_clk = 2'b00;
  logic [7:0]  adc_hit [2];
  logic [15:0] adc_sum [2];
  logic [15:0] cb_addr = '0, cb_wdata = '0, cb_rdata;
  logic [3:0]  cb_sec = '0;
  logic cb_wr = 0, cb_rd = 0, cb_ack;
  logic trig_ready = 0, live_trig, latched_trig, trig_clk, fifo_clk, p2_clk;
  logic [31:0] fifo_data;
  logic [15:0] bsum, p2_data, hit_count;
  logic reset_hit_count = 0;

  int checks = 0, failures = 0;
  logic [31:0] fifo_words [$];
  int ack_delay = 3;                // VME FPGA: clocks before it acknowledges
  bit vme_auto = 1;                 // VME FPGA raises Trig_Ready again by itself
  int cnt_table = 0, cnt_window = 0, cnt_bo = 0, cnt_sum = 0, cnt_x1 = 0, cnt_x2 = 0,
      cnt_readback = 0, cnt_delay = 0, cnt_p2_hit = 0, cnt_p2_sum = 0;

  hit_sum_top dut (.*);

  always #2 clk = ~clk;
  initial begin #0.7; forever #2 adc_clk[0] = ~adc_clk[0]; end
  initial begin #1.9; forever #2 adc_clk[1] = ~adc_clk[1]; end

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // external FIFO
  always @(posedge fifo_clk) fifo_words.push_back(fifo_data);

  // VME FPGA side of the trigger handshake
  always @(posedge latched_trig) begin
    repeat (ack_delay) @(posedge clk);
    trig_ready <= 1'b0;
    @(negedge latched_trig);
    if (vme_auto) begin
      repeat (3) @(posedge clk);
      trig_ready <= 1'b1;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  task automatic bus_wr(input logic [15:0] a, input logic [15:0] d, input logic [3:0] s = 0);
    @(negedge clk); cb_addr = a; cb_sec = s; cb_wdata = d; cb_wr = 1;
    @(negedge clk); cb_wr = 0;
    while (!cb_ack) @(negedge clk);
  endtask

  task automatic bus_rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); cb_addr = a; cb_sec = 0; cb_rd = 1;
    @(negedge clk); cb_rd = 0;
    while (!cb_ack) @(negedge clk);
    d = cb_rdata;
  endtask

  // one hit word from the two ADC FPGAs, for one link clock
  task automatic send_hits(input logic [15:0] p);
    @(posedge adc_clk[0]); #0.3;
    adc_hit[0] = p[7:0]; adc_hit[1] = p[15:8];
    @(posedge adc_clk[0]); #0.3;
    adc_hit[0] = '0; adc_hit[1] = '0;
  endtask

  task automatic set_sums(input logic [15:0] a, input logic [15:0] b);
    @(posedge adc_clk[0]); #0.3;
    adc_sum[0] = a; adc_sum[1] = b;
  endtask

  task automatic expect_word(input string what, input logic [31:0] w);
    repeat (60) @(negedge clk);
    check(fifo_words.size() == 1, $sformatf("%s: %0d FIFO words", what, fifo_words.size()));
    if (fifo_words.size() > 0) begin
      automatic logic [31:0] g = fifo_words.pop_front();
      check(g == w, $sformatf("%s: FIFO word %0d/%0d, expected %0d/%0d", what, g[31:16], g[15:0], w[31:16], w[15:0]));
    end
    fifo_words.delete();
  endtask

  // clocks from a hit leaving the ADC FPGA to the rise of live_trig
  task automatic live_latency(input logic [15:0] p, output int lat);
    lat = 0;
    fork
      send_hits(p);
      begin
        @(posedge adc_clk[0]);
        while (!live_trig && lat < 200) begin @(posedge clk); lat++; end
      end
    join
  endtask

  initial begin
    logic [15:0] d;
    int evt, lat0, lat10, w;
    evt = 0;
    adc_hit[0] = '0; adc_hit[1] = '0; adc_sum[0] = '0; adc_sum[1] = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) hard_reset_n = 1;
    repeat (10) @(negedge clk);

    // ---------------- configuration ----------------
    bus_wr(ADR_CONFIG, 16'h0000);                        // table mode, T_HIT, sum to P2
    for (int i = 0; i < 16; i++) bus_wr(ADR_HITBITS_W, 16'd2, 4'(i));
    bus_wr(ADR_HITS_DLY, 16'd0);
    bus_wr(ADR_LIVE_WIDTH, 16'd3);
    bus_wr(ADR_SUM_THRESH, 16'hFFFF);
    for (int a = 0; a <= 5235; a++)
      bus_wr(ADR_TABLE_DATA, 16'(a == 1 || a == 125 || a == 1000 || a == 5235));
    trig_ready = 1;
    repeat (10) @(negedge clk);

    // ---------------- 1. example sequence ----------------
    begin
      logic [15:0] seq [5];
      seq = '{16'd1, 16'd1000, 16'd125, 16'd1, 16'd5235};
      foreach (seq[i]) begin
        send_hits(seq[i]);
        repeat (40) @(negedge clk);
      end
      repeat (40) @(negedge clk);
      check(fifo_words.size() == 5, $sformatf("example: %0d FIFO words", fifo_words.size()));
      foreach (seq[i]) begin
        if (fifo_words.size() > 0) begin
          automatic logic [31:0] g = fifo_words.pop_front();
          evt++;
          check(g == {16'(evt), seq[i]}, $sformatf("FIFO address %0d: %0d/%0d", i, g[31:16], g[15:0]));
          if (g == {16'(evt), seq[i]}) cnt_table++;
        end
      end
      fifo_words.delete();
      check(hit_count == 5, $sformatf("hit count %0d", hit_count));
    end

    // ---------------- 2. table read-back ----------------
    bus_wr(ADR_CONFIG, 16'h0010);
    for (int a = 0; a <= 1000; a++) begin
      bus_rd(ADR_TABLE_DATA, d);
      check(d == 16'(a == 1 || a == 125 || a == 1000), $sformatf("read-back %0d gave %0d", a, d));
      cnt_readback++;
    end
    send_hits(16'd1);                                    // modes are off during read-back
    repeat (40) @(negedge clk);
    check(fifo_words.size() == 0, "trigger during read-back");
    bus_wr(ADR_CONFIG, 16'h0000);

    // ---------------- 3. ignored triggers ----------------
    ack_delay = 40;
    send_hits(16'd125);
    repeat (20) @(negedge clk);
    check(latched_trig, "latched_trig after trigger");
    send_hits(16'd1000);                                 // X1: previous word not acknowledged
    cnt_x1++;
    repeat (80) @(negedge clk);
    evt++;
    check(fifo_words.size() == 1 && fifo_words[0] == {16'(evt), 16'd125}, "busy trigger was written");
    fifo_words.delete();
    ack_delay = 3; vme_auto = 0;
    send_hits(16'd1);
    repeat (40) @(negedge clk);
    evt++;
    check(!trig_ready && !latched_trig, "handshake finished");
    fifo_words.delete();
    send_hits(16'd5235);                                 // X2: Trig_Ready low
    cnt_x2++;
    repeat (40) @(negedge clk);
    check(fifo_words.size() == 0, "trigger while Trig_Ready low was written");
    vme_auto = 1; trig_ready = 1;
    repeat (5) @(negedge clk);

    // ---------------- 4. the other modes ----------------
    bus_wr(ADR_CONFIG, 16'h0001);                        // boolean overlap
    bus_wr(ADR_BO_QUAL, 16'h0101);
    send_hits(16'h0001);
    send_hits(16'h0100);                                 // overlaps through the one shots
    evt++;
    expect_word("boolean overlap", {16'(evt), 16'h0101});
    cnt_bo++;

    bus_wr(ADR_CONFIG, 16'h0002);                        // window mode
    bus_wr(ADR_TRIG_BITS, 16'h0001);
    bus_wr(ADR_WIN_WIDTH, 16'd10);
    send_hits(16'h0001);
    repeat (2) @(negedge clk);
    send_hits(16'h007C);
    evt++;
    expect_word("window", {16'(evt), 16'd125});
    cnt_window++;

    bus_wr(ADR_CONFIG, 16'h0004);                        // T_SUM and sum pattern
    bus_wr(ADR_SUM_THRESH, 16'd5000);
    set_sums(16'd2000, 16'd3500);
    evt++;
    expect_word("sum", {16'(evt), 16'd5500});
    cnt_sum++;
    check(bsum == 16'd5500, $sformatf("bsum %0d", bsum));
    bus_wr(ADR_CONFIG, 16'h0000);                        // sum to P2
    repeat (3) @(negedge clk);
    check(p2_data == 16'd5500, "P2 carries the sum");
    if (p2_data == 16'd5500) cnt_p2_sum++;
    set_sums(16'd0, 16'd0);

    // ---------------- 5. delay and width ----------------
    bus_wr(ADR_LIVE_WIDTH, 16'd4);
    live_latency(16'd1, lat0);
    w = 0;
    while (live_trig) begin @(posedge clk); w++; end
    check(w == 6, $sformatf("live trigger width %0d, expected 6", w));
    repeat (60) @(negedge clk);
    bus_wr(ADR_HITS_DLY, 16'd10);
    live_latency(16'd1, lat10);
    check(lat10 - lat0 == 10, $sformatf("delay step: %0d -> %0d clocks", lat0, lat10));
    if (lat10 - lat0 == 10) cnt_delay++;
    $display("hit to live trigger: %0d clocks at HITS_DLY 0, %0d at 10", lat0, lat10);
    repeat (80) @(negedge clk);
    evt += 2;
    check(fifo_words.size() == 2 && fifo_words[1] == {16'(evt), 16'd1}, "delayed triggers written");
    fifo_words.delete();

    // ---------------- 6. P2 hit bits, status ----------------
    bus_wr(ADR_CONFIG, 16'h0008);
    begin
      bit seen;
      seen = 0;
      fork
        send_hits(16'hA5C3);
        repeat (30) begin @(posedge clk); #1; if (p2_data == 16'hA5C3) seen = 1; end
      join
      check(seen, "P2 carries the fixed-width hit bits");
      if (seen) cnt_p2_hit++;
    end
    bus_rd(ADR_STATUS, d);
    check(d[0] == trig_ready && d[1] == latched_trig, $sformatf("status %h", d));

    check(cnt_table > 0,    "table mode never triggered");
    check(cnt_window > 0,   "window mode never triggered");
    check(cnt_bo > 0,       "boolean overlap never triggered");
    check(cnt_sum > 0,      "sum trigger never fired");
    check(cnt_x1 > 0,       "no trigger ignored while busy");
    check(cnt_x2 > 0,       "no trigger ignored while not ready");
    check(cnt_readback > 0, "no table read-back");
    check(cnt_delay > 0,    "delay step not seen");
    check(cnt_p2_hit > 0 && cnt_p2_sum > 0, "P2 multiplexer not exercised");
    $display("table %0d window %0d overlap %0d sum %0d busy-ignored %0d not-ready-ignored %0d read-back %0d delay %0d p2 %0d/%0d",
             cnt_table, cnt_window, cnt_bo, cnt_sum, cnt_x1, cnt_x2, cnt_readback, cnt_delay, cnt_p2_hit, cnt_p2_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
