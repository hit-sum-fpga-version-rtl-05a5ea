// tb_hit_bit_top: self-checking test of the whole hit-bit trigger path.
// Directed scenarios in every mode, each measured to the clock:
//  * table overlap mode with the example patterns 1, 125, 1000, 5235 (selected)
//    and an unselected pattern;
//  * boolean overlap, where two staggered hits overlap only because the one
//    shots stretch them (and do not overlap with the shortest width);
//  * window mode, where bits arriving inside the window form a selected
//    pattern;
//  * the undefined mode 11, which must give nothing.
// For each trigger the expected t_hit rising clock (4 + delay after the
// completing hit, 8 + window width + delay after the opening hit in window
// mode), the t_hit width (live width + 2) and the hit pattern are checked.
// A trigger arriving while the delay/width state machine is busy is ignored.
module tb_hit_bit_top;
  import hit_sum_pkg::*;
  localparam int N = 16, CW = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] hit_bits = '0, trig_bits = '0, bo_qual = '0, tbl_adr = '0;
  logic [N-1:0] hit_pattern, fixed;
  config_t cfg;
  logic [CW-1:0] hitbit_width [N];
  logic [CW-1:0] hits_dly = '0, live_width = '0, win_width = '0, hit_count;
  logic reset_hit_count = 0, tbl_we = 0, tbl_wdata = 0, table_rd_data, t_hit, window_open;
  int cyc = 0, checks = 0, failures = 0;
  int n_table = 0, n_bo = 0, n_win = 0, n_busy = 0;

  hit_bit_top #(.N(N), .CW(CW)) dut (.*);
  always #2 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic twrite(input int a, input bit d);
    @(negedge clk); tbl_we = 1; tbl_adr = 16'(a); tbl_wdata = d;
    @(negedge clk); tbl_we = 0;
  endtask

  // watch t_hit for `span` clocks; report the clock edge of the first rise,
  // the number of high clocks and the pattern
  task automatic watch(input int span, output int rise, output int highs, output logic [N-1:0] pat);
    rise = -1; highs = 0; pat = '0;
    repeat (span) begin
      @(posedge clk); #1;
      if (t_hit) begin
        if (rise < 0) begin rise = cyc; pat = hit_pattern; end
        highs++;
      end
    end
  endtask

  // one hit word for one clock; returns the edge that samples it
  task automatic pulse(input logic [N-1:0] w, output int edge_n);
    @(negedge clk); hit_bits = w; edge_n = cyc + 1;
    @(negedge clk); hit_bits = '0;
  endtask

  task automatic expect_trigger(input string what, input int exp_rise, input logic [N-1:0] exp_pat);
    int rise, highs; logic [N-1:0] pat;
    watch(exp_rise - cyc + int'(live_width) + 12, rise, highs, pat);
    check(rise == exp_rise, $sformatf("%s: t_hit rose at %0d, expected %0d", what, rise, exp_rise));
    check(highs == int'(live_width) + 2, $sformatf("%s: t_hit high %0d clocks", what, highs));
    check(pat == exp_pat, $sformatf("%s: pattern %0d, expected %0d", what, pat, exp_pat));
  endtask

  task automatic expect_none(input string what);
    int rise, highs; logic [N-1:0] pat;
    watch(40, rise, highs, pat);
    check(rise < 0, $sformatf("%s: unexpected trigger", what));
  endtask

  initial begin
    int e, e2, d;
    automatic logic [N-1:0] pats [5] = '{16'd1, 16'd125, 16'd1000, 16'd5235, 16'd77};
    cfg = '{table_readback: 1'b0, p2_hitbits: 1'b0, sel_sum: 1'b0, mode: MODE_TABLE};
    for (int i = 0; i < N; i++) hitbit_width[i] = 16'd2;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    twrite(1, 1); twrite(125, 1); twrite(1000, 1); twrite(5235, 1);
    live_width = 16'd3;

    // table overlap mode
    for (int r = 0; r < 5; r++) begin
      hits_dly = CW'(r * 3);
      pulse(pats[r], e);
      if (r < 4) begin expect_trigger("table", e + 4 + int'(hits_dly), pats[r]); n_table++; end
      else expect_none("table, unselected pattern");
    end

    // busy: second selected pattern while the first is still being delayed
    hits_dly = 16'd10;
    pulse(16'd1, e);
    repeat (3) @(negedge clk);
    pulse(16'd125, e2);
    expect_trigger("table, busy", e + 14, 16'd1);
    n_busy++;

    // boolean overlap: bits 0..1 qualified, hits two clocks apart
    cfg.mode = MODE_BO; bo_qual = 16'h0003; hits_dly = 16'd2; live_width = 16'd1;
    pulse(16'h0001, e);
    pulse(16'h0002, e2);
    expect_trigger("overlap", e2 + 4 + 2, 16'h0003);
    n_bo++;
    for (int i = 0; i < N; i++) hitbit_width[i] = 16'd0;   // one-clock pulses: no overlap
    pulse(16'h0001, e);
    pulse(16'h0002, e2);
    expect_none("overlap with one-clock pulses");
    for (int i = 0; i < N; i++) hitbit_width[i] = 16'd2;

    // window mode: bit 0 opens a 6 + 2 clock window, bits of 125 follow
    cfg.mode = MODE_WINDOW; trig_bits = 16'h0001; win_width = 16'd6; hits_dly = 16'd0; live_width = 16'd5;
    pulse(16'd1, e);
    pulse(16'd124 & 16'h000F, e2);
    pulse(16'd124 & 16'h00F0, e2);
    expect_trigger("window", e + 8 + 6 + 0, 16'd125);
    n_win++;
    // same bits but the second group after the window: pattern 13, not selected
    win_width = 16'd0;
    pulse(16'd1, e);
    pulse(16'd124 & 16'h000F, e2);
    repeat (6) @(negedge clk);
    pulse(16'd124 & 16'h00F0, e2);
    expect_none("window, late bits");
    check(hit_count == 1, $sformatf("hit_count %0d", hit_count));

    // undefined mode
    cfg.mode = MODE_UNDEF;
    pulse(16'd1, e);
    expect_none("mode 11");

    $display("triggers: table %0d, overlap %0d, window %0d, busy-ignored %0d", n_table, n_bo, n_win, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
