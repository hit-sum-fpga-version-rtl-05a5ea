// tb_hit_window: self-checking test of window mode, table overlap mode and
// table read-back.
// The table is loaded with the example patterns 1, 125, 1000 and 5235 plus
// random entries kept in a shadow copy. Window mode: a trigger bit opens the
// window; more bits rise at random clocks inside and outside it; the expected
// pattern is the OR of the bits rising on the window's clock edges, and a
// trigger is expected exactly win_width + 5 clocks after the opening edge when
// the shadow table holds a one for it. Rises of non-trigger bits alone must
// not open a window. The last window is the longest one (65535 + 2 clocks,
// 262.14 us at 4 ns). Table overlap mode: random patterns on the hit bits, a
// trigger expected two clocks after a selected pattern appears. Read-back:
// random addresses compared with the shadow table. Every trigger is compared
// by clock and pattern; hit_count is checked at the end of each phase.
module tb_hit_window;
  localparam int N = 16, CW = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] fixed = '0, trig_bits = '0, vme_adr = '0, win_pattern;
  logic sel_win_mode = 0, sel_table_mode = 0, readback = 0, reset_hit_count = 0;
  logic tbl_we = 0, tbl_wdata = 0, table_rd_data, win_trig, window_open;
  logic [CW-1:0] win_width = '0, hit_count;
  bit shadow [65536];
  int cyc = 0, checks = 0, failures = 0, windows = 0, hits = 0, misses = 0;
  typedef struct { int c; logic [N-1:0] p; } ev_t;
  ev_t expq [$], gotq [$];

  hit_window #(.N(N), .CW(CW)) dut (.*);
  always #2 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    #1 if (win_trig) gotq.push_back('{cyc, win_pattern});
  end

  initial begin
    #3000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic twrite(input int a, input bit d);
    @(negedge clk); tbl_we = 1; vme_adr = 16'(a); tbl_wdata = d;
    @(negedge clk); tbl_we = 0;
    shadow[a] = d;
  endtask

  task automatic compare_events(input string phase);
    check(gotq.size() == expq.size(), $sformatf("%s: %0d triggers, expected %0d", phase, gotq.size(), expq.size()));
    while (gotq.size() > 0 && expq.size() > 0) begin
      automatic ev_t g = gotq.pop_front();
      automatic ev_t e = expq.pop_front();
      check(g.c == e.c && g.p == e.p, $sformatf("%s: trigger at %0d pattern %0d, expected at %0d pattern %0d", phase, g.c, g.p, e.c, e.p));
    end
    gotq.delete(); expq.delete();
  endtask

  initial begin
    int ww, s;
    logic [N-1:0] pat, extra, acc;
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    twrite(1, 1); twrite(125, 1); twrite(1000, 1); twrite(5235, 1);

    // ---------------- window mode ----------------
    sel_win_mode = 1;
    trig_bits = 16'h0001;
    for (int r = 0; r < 150; r++) begin
      ww = (r == 149) ? 65535 : $urandom_range(0, 12);   // last one: longest window
      win_width = CW'(ww);
      if (r < 4) begin
        // the example patterns, all bits rising together on the opening edge
        pat = (r == 0) ? 16'd1 : (r == 1) ? 16'd125 : (r == 2) ? 16'd1000 : 16'd5235;
        trig_bits = pat & (~pat + 1'b1);       // lowest set bit opens the window
      end else begin
        trig_bits = 16'h0001 << $urandom_range(0, 15);
        pat = N'($urandom) & N'($urandom) | trig_bits;
        if ($urandom_range(0, 1) == 1) twrite(int'(pat), 1);
      end
      @(negedge clk);
      s = cyc + 1;
      fixed = (r < 4) ? pat : trig_bits;       // opening edge s
      acc = fixed;
      // edges s+1 .. s+ww+2 are still inside the window: the remaining
      // pattern bits rise there, each once, for one clock
      for (int k = 1; k <= ww + 2; k++) begin
        extra = (k == ww + 2 || $urandom_range(0, 2) == 0) ? (pat & ~acc) : '0;
        if (k != ww + 2) extra &= N'($urandom);
        @(negedge clk) fixed = extra;
        acc |= extra;
      end
      // one more bit rises just after the window and must stay out
      extra = ~acc & ~trig_bits;
      extra = extra & (~extra + 1'b1);
      @(negedge clk) fixed = extra;
      @(negedge clk) fixed = '0;
      if (shadow[int'(acc)]) begin expq.push_back('{s + ww + 5, acc}); hits++; end
      else misses++;
      windows++;
      repeat (ww + 12) @(negedge clk);
      // non-trigger bits alone do not open a window
      fixed = ~trig_bits;
      @(negedge clk) fixed = '0;
      repeat (ww + 12) @(negedge clk);
    end
    compare_events("window");
    check(hit_count == CW'(hits), $sformatf("hit_count %0d expected %0d", hit_count, hits));
    check(hits > 0 && misses > 0, "window phase saw both selected and unselected patterns");

    // ---------------- table overlap mode ----------------
    sel_win_mode = 0;                            // no mode enabled clears the count
    @(negedge clk);
    @(negedge clk);
    check(hit_count == 0, "hit_count cleared while no mode is enabled");
    sel_table_mode = 1;
    hits = 0;
    for (int r = 0; r < 300; r++) begin
      pat = (r < 5) ? ((r == 0 || r == 3) ? 16'd1 : (r == 1) ? 16'd1000 : (r == 2) ? 16'd125 : 16'd5235)
                    : N'($urandom);
      if (r >= 5 && $urandom_range(0, 1) == 1) twrite(int'(pat), 1);
      @(negedge clk);
      fixed = pat;
      if (shadow[int'(pat)] && pat != 0) begin expq.push_back('{cyc + 2, pat}); hits++; end
      repeat ($urandom_range(1, 4)) @(negedge clk);
      fixed = '0;
      repeat (3) @(negedge clk);
    end
    compare_events("table");
    check(hit_count == CW'(hits), $sformatf("table hit_count %0d expected %0d", hit_count, hits));
    @(negedge clk) reset_hit_count = 1;
    @(negedge clk) reset_hit_count = 0;
    check(hit_count == 0, "reset_hit_count");

    // ---------------- read-back ----------------
    readback = 1;
    fixed = 16'd1;                               // ignored during read-back
    for (int r = 0; r < 500; r++) begin
      automatic int a = (r < 4) ? ((r == 0) ? 1 : (r == 1) ? 125 : (r == 2) ? 1000 : 5235) : $urandom_range(0, 65535);
      @(negedge clk) vme_adr = 16'(a);
      @(negedge clk);
      check(table_rd_data == shadow[a], $sformatf("read-back at %0d", a));
    end
    fixed = '0;
    repeat (4) @(negedge clk);
    check(gotq.size() == 0, "no trigger during read-back");
    $display("windows %0d, selected %0d", windows, hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
