// hit_window: window mode and table overlap mode of the hit-bit trigger, with
// the 65536 x 1 pattern selection table.
//
// Window mode: a rising edge on any fixed-width hit bit that is also set in
// trig_bits opens a window lasting win_width + 2 clocks. Every rising edge seen
// from the opening clock to the last window clock, the opening bits included,
// is OR-ed into the window pattern. One clock after the window closes the
// pattern is latched as the table read address; if the table holds a one
// there, win_trig pulses for one clock and win_pattern shows the pattern.
// The window cannot be reopened while it is open. This follows the Hit Window
// diagram (set/clear window flag, counter and compare, pattern register,
// latched table address, table, AND, edge detect, output register, hit
// counter).
//
// Table overlap mode: the fixed-width hit bits address the table directly.
// When the word read is one (and the pattern is not all zero), win_trig pulses
// on the first clock of the match and win_pattern shows the pattern.
//
// Read-back: with readback set, both modes stop and the table is read at
// vme_adr for the control bus; the entry appears on table_rd_data one clock
// later. The table is written from the control bus through tbl_we / vme_adr /
// tbl_wdata.
//
// hit_count counts win_trig pulses; it clears while neither mode is enabled
// or while reset_hit_count is high.
//
// Timing: window mode, win_trig rises 4 clocks after the last window clock;
// table mode, 2 clocks after the hit pattern appears on fixed.
module hit_window
  import hit_sum_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  fixed,           // fixed-width hit bits
  input  logic          sel_win_mode,    // 1 = window mode
  input  logic          sel_table_mode,  // 1 = table overlap mode
  input  logic          readback,        // table read-back, modes off
  input  logic [N-1:0]  trig_bits,       // bits that may open a window
  input  logic [CW-1:0] win_width,
  input  logic          reset_hit_count,
  // table access from the control bus
  input  logic [N-1:0]  vme_adr,
  input  logic          tbl_we,
  input  logic          tbl_wdata,
  output logic          table_rd_data,
  // results
  output logic          win_trig,
  output logic [N-1:0]  win_pattern,
  output logic [CW-1:0] hit_count,
  output logic          window_open
);
  logic win_en, tbl_en;
  assign win_en = sel_win_mode   && !readback;
  assign tbl_en = sel_table_mode && !readback;

  // ---------------- rising edges of the fixed-width bits ----------------
  logic [N-1:0] fixed_prev, rise;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fixed_prev <= '0;
    else        fixed_prev <= fixed;
  end
  assign rise = fixed & ~fixed_prev;

  // ---------------- window flag, counter, pattern ----------------
  logic          active;
  logic [CW:0]   cnt;
  logic [N-1:0]  acc;
  logic          start, end_now, end_d;

  assign start   = win_en && !active && |(rise & trig_bits);
  assign end_now = active && (cnt == {1'b0, win_width} + 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      acc    <= '0;
      end_d  <= 1'b0;
    end else begin
      end_d <= end_now && win_en;
      if (!win_en) begin
        active <= 1'b0;
        cnt    <= '0;
      end else if (start) begin
        active <= 1'b1;
        cnt    <= '0;
        acc    <= rise;
      end else if (active) begin
        acc <= acc | rise;
        if (end_now) active <= 1'b0;
        else         cnt    <= cnt + 1'b1;
      end
    end
  end
  assign window_open = active;

  // ---------------- table read address and lookup ----------------
  logic [N-1:0] win_adr;   // latched window pattern
  logic         lv1, lv2;  // window lookup in flight
  logic [N-1:0] live_adr;  // table mode address of the word now on rd_data
  logic [N-1:0] rd_adr;
  logic         rd_q;

  always_comb begin
    if (readback)    rd_adr = vme_adr;
    else if (tbl_en) rd_adr = fixed;
    else             rd_adr = win_adr;
  end

  pattern_table #(.AW(N)) u_table (
    .clk     (clk),
    .we      (tbl_we),
    .wr_adr  (vme_adr),
    .wr_data (tbl_wdata),
    .rd_adr  (rd_adr),
    .rd_data (rd_q)
  );
  assign table_rd_data = rd_q;

  logic match, match_prev;
  assign match = tbl_en && rd_q && (live_adr != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_adr     <= '0;
      lv1         <= 1'b0;
      lv2         <= 1'b0;
      live_adr    <= '0;
      match_prev  <= 1'b0;
      win_trig    <= 1'b0;
      win_pattern <= '0;
    end else begin
      if (end_d) win_adr <= acc;
      lv1        <= end_d;
      lv2        <= lv1 && win_en;
      live_adr   <= fixed;
      match_prev <= match;
      win_trig   <= 1'b0;
      if (lv2 && rd_q) begin
        win_trig    <= 1'b1;
        win_pattern <= win_adr;
      end else if (match && !match_prev) begin
        win_trig    <= 1'b1;
        win_pattern <= live_adr;
      end
    end
  end

  // ---------------- hit counter ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                         hit_count <= '0;
    else if (reset_hit_count || !(win_en || tbl_en))    hit_count <= '0;
    else if (win_trig)                                  hit_count <= hit_count + 1'b1;
  end

endmodule
