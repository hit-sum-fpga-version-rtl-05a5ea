// hit_bit_top: the hit-bit trigger path of the Hit Sum FPGA.
//
// The 16 resynchronised hit bits pass through non-retriggerable one shots
// (one_shot) so that every bit has its programmed width. The fixed-width bits
// feed hit_window (window mode and table overlap mode, with the pattern
// selection table) and overlap (boolean overlap mode) in parallel. The mode
// field of the configuration register picks which trigger and which 16-bit
// pattern go on: boolean overlap for mode 01, the window/table output for 00
// and 10 (mode 11 is undefined and gives no trigger). The chosen trigger and
// pattern are registered, the rising edge of the trigger starts hit_bit_sm,
// which delays and stretches it into T_HIT, and the pattern register loads
// the pattern on the clock the state machine accepts the trigger. This is
// the structure of the HIT Bit Top diagram; the bypass for "no delay" drawn
// there is covered by the state machine going straight to its pulse when the
// delay is zero.
//
// Interface: hit_bits in; settings from the control bus (cfg, hitbit_width
// per bit, hits_dly, live_width, trig_bits, win_width, bo_qual), table write
// port; t_hit, hit_pattern, fixed (to the P2 multiplexer), hit_count,
// table_rd_data, window_open out.
// Timing: t_hit is high 4 + hits_dly clocks after the clock edge that samples
// the completing hit bit in both overlap modes; in window mode it rises
// 8 + win_width + hits_dly clocks after the edge on which the one shot of the
// opening bit fires.
module hit_bit_top
  import hit_sum_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  hit_bits,
  input  config_t       cfg,
  input  logic [CW-1:0] hitbit_width [N],
  input  logic [CW-1:0] hits_dly,
  input  logic [CW-1:0] live_width,
  input  logic [N-1:0]  trig_bits,
  input  logic [CW-1:0] win_width,
  input  logic [N-1:0]  bo_qual,
  input  logic          reset_hit_count,
  input  logic [N-1:0]  tbl_adr,
  input  logic          tbl_we,
  input  logic          tbl_wdata,
  output logic          table_rd_data,
  output logic          t_hit,
  output logic [N-1:0]  hit_pattern,
  output logic [N-1:0]  fixed,
  output logic [CW-1:0] hit_count,
  output logic          window_open
);
  logic         win_trig, bo_trig;
  logic [N-1:0] win_pattern, bo_pattern;

  one_shot #(.N(N), .CW(CW)) u_one_shot (
    .clk    (clk),
    .rst_n  (rst_n),
    .hit_in (hit_bits),
    .width  (hitbit_width),
    .fixed  (fixed)
  );

  hit_window #(.N(N), .CW(CW)) u_window (
    .clk             (clk),
    .rst_n           (rst_n),
    .fixed           (fixed),
    .sel_win_mode    (cfg.mode == MODE_WINDOW),
    .sel_table_mode  (cfg.mode == MODE_TABLE),
    .readback        (cfg.table_readback),
    .trig_bits       (trig_bits),
    .win_width       (win_width),
    .reset_hit_count (reset_hit_count),
    .vme_adr         (tbl_adr),
    .tbl_we          (tbl_we),
    .tbl_wdata       (tbl_wdata),
    .table_rd_data   (table_rd_data),
    .win_trig        (win_trig),
    .win_pattern     (win_pattern),
    .hit_count       (hit_count),
    .window_open     (window_open)
  );

  overlap #(.N(N)) u_overlap (
    .clk        (clk),
    .rst_n      (rst_n),
    .fixed      (fixed),
    .qual_bits  (bo_qual),
    .bo_trig    (bo_trig),
    .bo_pattern (bo_pattern)
  );

  // Mode multiplexer and its registers.
  logic         sel_trig, trig_q, trig_qq, trig_edge, trig_en;
  logic [N-1:0] sel_pat, pat_q;

  always_comb begin
    unique case (cfg.mode)
      MODE_BO:                 begin sel_trig = bo_trig;  sel_pat = bo_pattern;  end
      MODE_WINDOW, MODE_TABLE: begin sel_trig = win_trig; sel_pat = win_pattern; end
      default:                 begin sel_trig = 1'b0;     sel_pat = '0;          end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q      <= 1'b0;
      trig_qq     <= 1'b0;
      pat_q       <= '0;
      hit_pattern <= '0;
    end else begin
      trig_q  <= sel_trig;
      trig_qq <= trig_q;
      pat_q   <= sel_pat;
      if (trig_en) hit_pattern <= pat_q;
    end
  end
  assign trig_edge = trig_q && !trig_qq;

  hit_bit_sm #(.CW(CW)) u_sm (
    .clk        (clk),
    .rst_n      (rst_n),
    .trig       (trig_edge),
    .hits_dly   (hits_dly),
    .live_width (live_width),
    .trig_en    (trig_en),
    .t_hit      (t_hit),
    .busy       ()
  );

endmodule
