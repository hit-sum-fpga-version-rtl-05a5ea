// hit_sum_top: the Hit Sum FPGA.
//
// Two ADC FPGAs each send 8 hit bits and a 16-bit partial sum, every 4 ns
// clock, with their own link clock. resync brings both links into the Hit Sum
// clock. hit_bit_top turns the 16 hit bits into the hit trigger T_HIT and the
// hit pattern (window, table overlap or boolean overlap mode, then a
// programmable delay and width). sum_top adds the two sums into the board sum
// bsum, which leaves for the serial link to the Switch Card, and raises T_SUM
// when bsum crosses the threshold. extern_fifo_write drives the live trigger
// and, in a handshake with the VME FPGA, writes the 32-bit hit word into the
// external FIFO. vme_host holds all settings. A last multiplexer sends either
// the fixed-width hit bits or bsum, with the clock, to the P2 backplane.
//
// The serial transceiver core, the differential pads, the external FIFO chip
// and the VME FPGA are outside this RTL: their signals are ports. hard_reset_n
// is the only reset (power-on, active low, asynchronous assertion here).
//
// Status register (0x0400) bits, this design's choice: 0 trig_ready, 1
// latched_trig, 2 live_trig, 3 window open, 4/5 link 0/1 data arriving.
//
// Timing: the P2 data are registered one clock after their source; trig_clk
// and p2_clk are the Hit Sum clock itself, sent with the signals.
module hit_sum_top
  import hit_sum_pkg::*;
(
  input  logic              clk,
  input  logic              hard_reset_n,
  // ADC FPGA links
  input  logic [1:0]        adc_clk,
  input  logic [7:0]        adc_hit [2],
  input  logic [15:0]       adc_sum [2],
  // control bus from the VME FPGA
  input  logic [15:0]       cb_addr,
  input  logic [3:0]        cb_sec,
  input  logic              cb_wr,
  input  logic              cb_rd,
  input  logic [15:0]       cb_wdata,
  output logic [15:0]       cb_rdata,
  output logic              cb_ack,
  // trigger handshake with the VME FPGA
  input  logic              trig_ready,
  output logic              live_trig,
  output logic              latched_trig,
  output logic              trig_clk,
  // external HIT/SUM FIFO
  output logic              fifo_clk,
  output logic [31:0]       fifo_data,
  // board sum to the serial link
  output logic [SUM_W-1:0]  bsum,
  // P2 backplane
  output logic [15:0]       p2_data,
  output logic              p2_clk,
  // hit counter
  input  logic              reset_hit_count,
  output logic [15:0]       hit_count
);
  settings_t     settings;
  logic [15:0]   hitbit_width [HIT_W];
  logic [15:0]   tbl_adr;
  logic          tbl_we, tbl_wdata, table_rd_data;
  logic [15:0]   status;

  logic [HIT_W-1:0] hit_bits;
  logic [SUM_W-1:0] sum0, sum1;
  logic [1:0]       link_valid;

  logic             t_hit, t_sum, window_open;
  logic [HIT_W-1:0] hit_pattern, fixed;
  logic [SUM_W-1:0] sum_pattern;
  logic [15:0]      event_num;

  resync u_resync (
    .clk          (clk),
    .hard_reset_n (hard_reset_n),
    .adc_clk      (adc_clk),
    .adc_hit      (adc_hit),
    .adc_sum      (adc_sum),
    .hit_bits     (hit_bits),
    .sum0         (sum0),
    .sum1         (sum1),
    .link_valid   (link_valid)
  );

  vme_host u_vme (
    .clk           (clk),
    .rst_n         (hard_reset_n),
    .cb_addr       (cb_addr),
    .cb_sec        (cb_sec),
    .cb_wr         (cb_wr),
    .cb_rd         (cb_rd),
    .cb_wdata      (cb_wdata),
    .cb_rdata      (cb_rdata),
    .cb_ack        (cb_ack),
    .status        (status),
    .table_rd_data (table_rd_data),
    .settings      (settings),
    .hitbit_width  (hitbit_width),
    .tbl_adr       (tbl_adr),
    .tbl_we        (tbl_we),
    .tbl_wdata     (tbl_wdata)
  );

  hit_bit_top u_hit (
    .clk             (clk),
    .rst_n           (hard_reset_n),
    .hit_bits        (hit_bits),
    .cfg             (settings.cfg),
    .hitbit_width    (hitbit_width),
    .hits_dly        (settings.hits_dly),
    .live_width      (settings.live_width),
    .trig_bits       (settings.trig_bits),
    .win_width       (settings.win_width),
    .bo_qual         (settings.bo_qual),
    .reset_hit_count (reset_hit_count),
    .tbl_adr         (tbl_adr),
    .tbl_we          (tbl_we),
    .tbl_wdata       (tbl_wdata),
    .table_rd_data   (table_rd_data),
    .t_hit           (t_hit),
    .hit_pattern     (hit_pattern),
    .fixed           (fixed),
    .hit_count       (hit_count),
    .window_open     (window_open)
  );

  sum_top u_sum (
    .clk         (clk),
    .rst_n       (hard_reset_n),
    .sum0        (sum0),
    .sum1        (sum1),
    .thresh      (settings.sum_thresh),
    .bsum        (bsum),
    .t_sum       (t_sum),
    .sum_pattern (sum_pattern)
  );

  extern_fifo_write u_fifo_wr (
    .clk               (clk),
    .rst_n             (hard_reset_n),
    .t_hit             (t_hit),
    .t_sum             (t_sum),
    .hit_pattern       (hit_pattern),
    .sum_pattern       (sum_pattern),
    .sel_sum           (settings.cfg.sel_sum),
    .trig_ready        (trig_ready),
    .live_trig         (live_trig),
    .latched_trig      (latched_trig),
    .fifo_clk          (fifo_clk),
    .fifo_data         (fifo_data),
    .event_num         (event_num),
    .accepted          (),
    .ignored_busy      (),
    .ignored_not_ready ()
  );

  assign status = {10'd0, link_valid, window_open, live_trig, latched_trig, trig_ready};

  // P2 multiplexer: fixed-width hit bits or board sum.
  always_ff @(posedge clk or negedge hard_reset_n) begin
    if (!hard_reset_n) p2_data <= '0;
    else               p2_data <= settings.cfg.p2_hitbits ? fixed : bsum;
  end

  assign trig_clk = clk;
  assign p2_clk   = clk;

endmodule
