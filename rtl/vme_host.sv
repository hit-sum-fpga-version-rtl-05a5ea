// vme_host: control-bus register file of the Hit Sum FPGA.
//
// The VME FPGA reads and writes 16-bit registers at the addresses of the
// control-bus address map: status (0x0400, read only), configuration
// (0x0401), sixteen one-shot widths (0x0402, secondary address 0..15), hit
// delay (0x0403), live trigger width (0x0404), window trigger bits (0x0405),
// window width (0x0406), boolean overlap qualified bits (0x0407), table data
// (0x0408) and sum threshold (0x040A). Table data is written one entry per
// write, bit 0 of the data, at an address that increments after every write
// or read of 0x0408; with configuration bit 4 set, a read of 0x0408 returns
// the entry at that address. The table address returns to zero on reset and
// on every write of the configuration register. 0x0409 is the external FIFO,
// which the VME FPGA reads directly; this block returns zero there, as for any
// unmapped address. Only single accesses exist (no burst).
//
// The bus protocol is this design's own, since the document gives only the
// map: one-clock cb_wr or cb_rd strobes with cb_addr, cb_sec (secondary
// address) and cb_wdata; cb_ack pulses one clock after a write and two clocks
// after a read, with cb_rdata valid while cb_ack is high. A new strobe must
// wait for cb_ack.
//
// Outputs: the decoded settings struct, the sixteen one-shot widths and the
// table write port (tbl_adr, tbl_we, tbl_wdata); table_rd_data comes back from
// the table, status from the datapath.
module vme_host
  import hit_sum_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       cb_addr,
  input  logic [3:0]        cb_sec,
  input  logic              cb_wr,
  input  logic              cb_rd,
  input  logic [15:0]       cb_wdata,
  output logic [15:0]       cb_rdata,
  output logic              cb_ack,
  input  logic [15:0]       status,
  input  logic              table_rd_data,
  output settings_t         settings,
  output logic [15:0]       hitbit_width [HIT_W],
  output logic [TABLE_AW-1:0] tbl_adr,
  output logic              tbl_we,
  output logic              tbl_wdata
);
  logic [15:0] config_r;
  logic        rd_pend;
  logic [15:0] rd_addr;
  logic [3:0]  rd_sec;

  logic [15:0] hits_dly_r, live_width_r, trig_bits_r, win_width_r, bo_qual_r, sum_thresh_r;

  assign settings = '{cfg:        decode_config(config_r),
                      hits_dly:   hits_dly_r,
                      live_width: live_width_r,
                      trig_bits:  trig_bits_r,
                      win_width:  win_width_r,
                      bo_qual:    bo_qual_r,
                      sum_thresh: sum_thresh_r};

  // Whatever is pending gets its data one clock after the strobe; the table
  // entry at tbl_adr has been read by then.
  function automatic logic [15:0] read_mux(input logic [15:0] a, input logic [3:0] s);
    unique case (a)
      ADR_STATUS:     return status;
      ADR_CONFIG:     return config_r;
      ADR_HITBITS_W:  return hitbit_width[s];
      ADR_HITS_DLY:   return hits_dly_r;
      ADR_LIVE_WIDTH: return live_width_r;
      ADR_TRIG_BITS:  return trig_bits_r;
      ADR_WIN_WIDTH:  return win_width_r;
      ADR_BO_QUAL:    return bo_qual_r;
      ADR_TABLE_DATA: return {15'd0, table_rd_data};
      ADR_SUM_THRESH: return sum_thresh_r;
      default:        return 16'h0000;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      config_r            <= '0;
      hits_dly_r   <= '0;
      live_width_r <= '0;
      trig_bits_r  <= '0;
      win_width_r  <= '0;
      bo_qual_r    <= '0;
      sum_thresh_r <= '1;
      for (int i = 0; i < HIT_W; i++) hitbit_width[i] <= '0;
      tbl_adr   <= '0;
      tbl_we    <= 1'b0;
      tbl_wdata <= 1'b0;
      rd_pend   <= 1'b0;
      rd_addr   <= '0;
      rd_sec    <= '0;
      cb_rdata  <= '0;
      cb_ack    <= 1'b0;
    end else begin
      cb_ack  <= 1'b0;
      rd_pend <= 1'b0;
      // The table write happens on the clock after the strobe; advance the
      // address once it is done.
      if (tbl_we) tbl_adr <= tbl_adr + 1'b1;
      tbl_we  <= 1'b0;

      if (cb_wr) begin
        cb_ack <= 1'b1;
        unique case (cb_addr)
          ADR_CONFIG:     begin config_r <= cb_wdata; tbl_adr <= '0; end
          ADR_HITBITS_W:  hitbit_width[cb_sec] <= cb_wdata;
          ADR_HITS_DLY:   hits_dly_r   <= cb_wdata;
          ADR_LIVE_WIDTH: live_width_r <= cb_wdata;
          ADR_TRIG_BITS:  trig_bits_r  <= cb_wdata;
          ADR_WIN_WIDTH:  win_width_r  <= cb_wdata;
          ADR_BO_QUAL:    bo_qual_r    <= cb_wdata;
          ADR_TABLE_DATA: begin tbl_we <= 1'b1; tbl_wdata <= cb_wdata[0]; end
          ADR_SUM_THRESH: sum_thresh_r <= cb_wdata;
          default: ;
        endcase
      end else if (cb_rd) begin
        rd_pend <= 1'b1;
        rd_addr <= cb_addr;
        rd_sec  <= cb_sec;
      end

      if (rd_pend) begin
        cb_rdata <= read_mux(rd_addr, rd_sec);
        cb_ack   <= 1'b1;
        if (rd_addr == ADR_TABLE_DATA) tbl_adr <= tbl_adr + 1'b1;
      end
    end
  end

endmodule
