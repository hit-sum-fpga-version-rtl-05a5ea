// tb_vme_host: self-checking test of the control-bus register file.
// Writes and reads back every register, checks the decoded settings and the
// sixteen one-shot widths, the read-only status register, the auto-increment
// of the table address on table writes and reads (against a table model with a
// one-clock read), the address reset on a configuration write, and the
// acknowledge latencies (one clock for writes, two for reads).
module tb_vme_host;
  import hit_sum_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] cb_addr = '0, cb_wdata = '0, cb_rdata, status = 16'h0000;
  logic [3:0]  cb_sec = '0;
  logic cb_wr = 0, cb_rd = 0, cb_ack, table_rd_data, tbl_we, tbl_wdata;
  settings_t settings;
  logic [15:0] hitbit_width [HIT_W];
  logic [15:0] tbl_adr;
  bit tmodel [65536];
  int checks = 0, failures = 0;

  vme_host dut (.*);
  always #2 clk = ~clk;

  // table model: write port and registered read at tbl_adr
  always @(posedge clk) begin
    if (tbl_we) tmodel[tbl_adr] <= tbl_wdata;
    table_rd_data <= tmodel[tbl_adr];
  end

  initial begin
    #400000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic bus_wr(input logic [15:0] a, input logic [15:0] d, input logic [3:0] s = 0);
    @(negedge clk); cb_addr = a; cb_sec = s; cb_wdata = d; cb_wr = 1;
    @(negedge clk); cb_wr = 0;
    check(cb_ack === 1'b1, $sformatf("write ack latency at %h", a));
  endtask

  task automatic bus_rd(input logic [15:0] a, output logic [15:0] d, input logic [3:0] s = 0);
    @(negedge clk); cb_addr = a; cb_sec = s; cb_rd = 1;
    @(negedge clk); cb_rd = 0;
    check(cb_ack === 1'b0, "read ack too early");
    @(negedge clk);
    check(cb_ack === 1'b1, $sformatf("read ack latency at %h", a));
    d = cb_rdata;
  endtask

  initial begin
    logic [15:0] d, v;
    logic [15:0] wv [16];
    foreach (tmodel[i]) tmodel[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // plain registers
    bus_wr(ADR_CONFIG, 16'h0016);
    check(settings.cfg.mode == MODE_WINDOW && settings.cfg.sel_sum && !settings.cfg.p2_hitbits && settings.cfg.table_readback, "config decode");
    bus_rd(ADR_CONFIG, d); check(d == 16'h0016, "config readback");
    bus_wr(ADR_CONFIG, 16'h000A);
    check(settings.cfg.mode == MODE_WINDOW && !settings.cfg.sel_sum && settings.cfg.p2_hitbits && !settings.cfg.table_readback, "config decode 2");
    for (int k = 0; k < 6; k++) begin
      logic [15:0] a;
      v = 16'($urandom);
      a = 16'h0403 + 16'(k);
      if (a == ADR_TABLE_DATA) a = ADR_SUM_THRESH;
      bus_wr(a, v);
      bus_rd(a, d); check(d == v, $sformatf("readback %h", a));
      unique case (a)
        ADR_HITS_DLY:   check(settings.hits_dly   == v, "hits_dly");
        ADR_LIVE_WIDTH: check(settings.live_width == v, "live_width");
        ADR_TRIG_BITS:  check(settings.trig_bits  == v, "trig_bits");
        ADR_WIN_WIDTH:  check(settings.win_width  == v, "win_width");
        ADR_BO_QUAL:    check(settings.bo_qual    == v, "bo_qual");
        ADR_SUM_THRESH: check(settings.sum_thresh == v, "sum_thresh");
        default: ;
      endcase
    end
    // sixteen one-shot widths by secondary address
    for (int i = 0; i < 16; i++) begin wv[i] = 16'($urandom); bus_wr(ADR_HITBITS_W, wv[i], 4'(i)); end
    for (int i = 0; i < 16; i++) begin
      bus_rd(ADR_HITBITS_W, d, 4'(i));
      check(d == wv[i] && hitbit_width[i] == wv[i], $sformatf("hitbit width %0d", i));
    end
    // status is read only
    status = 16'h00A5;
    bus_rd(ADR_STATUS, d); check(d == 16'h00A5, "status read");
    bus_wr(ADR_STATUS, 16'hFFFF);
    bus_rd(ADR_STATUS, d); check(d == 16'h00A5, "status write ignored");
    // table: pointer reset by config write, auto-increment on writes
    bus_wr(ADR_CONFIG, 16'h0000);
    check(tbl_adr == 0, "table address reset by config write");
    for (int i = 0; i < 200; i++) bus_wr(ADR_TABLE_DATA, 16'(i % 3 == 0));
    @(negedge clk);
    check(tbl_adr == 200, $sformatf("table address after 200 writes: %0d", tbl_adr));
    for (int i = 0; i < 200; i++) check(tmodel[i] == (i % 3 == 0), $sformatf("table entry %0d", i));
    // read back with configuration bit 4
    bus_wr(ADR_CONFIG, 16'h0010);
    for (int i = 0; i < 200; i++) begin
      bus_rd(ADR_TABLE_DATA, d);
      check(d == 16'(i % 3 == 0), $sformatf("table readback %0d", i));
    end
    check(tbl_adr == 200, "table address after 200 reads");
    bus_rd(ADR_EXT_FIFO, d); check(d == 0, "unmapped read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
