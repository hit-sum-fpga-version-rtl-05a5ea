// tb_resync_fifo: self-checking test of the dual-clock FIFO.
// Write and read clocks run at slightly different periods. Random writes and
// reads are checked against a queue (order and contents); a fill phase with
// reads stopped checks that exactly DEPTH words are accepted before full;
// a drain checks empty afterwards.
module tb_resync_fifo;
  localparam int W = 13, DEPTH = 15;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, accepted = 0;
  bit reading = 1;

  resync_fifo #(.DATA_W(W), .DEPTH(DEPTH)) dut (.*);

  always #2   wr_clk = ~wr_clk;
  always #2.3 rd_clk = ~rd_clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: the request and the full flag are both settled at the falling
  // edge, so the accepted words are known without sampling at the clock edge
  task automatic write_some(input int n, input int pct);
    for (int i = 0; i < n; i++) begin
      automatic bit fire;
      @(negedge wr_clk);
      wr_en = ($urandom_range(0, 99) < pct);
      wr_data = W'($urandom);
      fire = wr_en && !full;
      @(posedge wr_clk);
      if (fire) begin q.push_back(wr_data); accepted++; end
    end
    @(negedge wr_clk) wr_en = 0;
  endtask

  // reader: random reads; each word read is compared with the queue at the
  // falling edge after the read
  bit pending = 0;
  always @(negedge rd_clk) begin
    if (pending) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("read from FIFO with nothing written"); end
      else begin
        automatic logic [W-1:0] exp = q.pop_front();
        if (rd_data !== exp) begin
          failures++;
          if (failures < 10) $display("read %h expected %h", rd_data, exp);
        end
      end
    end
    rd_en = reading && ($urandom_range(0, 99) < 60);
    pending = rd_en && !empty;
  end

  initial begin
    repeat (3) @(posedge wr_clk);
    wr_rst_n = 1; rd_rst_n = 1;
    write_some(3000, 50);
    // fill with reads stopped
    wait (q.size() == 0);
    reading = 0;
    repeat (10) @(posedge rd_clk);
    repeat (10) @(posedge wr_clk);
    accepted = 0;
    write_some(40, 100);
    checks++;
    if (accepted != DEPTH) begin failures++; $display("accepted %0d words before full, expected %0d", accepted, DEPTH); end
    checks++;
    if (!full) begin failures++; $display("full not set"); end
    reading = 1;
    wait (q.size() == 0);
    repeat (10) @(posedge rd_clk);
    checks++;
    if (!empty) begin failures++; $display("empty not set after drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
