// resync_fifo: dual-clock FIFO that moves words from the ADC link clock into
// the Hit Sum clock.
//
// The ADC FPGA sends its data with an accompanying ClockOut; the Hit Sum CLK
// has the same frequency but an unknown phase, so the words pass through this
// FIFO, whose write and read clocks are independent. Storage is a 2**AW entry
// array; write and read pointers are AW+1 bits wide and cross the clock
// domains as Gray code through two-flop synchronisers. The usable depth is
// DEPTH (15 by default, the "15X13" FIFO of the resync diagram; DATA_W
// defaults to its 13 bits), so full is declared one entry before the array
// would wrap. Gray pointers are this design's choice.
//
// Interface: write side wr_clk / wr_rst_n / wr_en / wr_data / full; read side
// rd_clk / rd_rst_n / rd_en / rd_data / empty. A read with rd_en high and
// empty low updates rd_data on that rd_clk edge. A write into a full FIFO and a
// read from an empty one are ignored. A written word becomes visible to the
// read side two to three rd_clk cycles later.
module resync_fifo #(
  parameter int unsigned DATA_W = 13,
  parameter int unsigned DEPTH  = 15
) (
  input  logic              wr_clk,
  input  logic              wr_rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  output logic              full,

  input  logic              rd_clk,
  input  logic              rd_rst_n,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              empty
);
  localparam int unsigned AW = (DEPTH <= 1) ? 1 : $clog2(DEPTH);
  localparam int unsigned PW = AW + 1;

  logic [DATA_W-1:0] mem [2**AW];

  function automatic logic [PW-1:0] bin2gray(input logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [PW-1:0] gray2bin(input logic [PW-1:0] g);
    logic [PW-1:0] b;
    b[PW-1] = g[PW-1];
    for (int i = PW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [PW-1:0] wr_bin, wr_gray;
  logic [PW-1:0] rd_bin, rd_gray;

  // ---------------- write domain ----------------
  logic [PW-1:0] rd_gray_w1, rd_gray_w2;
  logic [PW-1:0] wr_used;

  assign wr_used = wr_bin - gray2bin(rd_gray_w2);
  assign full    = (wr_used >= PW'(DEPTH));

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      if (wr_en && !full) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  // ---------------- read domain ----------------
  logic [PW-1:0] wr_gray_r1, wr_gray_r2;

  assign empty = (rd_gray == wr_gray_r2);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
      rd_data    <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      if (rd_en && !empty) begin
        rd_data <= mem[rd_bin[AW-1:0]];
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= bin2gray(rd_bin + 1'b1);
      end
    end
  end

endmodule
