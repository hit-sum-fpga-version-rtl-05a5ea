// pattern_table: the 65536 x 1 hit pattern selection table.
//
// Each address is a 16-bit hit pattern; a one stored there selects that
// pattern as a trigger. The VME host writes one entry per control-bus write
// through the write port. The read port is addressed by the window pattern,
// the live hit bits (table overlap mode) or the VME read-back address, as
// chosen by the instantiating module. It is a simple dual-port RAM with a
// registered read, which maps onto FPGA block RAM; the contents start at zero,
// as block RAM does after configuration (the document does not say what the
// table holds before it is written).
//
// Interface: we / wr_adr / wr_data write on the clock edge; rd_data shows the
// entry at rd_adr one clock after rd_adr is presented. A read of the address
// being written returns the old entry.
module pattern_table #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_adr,
  input  logic          wr_data,
  input  logic [AW-1:0] rd_adr,
  output logic          rd_data
);
  logic mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[wr_adr] <= wr_data;
    rd_data <= mem[rd_adr];
  end

endmodule
