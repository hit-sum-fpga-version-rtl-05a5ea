// hit_sum_pkg: types and constants shared by the Hit Sum FPGA modules.
//
// The Hit Sum FPGA takes 8 hit bits and a 16-bit sum from each of two ADC
// FPGAs (16 hit bits and two sums in all), turns the hit bits into triggers
// in one of three modes, adds the sums, and writes a 32-bit hit word to an
// external FIFO when a trigger is accepted. This package holds the
// control-bus register addresses, the mode encoding of the configuration
// register and the configuration struct that the VME register file hands to
// the datapath. Addresses and the mode encoding follow the control-bus
// address map; the struct layout is this design's own.
package hit_sum_pkg;

  localparam int unsigned HIT_W   = 16;  // hit bits in all (two ADC FPGAs x 8)
  localparam int unsigned SUM_W   = 16;  // board sum width
  localparam int unsigned CTRL_W  = 16;  // every control register is 16 bits
  localparam int unsigned TABLE_AW = 16; // 65536 x 1 pattern selection table

  // Control bus primary addresses.
  localparam logic [15:0] ADR_STATUS      = 16'h0400;
  localparam logic [15:0] ADR_CONFIG      = 16'h0401;
  localparam logic [15:0] ADR_HITBITS_W   = 16'h0402; // secondary 0..15
  localparam logic [15:0] ADR_HITS_DLY    = 16'h0403;
  localparam logic [15:0] ADR_LIVE_WIDTH  = 16'h0404;
  localparam logic [15:0] ADR_TRIG_BITS   = 16'h0405;
  localparam logic [15:0] ADR_WIN_WIDTH   = 16'h0406;
  localparam logic [15:0] ADR_BO_QUAL     = 16'h0407;
  localparam logic [15:0] ADR_TABLE_DATA  = 16'h0408;
  localparam logic [15:0] ADR_EXT_FIFO    = 16'h0409;
  localparam logic [15:0] ADR_SUM_THRESH  = 16'h040A;

  // Configuration bits 1:0.
  typedef enum logic [1:0] {
    MODE_TABLE  = 2'b00,
    MODE_BO     = 2'b01,
    MODE_WINDOW = 2'b10,
    MODE_UNDEF  = 2'b11
  } hit_mode_e;

  // Decoded configuration register.
  typedef struct packed {
    logic      table_readback; // bit 4: read back table, trigger and table modes off
    logic      p2_hitbits;     // bit 3: 1 = fixed-width hit bits to P2, 0 = sum
    logic      sel_sum;        // bit 2: 1 = T_SUM and sum pattern, 0 = T_HIT and hit pattern
    hit_mode_e mode;           // bits 1:0
  } config_t;

  // All settings the VME register file hands to the datapath.
  typedef struct packed {
    config_t              cfg;
    logic [CTRL_W-1:0]    hits_dly;
    logic [CTRL_W-1:0]    live_width;
    logic [HIT_W-1:0]     trig_bits;
    logic [CTRL_W-1:0]    win_width;
    logic [HIT_W-1:0]     bo_qual;
    logic [SUM_W-1:0]     sum_thresh;
  } settings_t;

  function automatic config_t decode_config(input logic [CTRL_W-1:0] r);
    config_t c;
    c.mode           = hit_mode_e'(r[1:0]);
    c.sel_sum        = r[2];
    c.p2_hitbits     = r[3];
    c.table_readback = r[4];
    return c;
  endfunction

endpackage
