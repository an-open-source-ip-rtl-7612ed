// mvt_pkg: constants and types shared by the MVT-Quad core.
//
// The core digitises four comparator outputs with one sample per fast-clock
// cycle (800 MSPS at an 800 MHz fast clock) and works on them in a system
// clock that is the fast clock divided by DES_RATIO. Each comparator's
// activity within one system-clock period is summarised in an 8-bit
// tdc_hit_t (first rising and first falling transition with their sample
// positions); four of them make up one 32-bit AXI-Stream payload word.
// The four inputs, the 800 MHz fast clock and the 32-bit stream word follow
// the published core; the 1:8 ratio, the bit layout of a payload word and
// the register map are this implementation's choices.
package mvt_pkg;

  // number of comparator inputs of one core (an "MVT-Quad")
  localparam int NUM_CH    = 4;
  // fast-clock samples per system-clock period (800 MHz / 100 MHz)
  localparam int DES_RATIO = 8;
  // width of a sample position inside one system-clock period
  localparam int POS_W     = $clog2(DES_RATIO);
  // AXI-Stream word and system-clock counter width
  localparam int AXIS_W    = 32;
  localparam int TS_W      = 32;
  // AXI-Lite bus
  localparam int AXIL_AW   = 5;
  localparam int AXIL_DW   = 32;

  // Result of the time-to-digital conversion of one channel for one
  // system-clock period. Positions count fast-clock samples from the start
  // of the period: 0 is the earliest sample. A position marks the first
  // sample at the new level.
  typedef struct packed {
    logic             fall_valid;
    logic [POS_W-1:0] fall_pos;
    logic             rise_valid;
    logic [POS_W-1:0] rise_pos;
  } tdc_hit_t;


  // Register map of the AXI-Lite configuration port (byte addresses).
  localparam logic [AXIL_AW-1:0] REG_CTRL      = 5'h00; // [0] enable, [1] clear timestamp (self-clearing)
  localparam logic [AXIL_AW-1:0] REG_CHAN_MASK = 5'h04; // [NUM_CH-1:0] channel enables
  localparam logic [AXIL_AW-1:0] REG_STATUS    = 5'h08; // [0] overflow (write 1 to clear)
  localparam logic [AXIL_AW-1:0] REG_DROPS     = 5'h0C; // lost system-clock periods (cleared with overflow)
  localparam logic [AXIL_AW-1:0] REG_TIMESTAMP = 5'h10; // current system-clock counter
  localparam logic [AXIL_AW-1:0] REG_INFO      = 5'h14; // [31:16] DES_RATIO, [15:0] NUM_CH

  // AXI response codes
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

endpackage
