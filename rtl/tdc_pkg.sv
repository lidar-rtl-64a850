// tdc_pkg - constants and types shared by the LiDAR time-to-digital converter
// (TDC) acquisition system.
//
// The system measures the width of a Hit pulse as
//   TotalTime = Coarse * T_clk + (FineStart - FineStop)
// where Coarse counts reference-clock cycles and the fine parts come from a
// 692-tap carry-chain delay line, re-binned on line by a bin-decimation
// calibration into 173 bins of nominally 15.2 ps.
//
// Numbers taken from the design description: 2.5 ns reference clock, 692
// taps of about 3.8 ps, decimation by 4 into 173 calibrated bins, 8-bit
// commands with a 2-bit opcode and 6-bit channel address, 16 channels, a
// 2 x 1024-word calibration RAM (sections at 0x000 and 0x400) and a
// 19-bit RAM word. The number of hits per calibration run, the FIFO depth,
// the coarse counter width and the command opcodes are this design's own
// choices.
package tdc_pkg;

  // Reference clock period in picoseconds (2.5 ns, 400 MHz).
  localparam int unsigned CLK_PERIOD_PS = 2500;

  // Delay line: number of taps.
  localparam int unsigned NUM_STAGES = 692;
  // Width of a decoded (raw) tap position: 0 .. NUM_STAGES.
  localparam int unsigned BIN_W = $clog2(NUM_STAGES + 1);

  // Bin decimation: 4 raw taps per ideal bin, 173 ideal bins.
  localparam int unsigned DECIMATION = 4;
  localparam int unsigned CAL_BINS   = NUM_STAGES / DECIMATION;  // 173
  localparam int unsigned CAL_W      = 8;                        // holds 0..255

  // Calibration RAM: two sections of 1024 words, 19-bit words.
  localparam int unsigned CAL_ADDR_W = 11;
  localparam int unsigned RAM_WIDTH  = 19;

  // Hits collected for one calibration table, and the number of those hits
  // that make up one ideal bin (hits spread evenly over the CAL_BINS bins).
  localparam int unsigned CALIBRATION_HITS = 8192;
  localparam int unsigned DECIMATED_HITS   = CALIBRATION_HITS / CAL_BINS;

  // Coarse counter width; a measurement word is {coarse, start, stop}.
  localparam int unsigned COARSE_W = 15;
  localparam int unsigned MEAS_W   = COARSE_W + 2 * CAL_W;   // 31
  // A FIFODATA word is {empty, measurement}: 32 bits.
  localparam int unsigned FIFODATA_W = MEAS_W + 1;

  // FIFO depth as log2.
  localparam int unsigned FIFO_AW = 10;

  // Synchronizer decider threshold on the raw tap position (taps).
  localparam int unsigned PHASE_THRESHOLD = 210;

  // Channels behind one AXI slave; command address field width.
  localparam int unsigned NUMBER_CHANNELS = 16;
  localparam int unsigned CMD_ADDR_W      = 6;

  // Command opcodes in bits [7:6] of a command byte.
  typedef enum logic [1:0] {
    CMD_NOP          = 2'b00,
    CMD_READ_CHANNEL = 2'b01,
    CMD_READ_ALL     = 2'b10,
    CMD_RST          = 2'b11
  } cmd_op_e;

  // One measurement as written into the FIFO.
  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    logic [CAL_W-1:0]    start;
    logic [CAL_W-1:0]    stop;
  } meas_t;

  // Calibration state machine states.
  typedef enum logic [1:0] {
    CAL_RST          = 2'd0,
    CAL_ACQUISITION  = 2'd1,
    CAL_CONVERSION   = 2'd2,
    CAL_CONSULTATION = 2'd3
  } cal_state_e;

endpackage
