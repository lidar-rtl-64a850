// tdc_peripheral - one complete acquisition channel: input stage, TDC and
// measurement FIFO.
//
// A Hit pulse on `hit` is measured (see tdc) and the result word
// {coarse, start, stop} is pushed into the FIFO; while a measurement is in
// progress the input stage vetoes further Hits. The reader pops a word with a
// one-cycle read_fifo pulse on rclk; one rclk edge later fifo_data shows
// {invalid, coarse, start, stop}, invalid being 1 when the FIFO was empty.
// The channel can be driven directly by any circuit through read_fifo and
// fifo_data; in this system the AXI slave does it.
//
// rst (asynchronous, active high) clears the FIFO, the input stage and the
// calibration state; it is synchronized separately into the reference-clock
// and reader-clock domains. Measurement words written before the first
// calibration table exists carry zero start and stop fields.
//
// The TDC's end_of_conversion strobe and raw positions are not needed at
// this level and are left unused.
//
// Follows the described channel structure. The reset synchronizers and the
// status outputs are this design's own additions.
module tdc_peripheral
#(
  parameter int unsigned NUM_STAGES       = tdc_pkg::NUM_STAGES,
  parameter int unsigned CALIBRATION_HITS = tdc_pkg::CALIBRATION_HITS,
  parameter int unsigned DECIMATED_HITS   = tdc_pkg::DECIMATED_HITS,
  parameter int unsigned FIFO_AW          = tdc_pkg::FIFO_AW,
  parameter int unsigned SEED             = 0
) (
  input  logic                  clk0,
  input  logic                  clk1,
  input  logic                  clk2,
  input  logic                  rclk,        // reader clock
  input  logic                  rst,
  input  logic                  hit,
  input  logic                  read_fifo,   // rclk domain
  output logic [tdc_pkg::FIFODATA_W-1:0] fifo_data,   // rclk domain
  output logic                  fifo_full,   // clk0 domain
  output logic                  fifo_empty,  // rclk domain
  output logic                  value_ready, // a measurement was produced
  output logic                  corrected,   // its coarse count was repaired
  output logic                  cal_valid,
  output logic                  table_swap,
  output logic                  veto
);
  localparam int unsigned BIN_W = $clog2(NUM_STAGES + 1);

  logic       rst0, rstr;
  logic       hit_v, store_start, store_stop, eoc;
  tdc_pkg::meas_t      meas;
  logic [BIN_W-1:0] bin_start, bin_stop;

  reset_sync u_rs0 (.clk(clk0), .rst_in(rst), .rst_out(rst0));
  reset_sync u_rsr (.clk(rclk), .rst_in(rst), .rst_out(rstr));

  input_stage u_in (
    .clk0        (clk0),
    .rst         (rst0),
    .hit_in      (hit),
    .value_ready (value_ready),
    .hit_out     (hit_v),
    .store_start (store_start),
    .store_stop  (store_stop),
    .veto        (veto)
  );

  tdc #(
    .NUM_STAGES(NUM_STAGES), .CALIBRATION_HITS(CALIBRATION_HITS),
    .DECIMATED_HITS(DECIMATED_HITS), .SEED(SEED)
  ) u_tdc (
    .clk0              (clk0),
    .clk1              (clk1),
    .clk2              (clk2),
    .rst               (rst0),
    .hit               (hit_v),
    .store_start       (store_start),
    .store_stop        (store_stop),
    .meas              (meas),
    .value_ready       (value_ready),
    .end_of_conversion (eoc),
    .corrected         (corrected),
    .cal_valid         (cal_valid),
    .table_swap        (table_swap),
    .bin_start         (bin_start),
    .bin_stop          (bin_stop)
  );

  async_fifo #(.DATA_W(tdc_pkg::MEAS_W), .AW(FIFO_AW)) u_fifo (
    .wclk   (clk0),
    .wrst   (rst0),
    .winc   (value_ready),
    .wdata  (meas),
    .wfull  (fifo_full),
    .rclk   (rclk),
    .rrst   (rstr),
    .rinc   (read_fifo),
    .rdata  (fifo_data),
    .rempty (fifo_empty)
  );
endmodule
