// tdc - the time-to-digital converter of one channel.
//
// Measures the width of the vetoed Hit as a coarse count of reference-clock
// cycles plus two calibrated fine positions:
//   width = coarse * T_clk + (start - stop) * T_bin
// with T_bin = T_clk / CAL_BINS once the calibration tables exist.
//
// Datapath: tdl (carry chain, sample and store stages) -> start and stop
// thermometer decoders -> one calibration module each; three coarse counters
// on the reference clock and on the 72 and 144 degree clocks, the latter two
// with their own edge detectors to know when the Hit has ended in their clock
// domain; merge_sync waits for the calibrated values, applies the
// synchronizer decider and emits the word {coarse, start, stop}.
//
// Timing (reference-clock cycles, cycle 0 = the cycle store_stop is high):
// cycle 1 the thermometer codes are stored and decoded, the calibration
// modules see the new hit; cycle 3 end_of_conversion clears the counters;
// cycle 4 value_ready strobes meas. The calibration modules count every
// measured Hit; a new table replaces the old one after CALIBRATION_HITS hits.
//
// The calibration state of each module (st_start, st_stop) is not used
// here; it stays on the module ports for observation in simulation.
//
// Follows the described design. This design's choices: the new-hit strobe to
// the calibration modules is store_stop delayed by one cycle (both codes are
// then stored), and the channel reset also clears the counters.
module tdc
#(
  parameter int unsigned NUM_STAGES       = tdc_pkg::NUM_STAGES,
  parameter int unsigned CALIBRATION_HITS = tdc_pkg::CALIBRATION_HITS,
  parameter int unsigned DECIMATED_HITS   = tdc_pkg::DECIMATED_HITS,
  parameter int unsigned PHASE_THRESHOLD  = tdc_pkg::PHASE_THRESHOLD,
  parameter int unsigned SEED             = 0,
  localparam int unsigned BIN_W           = $clog2(NUM_STAGES + 1)
) (
  input  logic        clk0,          // reference clock
  input  logic        clk1,          // reference clock shifted 72 degrees
  input  logic        clk2,          // reference clock shifted 144 degrees
  input  logic        rst,           // asynchronous assert, released on clk0
  input  logic        hit,           // vetoed Hit
  input  logic        store_start,
  input  logic        store_stop,
  output tdc_pkg::meas_t       meas,
  output logic        value_ready,
  output logic        end_of_conversion,
  output logic        corrected,     // synchronizer changed the coarse count
  output logic        cal_valid,     // both calibration tables exist
  output logic        table_swap,    // a new calibration table came into use
  output logic [BIN_W-1:0] bin_start,
  output logic [BIN_W-1:0] bin_stop
);
  logic [NUM_STAGES-1:0] therm_start, therm_stop;
  logic [tdc_pkg::CAL_W-1:0] cal_start, cal_stop;
  logic                  cal_valid_start, cal_valid_stop;
  logic                  new_hit;
  logic                  fall1, fall2, rise1_unused, rise2_unused;
  logic                  clear;
  logic [tdc_pkg::COARSE_W-1:0] c0, c1, c2;
  tdc_pkg::cal_state_e            st_start, st_stop;
  logic                  swap_start, swap_stop;

  tdl #(.NUM_STAGES(NUM_STAGES), .SEED(SEED)) u_tdl (
    .clk0        (clk0),
    .rst         (rst),
    .hit         (hit),
    .store_start (store_start),
    .store_stop  (store_stop),
    .therm_start (therm_start),
    .therm_stop  (therm_stop)
  );

  thermo_decoder #(.NUM_STAGES(NUM_STAGES), .STOP(1'b0)) u_dec_start (
    .therm (therm_start),
    .bin   (bin_start)
  );

  thermo_decoder #(.NUM_STAGES(NUM_STAGES), .STOP(1'b1)) u_dec_stop (
    .therm (therm_stop),
    .bin   (bin_stop)
  );

  always_ff @(posedge clk0 or posedge rst) begin
    if (rst) new_hit <= 1'b0;
    else     new_hit <= store_stop;
  end

  calibration_module #(
    .NUM_STAGES(NUM_STAGES), .CALIBRATION_HITS(CALIBRATION_HITS),
    .DECIMATED_HITS(DECIMATED_HITS)
  ) u_cal_start (
    .clk        (clk0),
    .rst        (rst),
    .new_hit    (new_hit),
    .hit_bin    (bin_start),
    .cal_value  (cal_start),
    .cal_valid  (cal_valid_start),
    .state      (st_start),
    .table_swap (swap_start)
  );

  calibration_module #(
    .NUM_STAGES(NUM_STAGES), .CALIBRATION_HITS(CALIBRATION_HITS),
    .DECIMATED_HITS(DECIMATED_HITS)
  ) u_cal_stop (
    .clk        (clk0),
    .rst        (rst),
    .new_hit    (new_hit),
    .hit_bin    (bin_stop),
    .cal_value  (cal_stop),
    .cal_valid  (cal_valid_stop),
    .state      (st_stop),
    .table_swap (swap_stop)
  );

  assign cal_valid  = cal_valid_start & cal_valid_stop;
  assign table_swap = swap_start | swap_stop;

  // Edge detectors in the two phase-shifted clock domains.
  edge_detector u_edge1 (.clk(clk1), .rst(rst), .d(hit), .rise(rise1_unused), .fall(fall1));
  edge_detector u_edge2 (.clk(clk2), .rst(rst), .d(hit), .rise(rise2_unused), .fall(fall2));

  assign clear = end_of_conversion | rst;

  coarse_counter u_cnt0 (.clk(clk0), .clear(clear), .hit(hit), .store(store_stop), .count_q(c0));
  coarse_counter u_cnt1 (.clk(clk1), .clear(clear), .hit(hit), .store(fall1),      .count_q(c1));
  coarse_counter u_cnt2 (.clk(clk2), .clear(clear), .hit(hit), .store(fall2),      .count_q(c2));

  merge_sync #(.BIN_W(BIN_W), .PHASE_THRESHOLD(PHASE_THRESHOLD)) u_merge (
    .clk0              (clk0),
    .rst               (rst),
    .store_stop        (store_stop),
    .bin_start         (bin_start),
    .bin_stop          (bin_stop),
    .cal_start         (cal_start),
    .cal_stop          (cal_stop),
    .c0                (c0),
    .c1                (c1),
    .c2                (c2),
    .meas              (meas),
    .value_ready       (value_ready),
    .end_of_conversion (end_of_conversion),
    .corrected         (corrected)
  );
endmodule
