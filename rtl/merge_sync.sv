// merge_sync - merge-delay module with the synchronizer decider.
//
// After the stop of a Hit has been stored (store_stop pulse), the calibrated
// start and stop positions need a few cycles to come out of the decoders and
// the calibration modules. This module waits MERGE_DELAY cycles, then:
//   cycle MERGE_DELAY   : end_of_conversion is high (clears the coarse
//                         counters) and the measurement word is registered;
//   cycle MERGE_DELAY+1 : value_ready is high for one cycle with meas valid
//                         (FIFO write strobe; it also releases the input veto).
// Cycles are counted from the cycle in which store_stop is high (cycle 0).
//
// The decider picks the coarse count. The reference-clock counter (c0) may
// have gained or lost one count when a Hit edge fell next to a reference
// clock edge; that case shows as a raw fine position of 0 at the start or at
// the stop. The counters on the 72 and 144 degree clocks (c1, c2) then arbitrate:
//   start position 0 and c0 <= c1:
//     c1 > c2                          -> c1
//     c1 == c2, stop position <= TH    -> c1
//     c1 == c2, stop position  > TH    -> c1 + 1
//   otherwise stop position 0 and c0 >= c1:
//     c1 < c2                          -> c1
//     c1 == c2, start position <= TH   -> c1
//     c1 == c2, start position  > TH   -> c1 - 1
//   otherwise                          -> c0
// where TH is PHASE_THRESHOLD raw taps. `corrected` tells whether a rule
// other than the last one chose the count.
//
// Follows the described decider and merge order {coarse, start, stop}. The
// merge delay of 3 cycles and the one-cycle gap between clearing the counters
// and releasing the veto are this design's choices.
module merge_sync
#(
  parameter int unsigned BIN_W           = tdc_pkg::BIN_W,
  parameter int unsigned COARSE_W        = tdc_pkg::COARSE_W,
  parameter int unsigned CAL_W           = tdc_pkg::CAL_W,
  parameter int unsigned PHASE_THRESHOLD = tdc_pkg::PHASE_THRESHOLD,
  parameter int unsigned MERGE_DELAY     = 3
) (
  input  logic                clk0,
  input  logic                rst,                // synchronous, active high
  input  logic                store_stop,
  input  logic [BIN_W-1:0]    bin_start,          // raw positions
  input  logic [BIN_W-1:0]    bin_stop,
  input  logic [CAL_W-1:0]    cal_start,          // calibrated positions
  input  logic [CAL_W-1:0]    cal_stop,
  input  logic [COARSE_W-1:0] c0,                 // reference counter
  input  logic [COARSE_W-1:0] c1,                 // 72 degree counter
  input  logic [COARSE_W-1:0] c2,                 // 144 degree counter
  output logic [COARSE_W+2*CAL_W-1:0] meas,       // {coarse, start, stop}
  output logic                value_ready,
  output logic                end_of_conversion,
  output logic                corrected
);
  logic [MERGE_DELAY:1] pipe;
  logic [COARSE_W-1:0]  coarse;
  logic                 fix;
  logic                 start_late, stop_late;

  assign start_late = bin_start > BIN_W'(PHASE_THRESHOLD);
  assign stop_late  = bin_stop  > BIN_W'(PHASE_THRESHOLD);

  always_comb begin
    fix    = 1'b1;
    coarse = c0;
    if (bin_start == '0 && c0 <= c1 && c1 > c2)                 coarse = c1;
    else if (bin_start == '0 && c0 <= c1 && c1 == c2 && !stop_late) coarse = c1;
    else if (bin_start == '0 && c0 <= c1 && c1 == c2)           coarse = c1 + 1'b1;
    else if (bin_stop == '0 && c0 >= c1 && c1 < c2)             coarse = c1;
    else if (bin_stop == '0 && c0 >= c1 && c1 == c2 && !start_late) coarse = c1;
    else if (bin_stop == '0 && c0 >= c1 && c1 == c2)            coarse = c1 - 1'b1;
    else                                                        fix = 1'b0;
  end

  always_ff @(posedge clk0) begin
    if (rst) begin
      pipe              <= '0;
      value_ready       <= 1'b0;
      meas              <= '0;
      corrected         <= 1'b0;
    end else begin
      pipe        <= {pipe[MERGE_DELAY-1:1], store_stop};
      value_ready <= pipe[MERGE_DELAY];
      if (pipe[MERGE_DELAY]) begin
        meas      <= {coarse, cal_start, cal_stop};
        corrected <= fix;
      end
    end
  end

  assign end_of_conversion = pipe[MERGE_DELAY];
endmodule
