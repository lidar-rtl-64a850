// tdl - tapped delay line with its sample and store stages.
//
// The vetoed Hit runs down the carry chain (carry_chain). A bank of
// flip-flops samples every tap on each reference-clock edge (sample stage).
// When the input stage signals the start (store_start) or the end
// (store_stop) of a Hit, the sample-stage word of the previous edge, which
// is the edge that first saw the new Hit level, is copied into the start or
// stop thermometer register (store stage). The start register then holds a
// run of ones whose length is the distance the rising edge travelled before
// the clock edge (FineTime_Start); the stop register holds a run of zeros
// measuring FineTime_Stop.
//
// Timing: therm_start/therm_stop change one clock edge after a store pulse
// and hold until the next one. Store registers clear asynchronously on rst;
// the sample stage has no reset, as in the original design.
//
// The LUT loads that the original design hangs on every carry output to
// even out tap delays have no logic function and are not modelled.
module tdl #(
  parameter int unsigned NUM_STAGES = tdc_pkg::NUM_STAGES,
  parameter int unsigned SEED       = 0
) (
  input  logic                  clk0,
  input  logic                  rst,
  input  logic                  hit,          // vetoed Hit
  input  logic                  store_start,
  input  logic                  store_stop,
  output logic [NUM_STAGES-1:0] therm_start,
  output logic [NUM_STAGES-1:0] therm_stop
);
  logic [NUM_STAGES-1:0] taps;
  logic [NUM_STAGES-1:0] sample_q;

  carry_chain #(.NUM_STAGES(NUM_STAGES), .SEED(SEED)) u_chain (
    .ci (hit),
    .co (taps)
  );

  // Sample stage.
  always_ff @(posedge clk0) sample_q <= taps;

  // Store stage.
  always_ff @(posedge clk0 or posedge rst) begin
    if (rst) begin
      therm_start <= '0;
      therm_stop  <= '0;
    end else begin
      if (store_start) therm_start <= sample_q;
      if (store_stop)  therm_stop  <= sample_q;
    end
  end
endmodule
