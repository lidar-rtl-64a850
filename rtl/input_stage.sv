// input_stage - Hit edge detection and veto for one TDC channel.
//
// The veto flip-flop is clocked by the falling edge of the raw Hit: once a Hit
// has ended, the flip-flop is set and masks every further Hit until the TDC
// reports that the measurement has been written (value_ready), which clears it
// asynchronously. Only one Hit at a time therefore travels down the delay line.
// The vetoed Hit (hit_out) feeds the delay line and the coarse counters and is
// sampled by a two-flip-flop edge detector on the reference clock, which
// yields one-cycle store_start and store_stop pulses for the delay-line store
// stage.
//
// Timing: store_start (store_stop) is high during the clock cycle after the
// first reference-clock edge at which hit_out was seen high (low).
//
// Follows the described design: falling-edge-clocked veto flip-flop with
// asynchronous clear, two-flip-flop edge detector. This design's own choice:
// the veto flip-flop is also cleared by the channel reset, so that it starts
// in a known state.
module input_stage (
  input  logic clk0,          // reference clock
  input  logic rst,           // asynchronous, active high
  input  logic hit_in,        // raw Hit from the pin
  input  logic value_ready,   // measurement written: release the veto
  output logic hit_out,       // vetoed Hit to the delay line and counters
  output logic store_start,   // rising edge of hit_out seen
  output logic store_stop,    // falling edge of hit_out seen
  output logic veto           // 1 while new Hits are blocked
);
  logic ready_clr;

  assign ready_clr = value_ready | rst;

  // Veto flip-flop: set at the end of a Hit, cleared when the value is ready.
  always_ff @(negedge hit_in or posedge ready_clr) begin
    if (ready_clr) veto <= 1'b0;
    else           veto <= 1'b1;
  end

  assign hit_out = hit_in & ~veto;

  edge_detector u_edge (
    .clk  (clk0),
    .rst  (rst),
    .d    (hit_out),
    .rise (store_start),
    .fall (store_stop)
  );
endmodule
