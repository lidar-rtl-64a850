// coarse_counter - counts the clock edges during which the Hit is high.
//
// The Hit acts as the count enable: at every rising clock edge where hit is
// high the count goes up by one. When store is high at a clock edge the count
// is copied to count_q, which holds it for the merge logic. clear resets the
// running count synchronously but leaves the stored copy alone, because the
// phase-shifted counters see clear before the merge logic reads them; the TDC
// pulses it at the end of each conversion so the next Hit starts from zero.
//
// A TDC channel uses three of these: one on the reference clock and two on
// copies of it shifted by 72 and 144 degrees, whose counts let the merge logic
// detect and repair a count that was lost or gained when a Hit edge fell close
// to a reference-clock edge. Follows the described design; the count width is
// this design's choice (15 bits, 81.9 us at 2.5 ns).
module coarse_counter #(
  parameter int unsigned WIDTH = tdc_pkg::COARSE_W
) (
  input  logic             clk,
  input  logic             clear,   // synchronous, active high
  input  logic             hit,
  input  logic             store,
  output logic [WIDTH-1:0] count_q
);
  logic [WIDTH-1:0] count;

  always_ff @(posedge clk) begin
    if (clear)    count <= '0;
    else if (hit) count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (store) count_q <= count;
  end
endmodule
