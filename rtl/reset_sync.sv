// reset_sync - reset synchronizer: asserts asynchronously, releases on the
// second clk edge after the reset input goes low, so every flip-flop of the
// domain leaves reset in the same cycle. Output is active high. The output
// drives both asynchronous clears (input stage, store stage, FIFO pointers)
// and synchronous resets (calibration, merge logic); lint reports that mix,
// and it is intended: the release is synchronous either way.
module reset_sync (
  input  logic clk,
  input  logic rst_in,    // asynchronous, active high
  output logic rst_out
);
  logic [1:0] q;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) q <= 2'b11;
    else        q <= {q[0], 1'b0};
  end

  assign rst_out = q[1];
endmodule
