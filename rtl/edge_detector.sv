// edge_detector - two-flip-flop edge detector for the Hit signal.
//
// The first flip-flop holds the value of the input at the current clock edge,
// the second the value at the previous edge. A rise is reported while the
// first is 1 and the second 0, a fall while the first is 0 and the second 1.
// Each pulse lasts exactly one clock cycle and starts one clock edge after the
// edge that first saw the new input level. Both flip-flops clear
// asynchronously on rst, as in the original design, which uses clear-able
// flip-flops for this purpose.
module edge_detector (
  input  logic clk,
  input  logic rst,     // asynchronous, active high
  input  logic d,       // asynchronous input (the Hit)
  output logic rise,
  output logic fall
);
  logic [1:0] edge_q;   // [0] current sample, [1] previous sample

  always_ff @(posedge clk or posedge rst) begin
    if (rst) edge_q <= '0;
    else     edge_q <= {edge_q[0], d};
  end

  assign rise = edge_q[0] & ~edge_q[1];
  assign fall = edge_q[1] & ~edge_q[0];
endmodule
