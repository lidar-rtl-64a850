// fifo_sync - two-flip-flop synchronizer for a Gray-coded FIFO pointer.
//
// Carries a pointer from one clock domain into the domain of clk. Because
// the pointer is Gray-coded, at most one bit changes per step, so a sample
// taken while it changes is either the old or the new value. The output lags
// the input by two clk edges. Asynchronous active-high reset to zero.
module fifo_sync #(
  parameter int unsigned W = tdc_pkg::FIFO_AW + 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
