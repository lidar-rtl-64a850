// fifo_wptr - write-pointer generator and full flag of the measurement FIFO.
//
// Keeps a binary write pointer one bit wider than the address (the extra bit
// tells a full FIFO from an empty one) and its Gray-coded copy for the read
// domain. The pointer advances when winc is high and the FIFO is not full.
// The FIFO is full when the next Gray pointer equals the synchronized read
// pointer with its two most significant bits inverted. full is registered:
// it is valid the cycle after the write that filled the FIFO.
module fifo_wptr #(
  parameter int unsigned AW = tdc_pkg::FIFO_AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          winc,
  input  logic [AW:0]   rptr_sync,   // Gray read pointer, write domain
  output logic          full,
  output logic          wen,         // memory write strobe
  output logic [AW:0]   wptr,        // Gray write pointer
  output logic [AW-1:0] waddr
);
  logic [AW:0] wbin, wbin_next, wgray_next;

  assign wen        = winc & ~full;
  assign wbin_next  = wbin + (AW+1)'(wen);
  assign wgray_next = (wbin_next >> 1) ^ wbin_next;
  assign waddr      = wbin[AW-1:0];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wbin <= '0;
      wptr <= '0;
      full <= 1'b0;
    end else begin
      wbin <= wbin_next;
      wptr <= wgray_next;
      full <= (wgray_next == {~rptr_sync[AW:AW-1], rptr_sync[AW-2:0]});
    end
  end
endmodule
