// fifo_rptr - read-pointer generator and empty flag of the measurement FIFO.
//
// Binary read pointer one bit wider than the address plus its Gray-coded copy
// for the write domain. The pointer advances when rinc is high and the FIFO
// is not empty (ren then also reads the memory word at the old address). The
// FIFO is empty when the next Gray pointer equals the synchronized write
// pointer. empty is registered and starts at 1 after reset.
module fifo_rptr #(
  parameter int unsigned AW = tdc_pkg::FIFO_AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rinc,
  input  logic [AW:0]   wptr_sync,   // Gray write pointer, read domain
  output logic          empty,
  output logic          ren,         // memory read strobe
  output logic [AW:0]   rptr,        // Gray read pointer
  output logic [AW-1:0] raddr
);
  logic [AW:0] rbin, rbin_next, rgray_next;

  assign ren        = rinc & ~empty;
  assign rbin_next  = rbin + (AW+1)'(ren);
  assign rgray_next = (rbin_next >> 1) ^ rbin_next;
  assign raddr      = rbin[AW-1:0];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rbin  <= '0;
      rptr  <= '0;
      empty <= 1'b1;
    end else begin
      rbin  <= rbin_next;
      rptr  <= rgray_next;
      empty <= (rgray_next == wptr_sync);
    end
  end
endmodule
