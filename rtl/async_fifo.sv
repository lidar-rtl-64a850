// async_fifo - dual-clock measurement FIFO of one TDC channel.
//
// The TDC writes measurements on its reference clock; a reader (the AXI slave
// or a processor) pops them on its own clock. Write and read pointers are
// kept in their own domains and exchanged in Gray code through two-flip-flop
// synchronizers (the classic asynchronous FIFO), giving conservative full and
// empty flags.
//
// Write side: wdata is stored at a wclk edge where winc is high and the FIFO
// is not full; a write to a full FIFO is dropped.
// Read side: a one-cycle rinc pops the oldest word. One rclk edge later rdata
// shows {0, word}. If the FIFO was empty, nothing is popped and rdata shows
// {1, previous word}: the top bit marks the read as invalid, so software can
// discard it. rdata holds until the next rinc.
//
// Follows the described FIFO (Gray pointers, two-stage synchronizers, full
// test with the two MSBs inverted, empty bit merged into the read word).
// This design's choices: registered read data, depth 2^AW = 1024.
module async_fifo #(
  parameter int unsigned DATA_W = tdc_pkg::MEAS_W,
  parameter int unsigned AW     = tdc_pkg::FIFO_AW
) (
  input  logic              wclk,
  input  logic              wrst,     // asynchronous, active high
  input  logic              winc,
  input  logic [DATA_W-1:0] wdata,
  output logic              wfull,
  input  logic              rclk,
  input  logic              rrst,     // asynchronous, active high
  input  logic              rinc,
  output logic [DATA_W:0]   rdata,    // {invalid, word}
  output logic              rempty
);
  logic [AW:0]       wptr, rptr, wptr_sync, rptr_sync;
  logic [AW-1:0]     waddr, raddr;
  logic              wen, ren;
  logic [DATA_W-1:0] mem_q;
  logic              invalid;

  fifo_mem #(.DATA_W(DATA_W), .AW(AW)) u_mem (
    .wclk(wclk), .wen(wen), .waddr(waddr), .wdata(wdata),
    .rclk(rclk), .ren(ren), .raddr(raddr), .rdata(mem_q)
  );

  fifo_sync #(.W(AW+1)) u_r2w (.clk(wclk), .rst(wrst), .d(rptr), .q(rptr_sync));
  fifo_sync #(.W(AW+1)) u_w2r (.clk(rclk), .rst(rrst), .d(wptr), .q(wptr_sync));

  fifo_wptr #(.AW(AW)) u_wptr (
    .clk(wclk), .rst(wrst), .winc(winc), .rptr_sync(rptr_sync),
    .full(wfull), .wen(wen), .wptr(wptr), .waddr(waddr)
  );

  fifo_rptr #(.AW(AW)) u_rptr (
    .clk(rclk), .rst(rrst), .rinc(rinc), .wptr_sync(wptr_sync),
    .empty(rempty), .ren(ren), .rptr(rptr), .raddr(raddr)
  );

  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst)      invalid <= 1'b1;
    else if (rinc) invalid <= rempty;
  end

  assign rdata = {invalid, mem_q};
endmodule
