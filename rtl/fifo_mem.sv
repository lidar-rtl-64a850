// fifo_mem - storage array of the measurement FIFO.
//
// One write port on the write clock (written when wen is high) and one
// synchronous read port on the read clock (rdata shows word raddr one read
// clock edge after ren). Written as an array so synthesis infers block RAM.
// The description uses an asynchronous read; the registered read port is this
// design's choice so that the memory maps onto block RAM directly.
module fifo_mem #(
  parameter int unsigned DATA_W = tdc_pkg::MEAS_W,
  parameter int unsigned AW     = tdc_pkg::FIFO_AW
) (
  input  logic              wclk,
  input  logic              wen,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              rclk,
  input  logic              ren,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**AW];

  always_ff @(posedge wclk) if (wen) mem[waddr] <= wdata;
  always_ff @(posedge rclk) if (ren) rdata <= mem[raddr];
endmodule
