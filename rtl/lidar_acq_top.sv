// lidar_acq_top - the LiDAR acquisition system: NCH TDC channels behind one
// AXI4 slave.
//
// Each bit of hit is the time-of-flight pulse of one receiver; every channel
// measures its width with a delay-line TDC, calibrates it on line and queues
// the result in its own FIFO. A processor on the AXI bus issues READ_CHANNEL,
// READ_ALL, RST and NOP commands by writing command bytes, and reads the
// FIFO output of channel k at address 4*k (bursts read several channels).
//
// Clocks: clk0 is the 400 MHz reference clock, clk1 and clk2 are the same
// clock shifted by 72 and 144 degrees (in the device all three come from one
// clock manager, which is outside this RTL), aclk is the bus clock. The
// channels are reset by the RST command and by aresetn.
//
// Follows the described system: 16 channels, one AXI slave, per-channel
// reset and read strobes. The status outputs are this design's additions.
module lidar_acq_top #(
  parameter int unsigned NCH              = tdc_pkg::NUMBER_CHANNELS,
  parameter int unsigned NUM_STAGES       = tdc_pkg::NUM_STAGES,
  parameter int unsigned CALIBRATION_HITS = tdc_pkg::CALIBRATION_HITS,
  parameter int unsigned DECIMATED_HITS   = tdc_pkg::DECIMATED_HITS,
  parameter int unsigned FIFO_AW          = tdc_pkg::FIFO_AW,
  parameter int unsigned ADDR_W           = 8
) (
  input  logic              clk0,
  input  logic              clk1,
  input  logic              clk2,
  input  logic [NCH-1:0]    hit,
  // AXI4 slave
  input  logic              aclk,
  input  logic              aresetn,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [7:0]        awlen,
  input  logic              awvalid,
  output logic              awready,
  input  logic [31:0]       wdata,
  input  logic [3:0]        wstrb,
  input  logic              wlast,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic              arvalid,
  output logic              arready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  output logic              rvalid,
  input  logic              rready,
  // status
  output logic [NCH-1:0]    fifo_full,
  output logic [NCH-1:0]    fifo_empty,
  output logic [NCH-1:0]    value_ready,
  output logic [NCH-1:0]    corrected,
  output logic [NCH-1:0]    cal_valid,
  output logic [NCH-1:0]    table_swap,
  output logic [NCH-1:0]    veto
);
  logic [NCH-1:0]                            read_fifo;
  logic                                      channel_rst, ch_rst;
  logic [NCH-1:0][tdc_pkg::FIFODATA_W-1:0]   channel_data;

  assign ch_rst = channel_rst | ~aresetn;

  axi_tdc_slave #(.NCH(NCH), .ADDR_W(ADDR_W)) u_axi (
    .aclk, .aresetn,
    .awaddr, .awlen, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bresp, .bvalid, .bready,
    .araddr, .arlen, .arvalid, .arready,
    .rdata, .rresp, .rlast, .rvalid, .rready,
    .read_fifo, .channel_rst, .channel_data
  );

  for (genvar k = 0; k < NCH; k++) begin : g_ch
    tdc_peripheral #(
      .NUM_STAGES(NUM_STAGES), .CALIBRATION_HITS(CALIBRATION_HITS),
      .DECIMATED_HITS(DECIMATED_HITS), .FIFO_AW(FIFO_AW), .SEED(k)
    ) u_ch (
      .clk0        (clk0),
      .clk1        (clk1),
      .clk2        (clk2),
      .rclk        (aclk),
      .rst         (ch_rst),
      .hit         (hit[k]),
      .read_fifo   (read_fifo[k]),
      .fifo_data   (channel_data[k]),
      .fifo_full   (fifo_full[k]),
      .fifo_empty  (fifo_empty[k]),
      .value_ready (value_ready[k]),
      .corrected   (corrected[k]),
      .cal_valid   (cal_valid[k]),
      .table_swap  (table_swap[k]),
      .veto        (veto[k])
    );
  end
endmodule
