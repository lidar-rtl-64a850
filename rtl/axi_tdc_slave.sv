// axi_tdc_slave - AXI4 slave that lets a processor command and read a set of
// TDC channels.
//
// Writes carry commands. Every accepted write beat (WVALID & WREADY) is one
// command in WDATA[7:0]: bits [7:6] the opcode, bits [5:0] a channel number.
//   NOP          (00) clear the control registers
//   READ_CHANNEL (01) pop one word from the FIFO of the addressed channel
//   READ_ALL     (10) pop one word from the FIFO of every channel
//   RST          (11) reset every channel (FIFOs and calibration)
// The resulting read_fifo bits and channel_rst are registered and high for
// exactly one ACLK cycle after the beat; they are cleared in any cycle
// without a write beat. Write bursts are accepted; one B response with OKAY
// follows the last beat. AWADDR and WSTRB are ignored.
//
// Reads return the FIFO output word of a channel: address 4*k selects channel
// k (addresses of channels that do not exist read 0). A read does not pop the
// FIFO; a READ command must come first. INCR bursts read consecutive
// channels, so one burst can fetch every channel. RDATA is valid while RVALID.
//
// Follows the described command set, 8-bit command layout and the read
// addressing. This design's choices: the opcode values, the reduced AXI4
// signal set (no IDs, no locking, caching or QoS signals; only INCR bursts)
// and accepting write data only after the write address.
module axi_tdc_slave #(
  parameter int unsigned NCH    = tdc_pkg::NUMBER_CHANNELS,
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = tdc_pkg::FIFODATA_W
) (
  input  logic                    aclk,
  input  logic                    aresetn,
  // write address
  input  logic [ADDR_W-1:0]       awaddr,
  input  logic [7:0]              awlen,
  input  logic                    awvalid,
  output logic                    awready,
  // write data
  input  logic [31:0]             wdata,
  input  logic [3:0]              wstrb,
  input  logic                    wlast,
  input  logic                    wvalid,
  output logic                    wready,
  // write response
  output logic [1:0]              bresp,
  output logic                    bvalid,
  input  logic                    bready,
  // read address
  input  logic [ADDR_W-1:0]       araddr,
  input  logic [7:0]              arlen,
  input  logic                    arvalid,
  output logic                    arready,
  // read data
  output logic [31:0]             rdata,
  output logic [1:0]              rresp,
  output logic                    rlast,
  output logic                    rvalid,
  input  logic                    rready,
  // channels
  output logic [NCH-1:0]          read_fifo,
  output logic                    channel_rst,
  input  logic [NCH-1:0][DATA_W-1:0] channel_data
);
  localparam int unsigned IDX_W = ADDR_W - 2;

  logic             aw_active, ar_active;
  logic             mem_wren;
  logic [IDX_W-1:0] ridx;
  logic [7:0]       rcount;
  tdc_pkg::cmd_op_e op;
  logic [tdc_pkg::CMD_ADDR_W-1:0] ch;

  // ---------------- write channel ----------------
  assign awready  = ~aw_active & ~bvalid;
  assign wready   = aw_active;
  assign mem_wren = wvalid & wready;
  assign bresp    = 2'b00;
  assign op       = tdc_pkg::cmd_op_e'(wdata[7:6]);
  assign ch       = wdata[5:0];

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      aw_active <= 1'b0;
      bvalid    <= 1'b0;
    end else begin
      if (awvalid && awready) aw_active <= 1'b1;
      if (mem_wren && wlast) begin
        aw_active <= 1'b0;
        bvalid    <= 1'b1;
      end
      if (bvalid && bready) bvalid <= 1'b0;
    end
  end

  // Command decoder.
  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      read_fifo   <= '0;
      channel_rst <= 1'b0;
    end else if (mem_wren) begin
      read_fifo   <= '0;
      channel_rst <= 1'b0;
      unique case (op)
        tdc_pkg::CMD_READ_CHANNEL: if (32'(ch) < NCH) read_fifo <= NCH'(1) << ch;
        tdc_pkg::CMD_READ_ALL:     read_fifo   <= '1;
        tdc_pkg::CMD_RST:          channel_rst <= 1'b1;
        default: ;                 // NOP
      endcase
    end else begin
      read_fifo   <= '0;
      channel_rst <= 1'b0;
    end
  end

  // ---------------- read channel ----------------
  assign arready = ~ar_active;
  assign rvalid  = ar_active;
  assign rlast   = ar_active && (rcount == 8'd0);
  assign rresp   = 2'b00;

  always_comb begin
    rdata = '0;
    if (ar_active && 32'(ridx) < NCH) rdata = 32'(channel_data[ridx]);
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      ar_active <= 1'b0;
      ridx      <= '0;
      rcount    <= '0;
    end else if (!ar_active) begin
      if (arvalid) begin
        ar_active <= 1'b1;
        ridx      <= araddr[ADDR_W-1:2];
        rcount    <= arlen;
      end
    end else if (rready) begin
      if (rcount == 8'd0) ar_active <= 1'b0;
      else begin
        ridx   <= ridx + 1'b1;
        rcount <= rcount - 1'b1;
      end
    end
  end

  // Handshake rules: a valid beat holds until accepted.
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    rvalid && !rready |=> rvalid);
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    bvalid && !bready |=> bvalid);
  a_one_cmd: assert property (@(posedge aclk) disable iff (!aresetn)
    !(channel_rst && |read_fifo));
endmodule
