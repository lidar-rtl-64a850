// lidar_acq_top_full_tb - the acquisition system at its default size:
// 16 channels, 692-tap delay lines, 8192-hit calibration runs and
// 1024-word FIFOs, no parameter overrides. Runs the same sequence as
// lidar_acq_top_tb (lidar_acq_tb_body.svh): a complete calibration round on
// every channel, calibrated measurements read back through the bus with
// every command, a FIFO overflow, the veto and the synchronizer correction.
module lidar_acq_top_full_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int NCH = tdc_pkg::NUMBER_CHANNELS;
  localparam int N   = tdc_pkg::NUM_STAGES;
  localparam int CH  = tdc_pkg::CALIBRATION_HITS;
  localparam int AW  = tdc_pkg::FIFO_AW;

  logic clk0 = 0, clk1 = 0, clk2 = 0, aclk = 0, aresetn;
  logic [NCH-1:0] hit;
  logic [7:0] awaddr, araddr, awlen, arlen;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [NCH-1:0] fifo_full, fifo_empty, value_ready, corrected, cal_valid, table_swap, veto;

  lidar_acq_top dut (.*);
  axi_master_bfm bfm (.*);

  initial forever begin #1250 clk0 = 1; #1250 clk0 = 0; end
  initial begin #500;  forever begin #1250 clk1 = 1; #1250 clk1 = 0; end end
  initial begin #1000; forever begin #1250 clk2 = 1; #1250 clk2 = 0; end end
  initial begin #333;  forever begin #5000 aclk = 1; #5000 aclk = 0; end end

  `include "lidar_acq_tb_body.svh"

  initial begin
    #60000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
