// lidar_acq_top_tb - end-to-end test of the acquisition system with four
// channels, the full 692-tap delay line, a 4096-hit calibration run and
// 8-word FIFOs. A bus master issues every command and reads single words
// and bursts; the sequence and its checks are described in
// lidar_acq_tb_body.svh.
module lidar_acq_top_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int NCH = 4, N = 692, CH = 4096, AW = 3;

  logic clk0 = 0, clk1 = 0, clk2 = 0, aclk = 0, aresetn;
  logic [NCH-1:0] hit;
  logic [7:0] awaddr, araddr, awlen, arlen;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [NCH-1:0] fifo_full, fifo_empty, value_ready, corrected, cal_valid, table_swap, veto;

  lidar_acq_top #(.NCH(NCH), .NUM_STAGES(N), .CALIBRATION_HITS(CH),
                  .DECIMATED_HITS(CH / 173), .FIFO_AW(AW)) dut (.*);
  axi_master_bfm bfm (.*);

  initial forever begin #1250 clk0 = 1; #1250 clk0 = 0; end
  initial begin #500;  forever begin #1250 clk1 = 1; #1250 clk1 = 0; end end
  initial begin #1000; forever begin #1250 clk2 = 1; #1250 clk2 = 0; end end
  initial begin #333;  forever begin #5000 aclk = 1; #5000 aclk = 0; end end

  `include "lidar_acq_tb_body.svh"

  initial begin
    #20000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
