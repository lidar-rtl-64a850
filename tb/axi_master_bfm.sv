// axi_master_bfm - simple AXI4 master used by the testbenches: single and
// burst command writes (one command byte per beat) and INCR burst reads.
// Drives on the falling clock edge, samples on the rising edge.
module axi_master_bfm #(
  parameter int ADDR_W = 8
) (
  input  logic              aclk,
  output logic [ADDR_W-1:0] awaddr,
  output logic [7:0]        awlen,
  output logic              awvalid,
  input  logic              awready,
  output logic [31:0]       wdata,
  output logic [3:0]        wstrb,
  output logic              wlast,
  output logic              wvalid,
  input  logic              wready,
  input  logic [1:0]        bresp,
  input  logic              bvalid,
  output logic              bready,
  output logic [ADDR_W-1:0] araddr,
  output logic [7:0]        arlen,
  output logic              arvalid,
  input  logic              arready,
  input  logic [31:0]       rdata,
  input  logic [1:0]        rresp,
  input  logic              rlast,
  input  logic              rvalid,
  output logic              rready
);
  timeunit 1ps; timeprecision 1ps;
  int bresp_errors = 0, rresp_errors = 0, rlast_errors = 0;

  initial begin
    awaddr = '0; awlen = '0; awvalid = 0; wdata = '0; wstrb = '1; wlast = 0;
    wvalid = 0; bready = 0; araddr = '0; arlen = '0; arvalid = 0; rready = 0;
  end

  // Write n command bytes as one burst.
  task automatic write_cmds(input logic [7:0] cmds [$]);
    @(negedge aclk);
    awaddr = '0; awlen = 8'(cmds.size() - 1); awvalid = 1;
    do @(posedge aclk); while (!awready);
    @(negedge aclk) awvalid = 0;
    for (int i = 0; i < cmds.size(); i++) begin
      wdata = 32'(cmds[i]); wvalid = 1; wlast = (i == cmds.size() - 1);
      do @(posedge aclk); while (!wready);
      @(negedge aclk);
    end
    wvalid = 0; wlast = 0; bready = 1;
    do @(posedge aclk); while (!bvalid);
    if (bresp != 2'b00) bresp_errors++;
    @(negedge aclk) bready = 0;
  endtask

  task automatic write_cmd(input logic [7:0] cmd);
    logic [7:0] q [$];
    q.push_back(cmd);
    write_cmds(q);
  endtask

  // Read n words starting at addr.
  task automatic read_burst(input logic [ADDR_W-1:0] addr, input int n,
                            output logic [31:0] data [$]);
    data.delete();
    @(negedge aclk);
    araddr = addr; arlen = 8'(n - 1); arvalid = 1;
    do @(posedge aclk); while (!arready);
    @(negedge aclk) arvalid = 0; rready = 1;
    for (int i = 0; i < n; i++) begin
      do @(posedge aclk); while (!rvalid);
      data.push_back(rdata);
      if (rresp != 2'b00) rresp_errors++;
      if (rlast != (i == n - 1)) rlast_errors++;
    end
    @(negedge aclk) rready = 0;
  endtask
endmodule
