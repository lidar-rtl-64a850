// axi_tdc_slave_tb - drives the AXI slave with every command (single writes
// and a write burst) and with single and burst reads; checks the read_fifo
// and channel_rst strobes (value and one-cycle length), the routing of
// channel words to addresses 4*k, zero for absent channels, RLAST and the
// response codes.
module axi_tdc_slave_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int NCH = 16, AW = 8;
  logic aclk = 0, aresetn = 0;
  logic [AW-1:0] awaddr, araddr;
  logic [7:0] awlen, arlen;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic [NCH-1:0] read_fifo;
  logic channel_rst;
  logic [NCH-1:0][31:0] channel_data;
  int checks = 0, failures = 0;
  int rf_cycles [NCH];
  int rst_cycles = 0;
  logic [NCH-1:0] rf_seen;

  axi_tdc_slave #(.NCH(NCH), .ADDR_W(AW)) dut (.*);
  axi_master_bfm #(.ADDR_W(AW)) bfm (.*);

  always #2000 aclk = ~aclk;

  always @(posedge aclk) begin
    for (int k = 0; k < NCH; k++) if (read_fifo[k]) begin rf_cycles[k]++; rf_seen[k] = 1; end
    if (channel_rst) rst_cycles++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clear_counts();
    foreach (rf_cycles[k]) rf_cycles[k] = 0;
    rst_cycles = 0; rf_seen = '0;
  endtask

  initial begin
    logic [31:0] data [$];
    logic [7:0] burst [$];
    for (int k = 0; k < NCH; k++) channel_data[k] = 32'hA000_0000 + 32'(k * 3 + 1);
    repeat (3) @(posedge aclk);
    aresetn = 1;
    // READ_CHANNEL for each channel
    for (int k = 0; k < NCH; k++) begin
      clear_counts();
      bfm.write_cmd({2'b01, 6'(k)});
      repeat (2) @(posedge aclk);
      check(rf_seen == (NCH'(1) << k), $sformatf("READ_CHANNEL %0d strobe", k));
      check(rf_cycles[k] == 1, "strobe lasts one cycle");
    end
    // READ_ALL
    clear_counts();
    bfm.write_cmd(8'b10_000000);
    repeat (2) @(posedge aclk);
    check(rf_seen == '1, "READ_ALL strobes every channel");
    // RST and NOP
    clear_counts();
    bfm.write_cmd(8'b11_000000);
    repeat (2) @(posedge aclk);
    check(rst_cycles == 1 && rf_seen == '0, "RST strobe");
    clear_counts();
    bfm.write_cmd(8'b00_000101);
    repeat (2) @(posedge aclk);
    check(rst_cycles == 0 && rf_seen == '0, "NOP does nothing");
    // absent channel
    clear_counts();
    bfm.write_cmd({2'b01, 6'd40});
    repeat (2) @(posedge aclk);
    check(rf_seen == '0, "READ_CHANNEL of an absent channel");
    // a burst of three commands
    clear_counts();
    burst = '{8'h43, 8'h45, 8'h43};
    bfm.write_cmds(burst);
    repeat (2) @(posedge aclk);
    check(rf_cycles[3] == 2 && rf_cycles[5] == 1, "command burst");
    // single reads
    for (int k = 0; k < NCH + 2; k++) begin
      bfm.read_burst(AW'(4 * k), 1, data);
      check(data[0] == ((k < NCH) ? channel_data[k] : 32'h0), $sformatf("read channel %0d", k));
    end
    // one burst over all channels
    bfm.read_burst(8'h0, NCH, data);
    for (int k = 0; k < NCH; k++) check(data[k] == channel_data[k], $sformatf("burst word %0d", k));
    check(bfm.bresp_errors == 0 && bfm.rresp_errors == 0, "OKAY responses");
    check(bfm.rlast_errors == 0, "RLAST on the last beat only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
