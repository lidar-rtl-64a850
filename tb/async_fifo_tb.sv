// async_fifo_tb - dual-clock FIFO with a 2.5 ns write clock and a 7 ns read
// clock (AW = 4, 16 words). Checks order against a queue, the full flag and
// dropped writes, the invalid bit on reads of an empty FIFO, and that a
// pop shows its word one read-clock edge later.
module async_fifo_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int DW = 31, AW = 4;
  logic wclk = 0, rclk = 0, wrst = 0, rrst = 0, winc = 0, rinc = 0;
  logic [DW-1:0] wdata = '0;
  logic [DW:0] rdata;
  logic wfull, rempty;
  logic [DW-1:0] q [$];
  int checks = 0, failures = 0, drops = 0, empties = 0, reads = 0;

  async_fifo #(.DATA_W(DW), .AW(AW)) dut (.*);

  always #1250 wclk = ~wclk;
  always #3500 rclk = ~rclk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // writer: bursts that overfill the FIFO
  initial begin
    #10 wrst = 1; rrst = 1;
    #20000 wrst = 0; rrst = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge wclk);
      winc = ($urandom_range(0, 3) != 0);
      wdata = DW'($urandom);
      if (winc) begin
        if (!wfull) q.push_back(wdata);
        else drops++;
      end
    end
    @(negedge wclk) winc = 0;
  end

  // reader: pops slower than the writer, then drains and over-reads
  initial begin
    logic [DW-1:0] exp_w;
    bit was_empty;
    #40000;
    for (int t = 0; t < 300; t++) begin
      @(negedge rclk);
      rinc = ($urandom_range(0, 1) == 1);
      was_empty = rempty;
      @(negedge rclk);
      if (rinc) begin
        reads++;
        if (was_empty) begin
          empties++;
          check(rdata[DW] == 1'b1, "empty read marked invalid");
        end else begin
          exp_w = q.pop_front();
          check(rdata == {1'b0, exp_w}, $sformatf("data %h expected %h", rdata[DW-1:0], exp_w));
        end
      end
      rinc = 0;
    end
    check(drops > 0, "writes to a full FIFO dropped");
    check(empties > 0, "reads of an empty FIFO seen");
    check(q.size() == 0, "all written words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
