// coarse_counter_tb - Hits of random length and random phase against the
// clock; the stored count must equal the number of rising clock edges at
// which the Hit was high, counted by the testbench itself.
module coarse_counter_tb;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, clear = 0, hit = 0, store = 0;
  logic [14:0] count_q;
  int checks = 0, failures = 0;
  int edges_high = 0;

  coarse_counter #(.WIDTH(15)) dut (.*);

  always #1250 clk = ~clk;
  always @(posedge clk) if (hit && !clear) edges_high <= edges_high + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int len;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int t = 0; t < 60; t++) begin
      edges_high = 0;
      #($urandom_range(1, 2400));
      hit = 1;
      len = (t == 0) ? 30000 : $urandom_range(3000, 200000);
      #(len);
      hit = 0;
      @(negedge clk) store = 1;
      @(negedge clk) store = 0;
      check(int'(count_q) == edges_high, $sformatf("count %0d expected %0d", count_q, edges_high));
      // the stored value survives clear, the running count does not
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      check(int'(count_q) == edges_high, "stored value kept over clear");
      check(dut.count == 0, "running count cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
