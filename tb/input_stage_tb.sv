// input_stage_tb - checks edge pulses, their timing and the veto of the
// input stage. Time unit 1 ps, 2.5 ns clock.
module input_stage_tb;
  timeunit 1ps; timeprecision 1ps;
  logic clk0 = 0, rst = 0, hit_in = 0, value_ready = 0;
  logic hit_out, store_start, store_stop, veto;
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0;

  input_stage dut (.*);

  always #1250 clk0 = ~clk0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk0) begin
    if (store_start) n_rise++;
    if (store_stop)  n_fall++;
    check(!(store_start && store_stop), "both pulses");
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10 rst = 1;
    repeat (3) @(posedge clk0);
    #100 rst = 0;
    check(veto == 0, "veto clear after reset");
    // Hit rising 300 ps before an edge.
    @(posedge clk0); #2200 hit_in = 1;
    #1 check(hit_out == 1, "hit passes");
    @(posedge clk0); #1 check(store_start == 1, "start pulse after first edge");
    @(posedge clk0); #1 check(store_start == 0, "start pulse one cycle");
    repeat (3) @(posedge clk0);
    #700 hit_in = 0;
    #1 check(veto == 1, "veto set at end of hit");
    @(posedge clk0); #1 check(store_stop == 1, "stop pulse");
    @(posedge clk0); #1 check(store_stop == 0, "stop pulse one cycle");
    // A second hit is blocked while vetoed.
    #500 hit_in = 1;
    #1 check(hit_out == 0, "blocked hit");
    repeat (3) @(posedge clk0);
    #1 check(store_start == 0, "no start while vetoed");
    hit_in = 0;
    repeat (2) @(posedge clk0);
    // Release the veto.
    #100 value_ready = 1; #1 check(veto == 0, "veto released"); #400 value_ready = 0;
    #300 hit_in = 1;
    repeat (4) @(posedge clk0);
    hit_in = 0;
    repeat (4) @(posedge clk0);
    check(n_rise == 2, "two measured rises");
    check(n_fall == 2, "two measured falls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
