// tdl_tb - drives Hits at known offsets before a clock edge through the delay
// line, sample stage and store stage, and checks the stored start and stop
// thermometer codes against the number of taps the edge must have passed
// (computed from the documented tap delays).
module tdl_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 692;
  logic clk0 = 0, rst = 0, hit = 0, store_start = 0, store_stop = 0;
  logic [N-1:0] therm_start, therm_stop;
  int checks = 0, failures = 0;

  tdl #(.NUM_STAGES(N), .SEED(0)) dut (.*);

  always #1250 clk0 = ~clk0;

  function automatic int exp_delay(int k);
    int pat [8] = '{2, 5, 3, 6, 0, 4, 8, 2};
    int d = pat[k % 8];
    if (k % 8 == 0 && (k / 8) % 5 == 0) d += 2;
    return d;
  endfunction

  // Taps reached within t ps of the edge (strictly before the sample).
  function automatic int taps_reached(int t);
    int cum = 0, n = 0;
    for (int k = 0; k < N; k++) begin
      cum += exp_delay(k);
      if (cum < t) n = k + 1; else break;
    end
    return n;
  endfunction

  // An offset equal to a tap's arrival time would race with the clock edge.
  function automatic bit ambiguous(int t);
    int cum = 0;
    for (int k = 0; k < N; k++) begin
      cum += exp_delay(k);
      if (cum == t) return 1;
    end
    return 0;
  endfunction

  function automatic int count_ones(logic [N-1:0] v);
    int c = 0;
    for (int k = 0; k < N; k++) c += int'(v[k]);
    return c;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int off_r, off_f, exp_r, exp_f;
    #10 rst = 1;
    repeat (2) @(posedge clk0);
    #100 rst = 0;
    for (int i = 0; i < 40; i++) begin
      do off_r = 1 + $urandom_range(0, 2480); while (ambiguous(off_r));
      do off_f = 1 + $urandom_range(0, 2480); while (ambiguous(off_f));
      exp_r = taps_reached(off_r);
      exp_f = taps_reached(off_f);
      // rise off_r ps before an edge
      @(posedge clk0); #(2500 - off_r) hit = 1;
      @(posedge clk0);                         // sample stage captures
      #10 store_start = 1; @(posedge clk0); #10 store_start = 0;
      @(posedge clk0); #(2500 - off_f) hit = 0;
      @(posedge clk0);
      #10 store_stop = 1; @(posedge clk0); #10 store_stop = 0;
      check(count_ones(therm_start) == exp_r,
            $sformatf("start ones %0d expected %0d (offset %0d)", count_ones(therm_start), exp_r, off_r));
      check(therm_start == (N'(1) << exp_r) - 1, "start code is a clean thermometer");
      check(count_ones(~therm_stop) == exp_f,
            $sformatf("stop zeros %0d expected %0d (offset %0d)", count_ones(~therm_stop), exp_f, off_f));
      check(~therm_stop == (N'(1) << exp_f) - 1, "stop code is a clean thermometer");
      repeat (2) @(posedge clk0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
