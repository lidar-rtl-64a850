// merge_sync_tb - random raw positions and counter values (biased towards
// the near-edge cases: position 0, equal or off-by-one counters) are merged;
// the coarse count must match the decider rules as stated in the testbench,
// and end_of_conversion / value_ready must come 3 and 4 cycles after
// store_stop.
module merge_sync_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int BW = 10, CW = 15, KW = 8, TH = 210;
  logic clk0 = 0, rst = 0, store_stop = 0;
  logic [BW-1:0] bin_start, bin_stop;
  logic [KW-1:0] cal_start, cal_stop;
  logic [CW-1:0] c0, c1, c2;
  logic [CW+2*KW-1:0] meas;
  logic value_ready, end_of_conversion, corrected;
  int checks = 0, failures = 0, n_fix = 0;
  int rule_hits [7];

  merge_sync #(.BIN_W(BW), .COARSE_W(CW), .CAL_W(KW), .PHASE_THRESHOLD(TH)) dut (.*);

  always #1250 clk0 = ~clk0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_coarse(int bs, int bp, int a, int b, int c, output int rule);
    rule = 6;
    if (bs == 0 && a <= b) begin
      if (b > c)                 begin rule = 0; return b; end
      if (b == c && bp <= TH)    begin rule = 1; return b; end
      if (b == c)                begin rule = 2; return b + 1; end
    end
    if (bp == 0 && a >= b) begin
      if (b < c)                 begin rule = 3; return b; end
      if (b == c && bs <= TH)    begin rule = 4; return b; end
      if (b == c)                begin rule = 5; return b - 1; end
    end
    return a;
  endfunction

  initial begin
    int base, exp_c, rule;
    #10 rst = 1;
    repeat (2) @(posedge clk0);
    #10 rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk0);
      base = $urandom_range(5, 30000);
      bin_start = ($urandom_range(0, 2) == 0) ? '0 : BW'($urandom_range(1, 660));
      bin_stop  = ($urandom_range(0, 2) == 0) ? '0 : BW'($urandom_range(1, 660));
      c0 = CW'(base + $urandom_range(0, 2) - 1);
      c1 = CW'(base);
      c2 = CW'(base + $urandom_range(0, 2) - 1);
      cal_start = KW'($urandom); cal_stop = KW'($urandom);
      exp_c = ref_coarse(bin_start, bin_stop, c0, c1, c2, rule);
      rule_hits[rule]++;
      store_stop = 1;
      @(negedge clk0) store_stop = 0;
      @(negedge clk0) check(!end_of_conversion && !value_ready, "nothing at cycle 2");
      @(negedge clk0) check(end_of_conversion && !value_ready, "end_of_conversion at cycle 3");
      @(negedge clk0) check(value_ready && !end_of_conversion, "value_ready at cycle 4");
      check(meas == {CW'(exp_c), cal_start, cal_stop},
            $sformatf("merge coarse %0d expected %0d (rule %0d)", meas[CW+2*KW-1:2*KW], exp_c, rule));
      check(corrected == (rule != 6), "corrected flag");
      @(negedge clk0) check(!value_ready, "value_ready one cycle");
    end
    for (int r = 0; r < 7; r++) check(rule_hits[r] > 0, $sformatf("rule %0d exercised", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
