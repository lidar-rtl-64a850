// calibration_module_tb - runs the calibration module through three
// RST/ACQUISITION/CONVERSION/CONSULTATION rounds with hits drawn from a
// non-uniform tap-width profile (a wide tap, zero-width taps). The testbench
// keeps its own histogram of the hits the module accepted, builds the expected
// decimation table from it and checks every calibrated lookup, including the
// two-cycle lookup latency, and that nothing is calibrated before the first
// table exists.
module calibration_module_tb;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;
  localparam int N   = 60;
  localparam int CH  = 600;
  localparam int DH  = CH / 15;   // 15 ideal bins
  localparam int BW  = $clog2(N + 1);

  logic clk = 0, rst = 0, new_hit = 0;
  logic [BW-1:0] hit_bin = '0;
  logic [CAL_W-1:0] cal_value;
  logic cal_valid, table_swap;
  cal_state_e state;
  int checks = 0, failures = 0;
  int hist [N+1];
  int table_ref [N+1];
  int table_next [N+1];
  int swaps = 0, lookups = 0, round_hits = 0;
  bit have_table = 0;

  calibration_module #(.NUM_STAGES(N), .CALIBRATION_HITS(CH), .DECIMATED_HITS(DH))
    dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Tap width profile: weights per raw position.
  function automatic int weight(int b, int round);
    if (b == 0 || b > 50) return 0;
    if (b % 7 == 3) return 0;                 // zero-width taps
    if (b == 20 + round) return 12;           // one ultra-wide tap
    return 2 + (b % 3);
  endfunction

  function automatic int draw(int round);
    int tot = 0, r;
    for (int b = 0; b <= N; b++) tot += weight(b, round);
    r = $urandom_range(0, tot - 1);
    for (int b = 0; b <= N; b++) begin
      if (r < weight(b, round)) return b;
      r -= weight(b, round);
    end
    return 1;
  endfunction

  // Expected table: decimation of the histogram into ideal bins.
  task automatic build_table();
    int sum = 0, tap = 0;
    for (int i = 0; i <= N; i++) begin
      sum += hist[i];
      if (sum > DH) begin tap++; sum -= DH; end
      table_next[i] = tap;
    end
  endtask

  // Follow the state machine: clear the histogram when acquisition starts,
  // build the reference when conversion starts, adopt it on the swap.
  cal_state_e st_q = CAL_RST;
  always @(posedge clk) begin
    st_q <= rst ? CAL_RST : state;
    if (!rst && state == CAL_ACQUISITION && st_q != CAL_ACQUISITION) begin
      foreach (hist[i]) hist[i] = 0;
      round_hits = 0;
    end
    if (!rst && state == CAL_CONVERSION && st_q != CAL_CONVERSION) begin
      check(round_hits == CH, $sformatf("hits counted %0d", round_hits));
      build_table();
    end
    if (table_swap && !rst && st_q == CAL_CONSULTATION) begin
      swaps++;
      table_ref = table_next;
      have_table = 1;
    end
  end

  initial begin
    int b, gap;
    bit vh, th;
    #2 rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int h = 0; h < 5000 && swaps < 3; h++) begin
      b = draw(swaps);
      @(negedge clk);
      new_hit = 1; hit_bin = BW'(b);
      vh = cal_valid; th = have_table;
      if (state == CAL_ACQUISITION) begin hist[b]++; round_hits++; end
      @(negedge clk);
      new_hit = 0;
      @(negedge clk);                         // lookup result after 2 cycles
      if (vh) begin
        check(int'(cal_value) == table_ref[b],
              $sformatf("lookup bin %0d got %0d expected %0d", b, cal_value, table_ref[b]));
        lookups++;
      end else begin
        check(cal_value == 0 && !th, $sformatf("no calibration before first table v=%0d ht=%0d cv=%0d", cal_value, have_table, cal_valid));
      end
      gap = $urandom_range(1, 3);
      repeat (gap) @(negedge clk);
    end
    check(swaps == 3, $sformatf("three tables built (%0d)", swaps));
    check(lookups > 100, "calibrated lookups made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
