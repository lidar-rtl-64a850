// tdc_tb - end-to-end test of one TDC channel with the full 692-tap delay
// line and a shortened calibration run.
//
// Phase 1 sends Hits whose edges fall at uniformly random phases of the
// reference clock, so that the calibration histogram sees a uniform
// distribution; the coarse count is checked to within one cycle (edges close
// to a clock edge are allowed to go either way). Once the first table is in
// use (table_swap), phase 2 sends Hits whose edges stay 150 ps or more away
// from a clock edge and checks, for each measurement word:
//   * coarse equals the number of reference edges between the two Hit edges;
//   * coarse*2500 + (start - stop)*2500/173 is within 120 ps of the true width;
//   * value_ready comes exactly 4 cycles after store_stop.
// Phase 3 sends Hits that begin 1 ps after or 2 ps before a reference-clock
// edge (raw start position 0 or close to it), checks the coarse count to
// within one cycle and that the synchronizer correction path fires.
// The store strobes are produced here from the reference clock, as the input
// stage would.
module tdc_tb;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;
  localparam int N = 692, CH = 4096, DH = CH / 173;
  localparam int T = 2500;

  logic clk0 = 0, clk1 = 0, clk2 = 0, rst = 0, hit = 0;
  logic store_start, store_stop;
  logic q0, q1;
  meas_t meas;
  logic value_ready, eoc, corrected, cal_valid, table_swap;
  logic [BIN_W-1:0] bin_start, bin_stop;
  int checks = 0, failures = 0;
  int swaps = 0, fixes = 0, words = 0;
  longint cycle = 0, stop_cycle [$];

  typedef struct { int coarse; int width; bit exact; } exp_t;
  exp_t expq [$];

  tdc #(.NUM_STAGES(N), .CALIBRATION_HITS(CH), .DECIMATED_HITS(DH)) dut (
    .clk0, .clk1, .clk2, .rst, .hit, .store_start, .store_stop, .meas,
    .value_ready, .end_of_conversion(eoc), .corrected, .cal_valid,
    .table_swap, .bin_start, .bin_stop
  );

  initial forever begin #1250 clk0 = 1; #1250 clk0 = 0; end
  initial begin #500;  forever begin #1250 clk1 = 1; #1250 clk1 = 0; end end
  initial begin #1000; forever begin #1250 clk2 = 1; #1250 clk2 = 0; end end

  // Edge detection of the Hit on the reference clock.
  always @(posedge clk0) begin q1 <= q0; q0 <= hit; end
  assign store_start = q0 & ~q1;
  assign store_stop  = q1 & ~q0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk0) begin
    cycle++;
    if (!rst) begin
      if (store_stop) stop_cycle.push_back(cycle);
      if (table_swap) swaps++;
      if (value_ready) begin
        exp_t e;
        longint sc;
        words++;
        if (corrected) fixes++;
        if (expq.size() == 0 || stop_cycle.size() == 0) begin
          check(0, "unexpected measurement word");
        end else begin
          e = expq.pop_front();
          sc = stop_cycle.pop_front();
          check(cycle - sc == 4, $sformatf("value_ready %0d cycles after store_stop", cycle - sc));
          if (e.exact) begin
            int w;
            w = int'(meas.coarse) * T + (int'(meas.start) - int'(meas.stop)) * T / 173;
            check(int'(meas.coarse) == e.coarse,
                  $sformatf("coarse %0d expected %0d", meas.coarse, e.coarse));
            check(w - e.width <= 120 && e.width - w <= 120,
                  $sformatf("width %0d ps expected %0d ps (start %0d stop %0d)", w, e.width, meas.start, meas.stop));
          end else begin
            check(int'(meas.coarse) >= e.coarse - 1 && int'(meas.coarse) <= e.coarse + 1,
                  $sformatf("coarse %0d expected %0d +-1", meas.coarse, e.coarse));
          end
        end
      end
    end
  end

  // One Hit: rising edge `off` ps after a reference edge, width w ps.
  task automatic send_hit(int off, int w, bit exact);
    exp_t e;
    e.coarse = (off + w) / T;
    e.width  = w;
    e.exact  = exact;
    @(posedge clk0);
    #(off) hit = 1;
    expq.push_back(e);
    #(w) hit = 0;
    repeat (12) @(posedge clk0);
  endtask

  initial begin
    int off, w, ph;
    #10 rst = 1;
    repeat (4) @(posedge clk0);
    @(negedge clk0) rst = 0;
    repeat (2 * N + 10) @(posedge clk0);   // clear of the calibration RAM
    // Phase 1: calibration, uniform phases.
    while (swaps == 0) begin
      off = $urandom_range(T - 1, 0);
      w   = $urandom_range(40 * T, 3 * T);
      send_hit(off, w, 0);
    end
    check(cal_valid, "calibration valid after the first table swap");
    // Phase 2: measurement with a calibrated table.
    for (int i = 0; i < 300; i++) begin
      off = $urandom_range(T - 150, 150);
      do begin
        w  = $urandom_range(40 * T, 3 * T);
        ph = (off + w) % T;
      end while (ph < 150 || ph > T - 150);
      send_hit(off, w, 1);
    end
    // Phase 3: Hits that start right at a reference edge.
    for (int i = 0; i < 40; i++) begin
      w = $urandom_range(20 * T, 3 * T);
      w = w - (w % T) + T / 2;
      send_hit((i % 2) ? 1 : T - 2, w, 0);
    end
    repeat (20) @(posedge clk0);
    check(expq.size() == 0, "every Hit produced a word");
    check(fixes > 0, "synchronizer correction happened");
    $display("words=%0d swaps=%0d corrections=%0d", words, swaps, fixes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000000;
    failures++;
    $display("watchdog: swaps=%0d words=%0d", swaps, words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
