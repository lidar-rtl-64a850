// code_density_tb - the characterisation workload run on one channel at its
// default size (692 taps, 8192-hit calibration, 1024-word FIFO): a 151.5 ns
// wide Hit repeated at about 3.3 MHz by a generator that is not locked to the
// reference clock, so the Hit edges sweep all phases of the clock.
//
// The channel first calibrates itself on these Hits (the FIFO fills up
// meanwhile and is then drained). After its first table is in use, 10000 more
// Hits are measured while a reader pops every word as soon as the FIFO is
// not empty (one-cycle read_fifo pulse on a 100 MHz reader clock). The test checks:
//   * every Hit produced exactly one valid word (no drop at this rate);
//   * coarse is 60 or 61 cycles (151.5 ns / 2.5 ns = 60.6), except for
//     whole-cycle errors (width off by more than half a cycle), which the
//     synchronizer decider can introduce when an edge falls right at a clock
//     edge; these must stay at or below 1 percent of the Hits;
//   * apart from those, the mean measured width is within 30 ps of 151.5 ns
//     and the RMS error (the precision) is below 50 ps;
//   * the calibrated start positions use between 165 and 181 distinct bins,
//     i.e. an average bin width of 2500 ps / bins, about 14.5 ps;
//   * a measurement word is ready 4 reference cycles after the Hit's end is
//     seen (value_ready vs store_stop inside the channel);
//   * the code-density DNL of the calibrated start line stays below 1 LSB
//     (no missing bin) and its INL below 3 LSB, over bins 1..171.
module code_density_tb;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;
  localparam int T = 2500;
  localparam int WIDTH_PS = 151500;
  localparam int PERIOD_PS = 303030;
  localparam int MEASURED = 10000;

  logic clk0 = 0, clk1 = 0, clk2 = 0, rclk = 0, rst = 0, hit = 0;
  logic read_fifo = 0;
  logic [FIFODATA_W-1:0] fifo_data;
  logic fifo_full, fifo_empty, value_ready, corrected, cal_valid, table_swap, veto;
  int checks = 0, failures = 0, swaps = 0, words = 0, bad_latency = 0;
  longint cycle = 0, stop_cycle = 0;

  tdc_peripheral dut (.*);

  initial forever begin #1250 clk0 = 1; #1250 clk0 = 0; end
  initial begin #500;  forever begin #1250 clk1 = 1; #1250 clk1 = 0; end end
  initial begin #1000; forever begin #1250 clk2 = 1; #1250 clk2 = 0; end end
  initial begin #333;  forever begin #5000 rclk = 1; #5000 rclk = 0; end end

  always @(posedge clk0) begin
    cycle++;
    if (!rst) begin
      if (dut.store_stop) stop_cycle = cycle;
      if (table_swap) swaps++;
      if (value_ready) begin
        words++;
        if (cycle - stop_cycle != 4) bad_latency++;
      end
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One Hit, then the rest of the generator period with some jitter.
  task automatic one_hit();
    hit = 1;
    #(WIDTH_PS) hit = 0;
    #(PERIOD_PS - WIDTH_PS + $urandom_range(1249, 0));
  endtask

  task automatic read_word(output logic [FIFODATA_W-1:0] d);
    @(negedge rclk) read_fifo = 1;
    @(negedge rclk) read_fifo = 0;
    d = fifo_data;
  endtask

  initial begin
    logic [FIFODATA_W-1:0] d;
    meas_t m;
    int w0, n_valid, n_coarse_ok, n_coarse_err, nbins;
    real err, sum_err, sum_sq, mean, rms;
    bit used [256];
    int hist [256];
    real dnl, inl, max_dnl, max_inl, per_bin;
    repeat (2) begin
      #10 rst = 1;
      repeat (4) @(posedge rclk);
      rst = 0;
      repeat (4) @(posedge rclk);
    end
    repeat (2 * NUM_STAGES + 20) @(posedge clk0);
    #($urandom_range(T - 1, 0));
    // calibration: Hits until the first table is in use; the generator runs
    // on its own, independent of the reader clock
    while (swaps == 0) one_hit();
    check(cal_valid, "calibration table in use");
    repeat (6) @(posedge rclk);
    while (!fifo_empty) read_word(d);
    w0 = words;
    n_valid = 0; n_coarse_ok = 0; n_coarse_err = 0; sum_err = 0; sum_sq = 0;
    foreach (used[i]) begin used[i] = 0; hist[i] = 0; end
    fork
      for (int i = 0; i < MEASURED; i++) one_hit();
    join_none
    for (int i = 0; i < MEASURED; i++) begin
      do @(posedge rclk); while (fifo_empty);
      read_word(d);
      if (!d[MEAS_W]) begin
        n_valid++;
        m = meas_t'(d[MEAS_W-1:0]);
        if (m.coarse == 60 || m.coarse == 61) n_coarse_ok++;
        err = real'(int'(m.coarse) * T) + real'(int'(m.start) - int'(m.stop)) * T / 173.0 - WIDTH_PS;
        if (err > 1250.0 || err < -1250.0) begin
          n_coarse_err++;
        end else begin
          sum_err += err;
          sum_sq += err * err;
        end
        used[m.start] = 1;
        hist[m.start]++;
      end
    end
    mean = sum_err / (n_valid - n_coarse_err);
    rms = $sqrt(sum_sq / (n_valid - n_coarse_err));
    nbins = 0;
    foreach (used[i]) if (used[i]) nbins++;
    // code-density DNL and INL of the calibrated start line, in ideal bins,
    // over the bins that lie fully inside one clock period
    per_bin = real'(MEASURED) * 2500.0 / 173.0 / 2500.0;
    max_dnl = 0; max_inl = 0; inl = 0;
    for (int b = 1; b < 172; b++) begin
      dnl = real'(hist[b]) / per_bin - 1.0;
      inl += dnl;
      if (dnl > max_dnl || -dnl > max_dnl) max_dnl = (dnl < 0) ? -dnl : dnl;
      if (inl > max_inl || -inl > max_inl) max_inl = (inl < 0) ? -inl : inl;
    end
    $display("calibrated start line: max |DNL| %0.2f LSB, max |INL| %0.2f LSB", max_dnl, max_inl);
    $display("measured %0d: %0d coarse errors; otherwise mean error %0.1f ps, rms %0.1f ps; start bins used %0d (average bin %0.2f ps)",
             n_valid, n_coarse_err, mean, rms, nbins, 2500.0 / nbins);
    check(words - w0 == MEASURED, "one word per Hit");
    check(n_valid == MEASURED, "every read word valid");
    check(n_coarse_ok + n_coarse_err == MEASURED, "coarse count 60 or 61 unless a whole-cycle error");
    check(n_coarse_err * 100 <= MEASURED, "whole-cycle errors in at most 1 percent of the Hits");
    check(mean < 30.0 && mean > -30.0, "mean width within 30 ps");
    check(rms < 50.0, "precision (rms error) below 50 ps");
    check(nbins >= 165 && nbins <= 181, "number of calibrated bins");
    check(bad_latency == 0, "value_ready 4 cycles after store_stop");
    check(max_dnl < 1.0, "no missing or double-width calibrated bin (|DNL| < 1 LSB)");
    check(max_inl < 3.0, "|INL| below 3 LSB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000000;
    failures++;
    $display("watchdog: swaps=%0d words=%0d", swaps, words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
