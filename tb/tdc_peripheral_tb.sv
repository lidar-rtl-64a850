// tdc_peripheral_tb - one acquisition channel with the full delay line, a
// shortened calibration run and an 8-word FIFO, read on a 100 MHz reader
// clock the way the bus slave reads it (one-cycle read_fifo pulse, word one
// reader-clock edge later).
//
//   1. Calibration: Hits at uniformly random phases, each read back; the
//      invalid bit is 0 and the coarse count is checked to within two
//      cycles: an edge that coincides with a clock edge may be sampled either
//      way, and the synchronizer decider then applies its one-cycle
//      correction on top of that.
//   2. Measurement: Hits kept 150 ps or more from a clock edge; each word's
//      coarse count is checked exactly and its width to within 120 ps.
//   3. Veto: a second Hit that arrives before the first has been written is
//      blocked (veto seen high, no word written for it).
//   4. Overflow: 11 Hits without reading; fifo_full is seen, the first 8 words
//      read back in order, the next reads return the invalid bit.
//   5. Empty read: a read of the empty FIFO sets the invalid bit.
module tdc_peripheral_tb;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;
  localparam int N = 692, CH = 4096, DH = CH / 173, AW = 3;
  localparam int T = 2500, TR = 10000;

  logic clk0 = 0, clk1 = 0, clk2 = 0, rclk = 0, rst = 0, hit = 0;
  logic read_fifo = 0;
  logic [FIFODATA_W-1:0] fifo_data;
  logic fifo_full, fifo_empty, value_ready, corrected, cal_valid, table_swap, veto;
  meas_t w_meas;
  int checks = 0, failures = 0, swaps = 0, words = 0, full_seen = 0;

  tdc_peripheral #(.NUM_STAGES(N), .CALIBRATION_HITS(CH), .DECIMATED_HITS(DH),
                   .FIFO_AW(AW)) dut (.*);

  initial forever begin #1250 clk0 = 1; #1250 clk0 = 0; end
  initial begin #500;  forever begin #1250 clk1 = 1; #1250 clk1 = 0; end end
  initial begin #1000; forever begin #1250 clk2 = 1; #1250 clk2 = 0; end end
  initial begin #333;  forever begin #5000 rclk = 1; #5000 rclk = 0; end end

  always @(posedge clk0) if (!rst) begin
    if (table_swap) swaps++;
    if (value_ready) words++;
    if (fifo_full) full_seen++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_hit(int off, int w);
    @(posedge clk0);
    #(off) hit = 1;
    #(w) hit = 0;
    repeat (12) @(posedge clk0);
  endtask

  task automatic read_word(output logic [FIFODATA_W-1:0] d);
    @(negedge rclk) read_fifo = 1;
    @(negedge rclk) read_fifo = 0;
    d = fifo_data;
  endtask

  // Read one word and compare it with a Hit of width w starting off ps after
  // a reference edge; exact selects the tight comparison.
  task automatic read_and_check(int off, int w, bit exact);
    logic [FIFODATA_W-1:0] d;
    int coarse, width;
    repeat (6) @(posedge rclk);
    read_word(d);
    w_meas = meas_t'(d[MEAS_W-1:0]);
    coarse = (off + w) / T;
    check(d[MEAS_W] == 1'b0, "word valid");
    if (exact) begin
      width = int'(w_meas.coarse) * T + (int'(w_meas.start) - int'(w_meas.stop)) * T / 173;
      check(int'(w_meas.coarse) == coarse, $sformatf("coarse %0d expected %0d", w_meas.coarse, coarse));
      check(width - w <= 120 && w - width <= 120, $sformatf("width %0d expected %0d", width, w));
    end else begin
      check(int'(w_meas.coarse) >= coarse - 2 && int'(w_meas.coarse) <= coarse + 2,
            $sformatf("coarse %0d expected %0d +-2 (off %0d w %0d)", w_meas.coarse, coarse, off, w));
    end
  endtask

  function automatic int pick_width(int off);
    int w, ph;
    do begin
      w  = $urandom_range(30 * T, 3 * T);
      ph = (off + w) % T;
    end while (ph < 150 || ph > T - 150);
    return w;
  endfunction

  initial begin
    int off, w, n0, vseen;
    logic [FIFODATA_W-1:0] d;
    int exp_coarse [$];
    // Two reset pulses: the synchronized reset may already be high at time
    // zero, and the edge-triggered veto flip-flop needs a rising edge.
    repeat (2) begin
      #10 rst = 1;
      repeat (4) @(posedge rclk);
      rst = 0;
      repeat (4) @(posedge rclk);
    end
    repeat (2 * N + 20) @(posedge clk0);
    // 1. calibration
    while (swaps == 0) begin
      off = $urandom_range(T - 1, 0);
      w   = $urandom_range(30 * T, 3 * T);
      send_hit(off, w);
      read_and_check(off, w, 0);
    end
    check(cal_valid, "calibration valid");
    // 2. measurement
    for (int i = 0; i < 100; i++) begin
      off = $urandom_range(T - 150, 150);
      w   = pick_width(off);
      send_hit(off, w);
      read_and_check(off, w, 1);
    end
    // 3. veto: second Hit 1.2 cycles after the first ends, 1.5 cycles wide
    for (int i = 0; i < 10; i++) begin
      n0 = words;
      vseen = 0;
      off = $urandom_range(T - 150, 150);
      w   = pick_width(off);
      @(posedge clk0);
      #(off) hit = 1;
      #(w) hit = 0;
      #(3000) hit = 1;
      vseen = veto;
      #(3750) hit = 0;
      repeat (12) @(posedge clk0);
      check(vseen == 1, "veto high during the second Hit");
      check(words == n0 + 1, "second Hit blocked");
      read_and_check(off, w, 1);
    end
    // 4. overflow
    full_seen = 0;
    for (int i = 0; i < (1 << AW) + 3; i++) begin
      off = $urandom_range(T - 150, 150);
      w   = pick_width(off);
      exp_coarse.push_back((off + w) / T);
      send_hit(off, w);
    end
    check(full_seen > 0, "FIFO full seen");
    repeat (6) @(posedge rclk);
    for (int i = 0; i < (1 << AW) + 3; i++) begin
      read_word(d);
      w_meas = meas_t'(d[MEAS_W-1:0]);
      if (i < (1 << AW)) begin
        check(d[MEAS_W] == 0 && int'(w_meas.coarse) == exp_coarse[i],
              $sformatf("overflow word %0d: coarse %0d expected %0d", i, w_meas.coarse, exp_coarse[i]));
      end else begin
        check(d[MEAS_W] == 1, "read past the stored words is invalid");
      end
    end
    // 5. empty read
    repeat (4) @(posedge rclk);
    check(fifo_empty, "FIFO empty");
    read_word(d);
    check(d[MEAS_W] == 1, "empty read marked invalid");
    $display("words=%0d swaps=%0d", words, swaps);
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
