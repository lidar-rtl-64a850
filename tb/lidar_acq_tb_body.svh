// lidar_acq_tb_body.svh - test sequence shared by the end-to-end testbenches
// of lidar_acq_top. The including module declares NCH, N, CH, AW (FIFO
// address width), the clocks, the AXI signals, the status vectors, the `bfm`
// master instance and the `dut`, then includes this file.
//
// Sequence (all channels at once, every channel with its own random edges):
//   calibration rounds  Hits at uniformly random phases until every channel
//                       has brought its first table into use; each round is
//                       read back with READ_ALL and one burst over all
//                       channels, coarse checked to within two cycles
//   measurement rounds  Hits at least 150 ps from a clock edge; coarse exact,
//                       width within 150 ps; alternately READ_ALL + burst
//                       and READ_CHANNEL + single reads per channel
//   veto                channel 0 gets a second Hit before its first is
//                       written: it must be blocked
//   correction          Hits that start 2 ps before a clock edge make the
//                       coarse-count synchronizer correct the count
//   NOP                 after a NOP the output registers still hold the last
//                       words (nothing popped)
//   overflow            depth+3 Hits without reading: fifo_full, the first
//                       depth words come back in order, the rest and a read
//                       of the empty FIFO carry the invalid bit
//   RST                 the RST command empties every FIFO and drops the
//                       calibration tables
// Every mechanism is counted; one that never happened counts a failure.

  localparam int T = 2500;
  localparam int DEPTH = 1 << AW;

  int checks = 0, failures = 0;
  int n_swap [NCH];
  int n_words [NCH];
  int n_full = 0, n_veto_block = 0, n_corrected = 0, n_invalid = 0;
  int n_read_all = 0, n_read_channel = 0, n_rst = 0, n_nop = 0, n_burst = 0;
  int off_q [NCH][$];
  int w_q   [NCH][$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk0) if (aresetn) begin
    for (int k = 0; k < NCH; k++) begin
      if (table_swap[k])  n_swap[k]++;
      if (value_ready[k]) n_words[k]++;
      if (value_ready[k] && corrected[k]) n_corrected++;
      if (fifo_full[k])   n_full++;
    end
  end

  function automatic int pick_width(int off, bit safe);
    int w, ph;
    do begin
      w  = $urandom_range(20 * T, 3 * T);
      ph = (off + w) % T;
    end while (safe && (ph < 150 || ph > T - 150));
    return w;
  endfunction

  // One Hit on every channel, rising `off[k]` ps after a common clock edge.
  int pending = 0;

  task automatic hit_round(int off [NCH], int w [NCH]);
    @(posedge clk0);
    pending = NCH;
    for (int k = 0; k < NCH; k++) begin
      off_q[k].push_back(off[k]);
      w_q[k].push_back(w[k]);
      fork
        automatic int kk = k;
        begin
          #(off[kk]) hit[kk] = 1'b1;
          #(w[kk])   hit[kk] = 1'b0;
          pending--;
        end
      join_none
    end
    wait (pending == 0);
    repeat (12) @(posedge clk0);
    repeat (6) @(posedge aclk);
  endtask

  // Compare one word read for channel k with the oldest Hit sent to it.
  task automatic check_word(int k, logic [31:0] d, int mode);
    tdc_pkg::meas_t m;
    int off, w, coarse, width;
    m = tdc_pkg::meas_t'(d[30:0]);
    off = off_q[k].pop_front();
    w = w_q[k].pop_front();
    coarse = (off + w) / T;
    check(d[31] == 1'b0, $sformatf("channel %0d word valid", k));
    if (mode == 1) begin
      width = int'(m.coarse) * T + (int'(m.start) - int'(m.stop)) * T / 173;
      check(int'(m.coarse) == coarse, $sformatf("ch %0d coarse %0d expected %0d", k, m.coarse, coarse));
      check(width - w <= 150 && w - width <= 150, $sformatf("ch %0d width %0d expected %0d", k, width, w));
    end else if (mode == 0) begin
      check(int'(m.coarse) >= coarse - 2 && int'(m.coarse) <= coarse + 2,
            $sformatf("ch %0d coarse %0d expected %0d +-2", k, m.coarse, coarse));
    end
  endtask

  task automatic read_all_burst(int mode);
    logic [31:0] data [$];
    bfm.write_cmd({tdc_pkg::CMD_READ_ALL, 6'd0});
    n_read_all++;
    repeat (2) @(posedge aclk);
    bfm.read_burst('0, NCH, data);
    if (NCH > 1) n_burst++;
    for (int k = 0; k < NCH; k++) check_word(k, data[k], mode);
  endtask

  task automatic read_each_channel(int mode);
    logic [31:0] data [$];
    for (int k = 0; k < NCH; k++) begin
      bfm.write_cmd({tdc_pkg::CMD_READ_CHANNEL, 6'(k)});
      n_read_channel++;
      repeat (2) @(posedge aclk);
      bfm.read_burst(8'(4 * k), 1, data);
      check_word(k, data[0], mode);
    end
  endtask

  task automatic do_reset();
    aresetn = 1'b0;
    repeat (4) @(posedge aclk);
    aresetn = 1'b1;
    repeat (4) @(posedge aclk);
  endtask

  initial begin
    int off [NCH], w [NCH];
    bit all_swapped;
    logic [31:0] data [$], prev_words [$];
    int n0, vseen;
    hit = '0;
    aresetn = 1'b1;
    // Two resets: the edge-triggered veto flip-flops need a rising reset edge
    // whatever their power-up state.
    #10 do_reset();
    do_reset();
    repeat (2 * N + 20) @(posedge clk0);

    // calibration rounds
    do begin
      for (int k = 0; k < NCH; k++) begin
        off[k] = $urandom_range(T - 1, 0);
        w[k] = pick_width(off[k], 0);
      end
      hit_round(off, w);
      read_all_burst(0);
      all_swapped = 1;
      for (int k = 0; k < NCH; k++) if (n_swap[k] == 0) all_swapped = 0;
    end while (!all_swapped);
    check(&cal_valid, "every channel calibrated");

    // measurement rounds
    for (int r = 0; r < 40; r++) begin
      for (int k = 0; k < NCH; k++) begin
        off[k] = $urandom_range(T - 150, 150);
        w[k] = pick_width(off[k], 1);
      end
      hit_round(off, w);
      if (r % 2) read_all_burst(1);
      else       read_each_channel(1);
    end

    // veto on channel 0
    for (int r = 0; r < 5; r++) begin
      n0 = n_words[0];
      off[0] = $urandom_range(T - 150, 150);
      w[0] = pick_width(off[0], 1);
      off_q[0].push_back(off[0]);
      w_q[0].push_back(w[0]);
      @(posedge clk0);
      #(off[0]) hit[0] = 1'b1;
      #(w[0])   hit[0] = 1'b0;
      #3000     hit[0] = 1'b1;
      vseen = veto[0];
      #3750     hit[0] = 1'b0;
      repeat (12) @(posedge clk0);
      repeat (6) @(posedge aclk);
      if (vseen && n_words[0] == n0 + 1) n_veto_block++;
      check(vseen == 1 && n_words[0] == n0 + 1, "second Hit blocked by the veto");
      bfm.write_cmd({tdc_pkg::CMD_READ_CHANNEL, 6'd0});
      n_read_channel++;
      repeat (2) @(posedge aclk);
      bfm.read_burst(8'h0, 1, data);
      check_word(0, data[0], 1);
    end

    // Hits starting at a clock edge: synchronizer corrections
    for (int r = 0; r < 10; r++) begin
      for (int k = 0; k < NCH; k++) begin
        off[k] = T - 2;
        w[k] = pick_width(off[k], 1);
      end
      hit_round(off, w);
      read_all_burst(0);
    end

    // NOP: nothing is popped
    bfm.read_burst('0, NCH, prev_words);
    for (int k = 0; k < NCH; k++) begin
      off[k] = $urandom_range(T - 150, 150);
      w[k] = pick_width(off[k], 1);
    end
    hit_round(off, w);
    bfm.write_cmd({tdc_pkg::CMD_NOP, 6'd0});
    repeat (2) @(posedge aclk);
    bfm.read_burst('0, NCH, data);
    check(data == prev_words, "NOP leaves every output register as it was");
    if (data == prev_words) n_nop++;
    read_all_burst(1);

    // overflow: DEPTH + 3 Hits, no reading
    for (int i = 0; i < DEPTH + 3; i++) begin
      for (int k = 0; k < NCH; k++) begin
        off[k] = $urandom_range(T - 150, 150);
        w[k] = pick_width(off[k], 1);
      end
      hit_round(off, w);
    end
    check(&fifo_full, "every FIFO full");
    for (int i = 0; i < DEPTH + 3; i++) begin
      if (i < DEPTH) read_all_burst(2);
      else begin
        bfm.write_cmd({tdc_pkg::CMD_READ_ALL, 6'd0});
        repeat (2) @(posedge aclk);
        bfm.read_burst('0, NCH, data);
        for (int k = 0; k < NCH; k++) begin
          check(data[k][31] == 1'b1, "read of an empty FIFO carries the invalid bit");
          if (data[k][31]) n_invalid++;
        end
      end
    end
    // the three dropped Hits are not in the FIFO
    for (int k = 0; k < NCH; k++) begin
      void'(off_q[k].pop_front()); void'(off_q[k].pop_front()); void'(off_q[k].pop_front());
      void'(w_q[k].pop_front());   void'(w_q[k].pop_front());   void'(w_q[k].pop_front());
    end
    check(&fifo_empty, "every FIFO empty again");

    // RST command
    bfm.write_cmd({tdc_pkg::CMD_RST, 6'd0});
    repeat (8) @(posedge aclk);
    check(cal_valid == '0 && &fifo_empty, "RST empties the FIFOs and drops the tables");
    if (cal_valid == '0) n_rst++;

    // every mechanism happened
    for (int k = 0; k < NCH; k++) check(n_swap[k] > 0, $sformatf("channel %0d table swap", k));
    check(n_full > 0, "FIFO full");
    check(n_invalid > 0, "invalid bit on an empty read");
    check(n_veto_block > 0, "veto blocked a Hit");
    check(n_corrected > 0, "synchronizer correction");
    check(n_read_all > 0, "READ_ALL");
    check(n_read_channel > 0, "READ_CHANNEL");
    check(n_nop > 0, "NOP");
    check(n_rst > 0, "RST");
    check(n_burst > 0 || NCH == 1, "burst read");
    check(bfm.bresp_errors == 0 && bfm.rresp_errors == 0 && bfm.rlast_errors == 0,
          "bus responses");
    $display("swaps(ch0)=%0d words(ch0)=%0d full=%0d invalid=%0d veto=%0d corrected=%0d",
             n_swap[0], n_words[0], n_full, n_invalid, n_veto_block, n_corrected);
    $display("read_all=%0d read_channel=%0d nop=%0d rst=%0d burst=%0d",
             n_read_all, n_read_channel, n_nop, n_rst, n_burst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
