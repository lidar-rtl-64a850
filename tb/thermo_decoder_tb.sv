// thermo_decoder_tb - random thermometer codes, with and without short
// bubbles, for the start and the stop decoder; the expected position is
// found by a top-down search written independently of the decoder.
module thermo_decoder_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 692;
  localparam int BW = $clog2(N + 1);
  logic [N-1:0] th_s, th_p;
  logic [BW-1:0] bin_s, bin_p;
  int checks = 0, failures = 0;

  thermo_decoder #(.NUM_STAGES(N), .STOP(1'b0)) u_s (.therm(th_s), .bin(bin_s));
  thermo_decoder #(.NUM_STAGES(N), .STOP(1'b1)) u_p (.therm(th_p), .bin(bin_p));

  // Highest i < N-20 with v[i]==lead and v[i+1..i+4]==!lead, plus one.
  function automatic int ref_pos(logic [N-1:0] v, logic lead);
    for (int i = N - 21; i >= 0; i--) begin
      if (v[i] == lead && v[i+1] != lead && v[i+2] != lead &&
          v[i+3] != lead && v[i+4] != lead) return i + 1;
    end
    return 0;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int len;
    // clean codes
    for (int t = 0; t < 300; t++) begin
      len = (t < 3) ? t : $urandom_range(0, 660);
      th_s = (N'(1) << len) - 1;
      th_p = ~th_s;
      #1;
      check(int'(bin_s) == len, $sformatf("start clean len %0d got %0d", len, bin_s));
      check(int'(bin_p) == len, $sformatf("stop clean len %0d got %0d", len, bin_p));
    end
    // codes with bubbles near the edge and random noise
    for (int t = 0; t < 300; t++) begin
      len = $urandom_range(5, 650);
      th_s = (N'(1) << len) - 1;
      th_s[len + $urandom_range(0, 3)] ^= 1'b1;
      th_s[len - 1 - $urandom_range(0, 3)] ^= 1'b1;
      if (t % 3 == 0) th_s[$urandom_range(0, N-1)] ^= 1'b1;
      th_p = ~th_s;
      #1;
      check(int'(bin_s) == ref_pos(th_s, 1'b1), "start with bubbles");
      check(int'(bin_p) == ref_pos(th_p, 1'b0), "stop with bubbles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
