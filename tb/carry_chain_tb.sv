// carry_chain_tb - measures the arrival time of a rising and a falling edge
// at every tap of the delay-line model and compares it with the documented
// delay pattern; also checks the line spans more than one 2.5 ns clock
// period with a mean tap delay of 3.8 ps.
module carry_chain_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 692;
  logic ci = 0;
  logic [N-1:0] co;
  longint t_arr [N];
  longint t0;
  int checks = 0, failures = 0;

  carry_chain #(.NUM_STAGES(N), .SEED(3)) dut (.ci(ci), .co(co));

  // Independent statement of the delay pattern.
  function automatic int exp_delay(int k);
    int pat [8] = '{2, 5, 3, 6, 0, 4, 8, 2};
    int d = pat[(k + 3) % 8];
    if (k % 8 == 0 && (k / 8) % 5 == 0) d += 2;
    return d;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(co[k]) t_arr[k] = $time - t0;
  end

  initial begin
    #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint cum;
    #100;
    for (int e = 0; e < 2; e++) begin
      t0 = $time;
      ci = (e == 0);
      #4000;
      cum = 0;
      for (int k = 0; k < N; k++) begin
        cum += exp_delay(k);
        check(t_arr[k] == cum, $sformatf("edge %0d tap %0d at %0d expected %0d", e, k, t_arr[k], cum));
        check(co[k] == (e == 0), "tap level");
      end
      check(cum > 2500, "line longer than a clock period");
      check(cum >= 2620 && cum <= 2640, $sformatf("mean tap delay 3.8 ps (line %0d ps)", cum));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
