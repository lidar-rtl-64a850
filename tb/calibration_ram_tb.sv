// calibration_ram_tb - writes and reads both ports of the dual-port RAM and
// checks read latency (one cycle), read-first behaviour, enables and
// independence of the ports against a shadow array.
module calibration_ram_tb;
  timeunit 1ps; timeprecision 1ps;
  localparam int AW = 11, W = 19;
  logic clk = 0, ena = 0, wea = 0, enb = 0, web = 0;
  logic [AW-1:0] addra = '0, addrb = '0;
  logic [W-1:0] dina = '0, dinb = '0, douta, doutb;
  logic [W-1:0] shadow [2**AW];
  int checks = 0, failures = 0;

  calibration_ram #(.ADDR_W(AW), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [W-1:0] held;
    // fill through both ports
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      ena = 1; wea = 1; addra = AW'(i);   dina = W'($urandom); shadow[i]   = dina;
      enb = 1; web = 1; addrb = AW'(i+1); dinb = W'($urandom); shadow[i+1] = dinb;
    end
    @(negedge clk); wea = 0; web = 0;
    // random reads on both ports
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      addra = AW'($urandom); addrb = AW'($urandom); ena = 1; enb = 1;
      @(negedge clk);
      check(douta == shadow[addra], "port A read");
      check(doutb == shadow[addrb], "port B read");
    end
    // read-first on port A, visible on port B next cycle
    @(negedge clk); addra = 11'd7; wea = 1; dina = 19'h1234; addrb = 11'd7;
    @(negedge clk); wea = 0;
    check(douta == shadow[7], "read-first returns old word");
    shadow[7] = 19'h1234;
    @(negedge clk);
    check(douta == 19'h1234 && doutb == 19'h1234, "new word visible");
    // disabled port holds its output
    held = doutb; enb = 0; addrb = 11'd9;
    @(negedge clk);
    check(doutb == held, "disabled port holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
