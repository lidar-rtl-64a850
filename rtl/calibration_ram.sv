// calibration_ram - true dual-port RAM holding the code-density histogram and
// the calibration table of one calibration module.
//
// Two independent ports on the same clock. Each port reads synchronously: when
// its enable is high, dout shows the word at addr one clock edge later (the
// old word when the same edge also writes it, read-first). A write happens at
// the clock edge where enable and write enable are both high. Writes to the
// same address from both ports in one cycle are not used by the calibration
// module; port B wins.
//
// The original design uses a vendor block-RAM generator for this memory; it is
// written here as an array so that synthesis maps it onto block RAM. Depth
// 2^ADDR_W words (two 1024-word sections) and RAM_WIDTH-bit words follow the
// described design; the read latency of one cycle is this design's choice.
module calibration_ram #(
  parameter int unsigned ADDR_W = tdc_pkg::CAL_ADDR_W,
  parameter int unsigned WIDTH  = tdc_pkg::RAM_WIDTH
) (
  input  logic              clk,
  // port A
  input  logic              ena,
  input  logic              wea,
  input  logic [ADDR_W-1:0] addra,
  input  logic [WIDTH-1:0]  dina,
  output logic [WIDTH-1:0]  douta,
  // port B
  input  logic              enb,
  input  logic              web,
  input  logic [ADDR_W-1:0] addrb,
  input  logic [WIDTH-1:0]  dinb,
  output logic [WIDTH-1:0]  doutb
);
  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (ena) begin
      douta <= mem[addra];
      if (wea) mem[addra] <= dina;
    end
    if (enb) begin
      doutb <= mem[addrb];
      if (web) mem[addrb] <= dinb;
    end
  end
endmodule
