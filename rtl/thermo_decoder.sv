// thermo_decoder - thermometer code to tap position (priority encoder).
//
// The start decoder (STOP = 0) looks for the last tap that holds a 1 and is
// followed by WINDOW taps holding 0; the stop decoder (STOP = 1) looks for the
// last 0 followed by WINDOW ones. The result is that tap's index plus one,
// i.e. the number of taps the edge travelled, or 0 when no such pattern
// exists (the edge had not reached the first tap). Requiring WINDOW equal
// taps after the transition ignores short bubbles in the code. Only
// positions below NUM_STAGES - SCAN_MARGIN are searched.
//
// Purely combinational, so the position follows the store registers in the
// same cycle. Follows the described design (window of four, search limit
// NUM_STAGES - 20); the start decoder mirrors the stop decoder.
module thermo_decoder #(
  parameter int unsigned NUM_STAGES  = tdc_pkg::NUM_STAGES,
  parameter bit          STOP        = 1'b0,
  parameter int unsigned WINDOW      = 4,
  parameter int unsigned SCAN_MARGIN = 20,
  localparam int unsigned BIN_W      = $clog2(NUM_STAGES + 1)
) (
  input  logic [NUM_STAGES-1:0] therm,
  output logic [BIN_W-1:0]      bin
);
  logic [NUM_STAGES-1:0] code;   // normalised: the searched edge is 1 -> 0

  assign code = STOP ? ~therm : therm;

  always_comb begin
    logic match;
    bin = '0;
    for (int unsigned i = 0; i < NUM_STAGES - SCAN_MARGIN; i++) begin
      match = code[i];
      for (int unsigned w = 1; w <= WINDOW; w++) match &= ~code[i+w];
      if (match) bin = BIN_W'(i + 1);
    end
  end
endmodule
