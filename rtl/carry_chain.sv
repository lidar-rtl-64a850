// carry_chain - behavioural model of the tapped delay line (not synthesizable
// logic: it stands for a chain of FPGA CARRY8 primitives).
//
// The Hit enters the carry-in of the first CARRY8 and ripples through the
// carry outputs of NUM_STAGES/8 cascaded CARRY8 cells (all S inputs 1, all DI
// inputs 0, so each carry output simply follows the carry-in after the cell
// delay). Every carry output is one tap. In the device the tap delays are
// about 3.8 ps on average but not uniform, and clock skew can give zero-width
// taps; this model reproduces that with a fixed per-tap delay pattern
// {2,5,3,6,0,4,8,2} ps, rotated by SEED so that channels differ, plus 2 ps on
// the first tap of every fifth CARRY8. The mean is 3.8 ps per tap and the
// whole line (692 taps, 2.63 ns) is longer than the 2.5 ns reference clock,
// as the design requires.
//
// Ports: ci is the carry-in (the vetoed Hit), co[k] is tap k. Delays are in
// picoseconds (the module sets its own time unit).
module carry_chain #(
  parameter int unsigned NUM_STAGES = tdc_pkg::NUM_STAGES,
  parameter int unsigned SEED       = 0
) (
  input  logic                  ci,
  output logic [NUM_STAGES-1:0] co
);
  timeunit 1ps; timeprecision 1ps;
  function automatic int unsigned tap_delay(int unsigned k);
    int unsigned base;
    case ((k + SEED) % 8)
      0: base = 2;  1: base = 5;  2: base = 3;  3: base = 6;
      4: base = 0;  5: base = 4;  6: base = 8;  default: base = 2;
    endcase
    if ((k % 8) == 0 && ((k / 8) % 5) == 0) base = base + 2;
    return base;
  endfunction

  // Each edge of ci starts its own wave that walks down the taps, waiting
  // each tap's delay before setting it. Waves never overtake one another
  // because every wave sees the same per-tap delays.
  initial co = '0;

  always begin
    @(ci);
    fork
      begin : wave
        automatic logic v = ci;
        for (int unsigned k = 0; k < NUM_STAGES; k++) begin
          if (tap_delay(k) != 0) #(tap_delay(k));
          co[k] = v;
        end
      end
    join_none
  end
endmodule
