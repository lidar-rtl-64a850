// calibration_module - on-line bin-decimation calibration of one fine-time
// measurement (start or stop) of a TDC channel.
//
// The delay-line taps have unequal widths, so a raw tap position is not a
// linear time. This module learns the tap widths from the hits themselves
// (code-density principle: with hits uncorrelated to the clock, the number of
// hits landing on a tap is proportional to its width) and builds a table that
// maps every raw tap position onto one of about CAL_BINS equal-width ideal
// bins, each worth DECIMATED_HITS hits.
//
// A dual-port RAM is split into two sections selected by the address MSB. A
// state machine works on the acquisition section and repeats forever:
//   RST          clear words 0..NUM_STAGES of the acquisition section.
//   ACQUISITION  for each new hit, read-modify-write: word[bin] += 1, until
//                CALIBRATION_HITS hits have been counted.
//   CONVERSION   walk the taps in order keeping a running sum of hit counts;
//                whenever the sum exceeds DECIMATED_HITS the ideal-bin index
//                goes up by one and DECIMATED_HITS is taken off the sum; the
//                index is written back over the count of that tap.
//   CONSULTATION swap the sections in one cycle (toggle the MSB) so the new
//                table is consulted while the old one is overwritten.
// Port B belongs to the consultation manager: once the first table exists, on
// every new hit it reads table[bin] and presents it on cal_value.
//
// Timing: new_hit is a level; its rising edge is a hit. cal_value is valid
// two clock cycles after the first cycle in which new_hit is high and holds
// until the next hit. Before the first table is built cal_valid is 0 and
// cal_value is 0. Acquisition needs 3 cycles per hit (hits must be at least 3
// cycles apart, which the TDC's veto guarantees); conversion needs 2 cycles
// per tap.
//
// Follows the described design: two-section RAM swapped by its address MSB,
// four-state machine, decimation algorithm, consultation after the first
// table. This design's own choices: the cycle-level sequencing of each state
// and the one-cycle RAM latency. The number of hits per table is a parameter
// (not given by the description).
module calibration_module
#(
  parameter int unsigned NUM_STAGES       = tdc_pkg::NUM_STAGES,
  parameter int unsigned CALIBRATION_HITS = tdc_pkg::CALIBRATION_HITS,
  parameter int unsigned DECIMATED_HITS   = tdc_pkg::DECIMATED_HITS,
  parameter int unsigned ADDR_W           = tdc_pkg::CAL_ADDR_W,
  parameter int unsigned RAM_WIDTH        = tdc_pkg::RAM_WIDTH,
  parameter int unsigned CAL_W            = tdc_pkg::CAL_W,
  localparam int unsigned BIN_W           = $clog2(NUM_STAGES + 1)
) (
  input  logic             clk,
  input  logic             rst,          // synchronous, active high
  input  logic             new_hit,      // level, rising edge = new hit
  input  logic [BIN_W-1:0] hit_bin,      // raw tap position of the hit
  output logic [CAL_W-1:0] cal_value,    // calibrated position (ideal bin)
  output logic             cal_valid,    // a calibration table exists
  output tdc_pkg::cal_state_e       state,
  output logic             table_swap    // one-cycle pulse: new table in use
);
  localparam int unsigned SEC_W = ADDR_W - 1;
  localparam int unsigned HCNT_W = $clog2(CALIBRATION_HITS + 1);

  // RAM ports
  logic                 ena, wea, enb;
  logic [ADDR_W-1:0]    addra, addrb;
  logic [RAM_WIDTH-1:0] dina, douta, doutb;

  logic                 new_hit_q, hit_rise;
  logic                 acq_sel;      // MSB of the acquisition section
  logic [1:0]           phase;
  logic [SEC_W-1:0]     idx;          // clear / conversion position
  logic [SEC_W-1:0]     bin_q;        // tap of the hit being counted
  logic [HCNT_W-1:0]    hit_count;
  logic [RAM_WIDTH-1:0] sum, tap;
  logic [RAM_WIDTH:0]   sum_next;
  logic                 over;

  assign hit_rise = new_hit & ~new_hit_q;

  // Decimation step on the word just read.
  assign sum_next = {1'b0, sum} + {1'b0, douta};
  assign over     = sum_next > (RAM_WIDTH+1)'(DECIMATED_HITS);

  // Port A: driven by the state machine.
  always_comb begin
    ena   = 1'b0;
    wea   = 1'b0;
    addra = {acq_sel, idx};
    dina  = '0;
    unique case (state)
      tdc_pkg::CAL_RST: begin
        ena = 1'b1;
        wea = 1'b1;
      end
      tdc_pkg::CAL_ACQUISITION: begin
        addra = {acq_sel, bin_q};
        ena   = (phase != 2'd0);
        wea   = (phase == 2'd2);
        dina  = douta + 1'b1;
      end
      tdc_pkg::CAL_CONVERSION: begin
        ena  = 1'b1;
        wea  = (phase == 2'd1);
        dina = over ? tap + 1'b1 : tap;
      end
      default: ;
    endcase
  end

  // State machine.
  always_ff @(posedge clk) begin
    new_hit_q <= new_hit;
    if (rst) begin
      state      <= tdc_pkg::CAL_RST;
      acq_sel    <= 1'b0;
      cal_valid  <= 1'b0;
      phase      <= '0;
      idx        <= '0;
      bin_q      <= '0;
      hit_count  <= '0;
      sum        <= '0;
      tap        <= '0;
      table_swap <= 1'b0;
    end else begin
      table_swap <= 1'b0;
      unique case (state)
        tdc_pkg::CAL_RST: begin
          if (idx == SEC_W'(NUM_STAGES)) begin
            idx       <= '0;
            phase     <= '0;
            hit_count <= '0;
            state     <= tdc_pkg::CAL_ACQUISITION;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        tdc_pkg::CAL_ACQUISITION: begin
          unique case (phase)
            2'd0: if (hit_rise) begin
              bin_q <= SEC_W'(hit_bin);
              phase <= 2'd1;
            end
            2'd1: phase <= 2'd2;          // RAM read
            default: begin                // write count + 1
              phase     <= 2'd0;
              hit_count <= hit_count + 1'b1;
              if (hit_count == HCNT_W'(CALIBRATION_HITS - 1)) begin
                state <= tdc_pkg::CAL_CONVERSION;
                idx   <= '0;
                sum   <= '0;
                tap   <= '0;
              end
            end
          endcase
        end
        tdc_pkg::CAL_CONVERSION: begin
          if (phase == 2'd0) begin
            phase <= 2'd1;                // RAM read
          end else begin                  // decimate and write back
            phase <= 2'd0;
            if (over) begin
              tap <= tap + 1'b1;
              sum <= RAM_WIDTH'(sum_next - (RAM_WIDTH+1)'(DECIMATED_HITS));
            end else begin
              sum <= RAM_WIDTH'(sum_next);
            end
            if (idx == SEC_W'(NUM_STAGES)) state <= tdc_pkg::CAL_CONSULTATION;
            else                           idx   <= idx + 1'b1;
          end
        end
        default: begin                    // tdc_pkg::CAL_CONSULTATION: swap sections
          acq_sel    <= ~acq_sel;
          cal_valid  <= 1'b1;
          table_swap <= 1'b1;
          idx        <= '0;
          phase      <= '0;
          state      <= tdc_pkg::CAL_RST;
        end
      endcase
    end
  end

  // Consultation manager: port B reads the table of the other section.
  always_ff @(posedge clk) begin
    if (rst)                       addrb <= '0;
    else if (cal_valid && hit_rise) addrb <= {~acq_sel, SEC_W'(hit_bin)};
  end
  assign enb = cal_valid;

  assign cal_value = cal_valid ? CAL_W'(doutb) : '0;

  calibration_ram #(.ADDR_W(ADDR_W), .WIDTH(RAM_WIDTH)) u_ram (
    .clk   (clk),
    .ena   (ena),
    .wea   (wea),
    .addra (addra),
    .dina  (dina),
    .douta (douta),
    .enb   (enb),
    .web   (1'b0),
    .addrb (addrb),
    .dinb  ('0),
    .doutb (doutb)
  );
endmodule
