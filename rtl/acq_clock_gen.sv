// acq_clock_gen -- acquisition clock of the card.
//
// Produces the one-cycle acquisition tick that starts the ADC conversions and
// SRAM writes. The source is chosen by the control register: CLKS 00 and 01
// divide the 40 MHz clock by the 16-bit acquisition division value, CLKS 10
// uses the beam revolution frequency (Frev) from the BOBR, CLKS 11 an
// external clock. In calibration mode (scan_mode = 1) the ruler count pulses
// (qd_clk) trigger the acquisitions instead, so that each micrometre of
// movement gives one sample. Ticks are passed only during an active scan
// and, if the acquisition gate is enabled, only while the gate input (wire
// inside the programmed position window) is high. The source list and the
// gating follow the card's register description. This design's choices:
// the two 40 MHz sources are the same system clock here, Frev, the external
// clock and the gate are synchronised and their rising edges used, and the
// divider uses the function generator's rule (0 and 1 disable it).
//
// Timing: tick is registered; Frev/external edges appear 3 clocks late.
module acq_clock_gen
  import wsmcc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         active_scan,
  input  logic [1:0]   clks,
  input  logic         scan_mode,
  input  logic         acq_gate_en,
  input  logic [W-1:0] div,
  input  logic         frev,
  input  logic         ext_clk,
  input  logic         qd_clk,
  input  logic         acq_gate,
  output logic         tick,
  output logic         gate_sync
);

  logic       div_tick;
  logic [2:0] frev_s, ext_s;
  logic [1:0] gate_s;
  logic       src_tick;

  fgen_clk_div #(.W(W)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (active_scan),
    .div  (div),
    .tick (div_tick)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frev_s <= '0;
      ext_s  <= '0;
      gate_s <= '0;
    end else begin
      frev_s <= {frev_s[1:0], frev};
      ext_s  <= {ext_s[1:0], ext_clk};
      gate_s <= {gate_s[0], acq_gate};
    end
  end

  assign gate_sync = gate_s[1];

  always_comb begin
    if (scan_mode)
      src_tick = qd_clk;
    else begin
      unique case (clks_e'(clks))
        CLKS_XTAL, CLKS_BOBR: src_tick = div_tick;
        CLKS_FREV:            src_tick = frev_s[1] && !frev_s[2];
        CLKS_EXT:             src_tick = ext_s[1] && !ext_s[2];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick <= 1'b0;
    else        tick <= active_scan && src_tick && (!acq_gate_en || gate_sync);
  end

endmodule
