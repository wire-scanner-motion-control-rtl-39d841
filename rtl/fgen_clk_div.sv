// fgen_clk_div -- programmable clock divider of the function generator.
//
// While enabled, a down counter runs from div-1 to 0; in the cycle after it
// reaches 0 the divider emits a one-cycle tick and reloads div-1. The tick
// therefore comes every div system clocks (40 MHz / div). Division values 0
// and 1 disable the divider, so the fastest rate is half the system clock;
// with the 18-bit register the slowest is 40 MHz / (2^18-1), about 153 Hz.
// This counting rule is the card's; the output as a clock-enable pulse in the
// system clock domain (instead of a divided clock net) is this design's.
//
// Interface: en (active scan), div (division value), tick (enable pulse).
// Timing: first tick div clocks after en rises.
module fgen_clk_div #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] div,
  output logic         tick
);

  logic [W-1:0] cnt;
  logic         running;

  assign running = en && (div > W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (!running) begin
      cnt  <= div - W'(1);
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= div - W'(1);
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - W'(1);
      tick <= 1'b0;
    end
  end

endmodule
