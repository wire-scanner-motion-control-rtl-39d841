// sevenseg_display -- error character display on one 7-segment LED.
//
// A state machine walks through the held error bits. In SEARCH it looks at
// one bit per clock, starting after the bit shown last; the first bit that
// is 0 (error) is shown for STEP_MS milliseconds (SHOW), then the search
// continues. With one error the same character therefore stays on, with
// several they are stepped through every 0.5 s, and when a full round finds
// no error an underscore (segment d only) is shown, as in the card's error
// list. If the shown error is cleared the search restarts
// at once. Characters: bit 0-9 -> 0-9, 10-15 -> A b C d E F, 16-24 ->
// I J L M n o P r t. The behaviour, the 0.5 s step and the common-anode codes
// (a = bit 7 ... dp = bit 0, 0 = lit, decimal point off) and the
// underscore are the card's; the search order is this design's.
//
// Output seg_n is registered.
module sevenseg_display
  import wsmcc_pkg::*;
#(
  parameter int unsigned N       = 25,
  parameter int unsigned CLK_HZ  = 40_000_000,
  parameter int unsigned STEP_MS = 500
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] err,
  output logic [7:0]   seg_n
);

  localparam longint unsigned STEP = longint'(CLK_HZ) / 1000 * longint'(STEP_MS);
  localparam int unsigned TW = $clog2(STEP + 1);
  localparam int unsigned IW = $clog2(N + 1);

  typedef enum logic [1:0] {ST_SEARCH, ST_SHOW, ST_NONE} state_e;

  state_e        state;
  logic [IW-1:0] idx;      // bit being looked at or shown
  logic [IW-1:0] looked;   // bits looked at in this search
  logic [TW-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_SEARCH;
      idx    <= '0;
      looked <= '0;
      timer  <= '0;
      seg_n  <= SEG_NONE;
    end else begin
      unique case (state)
        ST_SEARCH: begin
          if (!err[idx]) begin
            seg_n  <= err_char(5'(idx));
            timer  <= TW'(STEP - 1);
            looked <= '0;
            state  <= ST_SHOW;
          end else if (looked == IW'(N - 1)) begin
            seg_n  <= SEG_NONE;
            timer  <= TW'(STEP - 1);
            looked <= '0;
            state  <= ST_NONE;
          end else begin
            idx    <= (idx == IW'(N - 1)) ? '0 : idx + IW'(1);
            looked <= looked + IW'(1);
          end
        end
        ST_SHOW: begin
          if (err[idx] || timer == '0) begin
            idx   <= (idx == IW'(N - 1)) ? '0 : idx + IW'(1);
            state <= ST_SEARCH;
          end else begin
            timer <= timer - TW'(1);
          end
        end
        ST_NONE: begin
          if (timer == '0 || !(&err)) begin
            state <= ST_SEARCH;
          end else begin
            timer <= timer - TW'(1);
          end
        end
        default: state <= ST_SEARCH;
      endcase
    end
  end

endmodule
