// orqdmux -- optical ruler quadrature decoder and output multiplexer.
//
// The ruler's digitiser delivers two square waves A and B, 90 degrees apart,
// and a mid-position reference pulse. With 10-fold interpolation each change
// of the (A,B) phase state is 1 um of travel. A five-state machine (one
// initialisation state and the four phase states 00, 01, 10, 11) compares
// the previous and the current phase state on every clock: a step to the
// forward neighbour increments the 18-bit position counter, a step to the
// backward neighbour decrements it, and a change of both phases at once (a
// missed state) increments the 18-bit error counter and returns to the
// initialisation state, which only takes over the current phase state. The
// reference register captures the position counter at the rising edge of the
// reference pulse. Each register has its own clear. The state machine, the
// error rule, the registers and the port list are the card's design.
// This design's choices: forward is A leading B (00 -> 10 -> 11 -> 01);
// inputs are synchronised by two flip-flops; mux select 00 = position,
// 01 = reference, 10 = error count, 11 = zero; uword = 1 moves bits [17:16]
// to the bottom for the high-word VME read; mux_en = 0 gives zero.
//
// position is the position counter itself, independent of the multiplexer
// (an addition of this design, used for the ruler SRAM and calibration).
// qd_clk is a one-cycle pulse for every count (used as acquisition trigger
// in calibration mode). Latency from a phase edge to the count: 3 clocks.
module orqdmux #(
  parameter int unsigned W = 18
) (
  input  logic         sys_clk,
  input  logic         areset_n,
  input  logic         or_ref,
  input  logic         or_phase_a,
  input  logic         or_phase_b,
  input  logic         or_mux_en,
  input  logic [1:0]   or_mux_sel,
  input  logic         or_clr_udc,
  input  logic         or_clr_ref,
  input  logic         or_clr_err,
  input  logic         uword,
  output logic [W-1:0] data_out,
  output logic [W-1:0] position,
  output logic         qd_clk
);

  typedef enum logic [2:0] {
    ST_INIT = 3'b100,
    ST_00   = 3'b000,
    ST_01   = 3'b001,
    ST_10   = 3'b010,
    ST_11   = 3'b011
  } state_e;

  state_e       state;
  logic [1:0]   a_s, b_s;
  logic [2:0]   ref_s;
  logic [1:0]   cur, prev;
  logic [W-1:0] udc, refreg, errcnt;
  logic [W-1:0] sel;

  always_ff @(posedge sys_clk or negedge areset_n) begin
    if (!areset_n) begin
      a_s   <= '0;
      b_s   <= '0;
      ref_s <= '0;
    end else begin
      a_s   <= {a_s[0], or_phase_a};
      b_s   <= {b_s[0], or_phase_b};
      ref_s <= {ref_s[1:0], or_ref};
    end
  end

  assign cur  = {a_s[1], b_s[1]};
  assign prev = state[1:0];

  // Forward neighbour of a phase state (A leading B): 00->10->11->01->00.
  function automatic logic [1:0] fwd(input logic [1:0] s);
    return {~s[0], s[1]};
  endfunction

  always_ff @(posedge sys_clk or negedge areset_n) begin
    if (!areset_n) begin
      state  <= ST_INIT;
      udc    <= '0;
      errcnt <= '0;
      qd_clk <= 1'b0;
    end else begin
      qd_clk <= 1'b0;
      if (state == ST_INIT) begin
        state <= state_e'({1'b0, cur});
      end else if (cur != prev) begin
        if (cur == fwd(prev)) begin
          udc    <= udc + W'(1);
          qd_clk <= 1'b1;
          state  <= state_e'({1'b0, cur});
        end else if (fwd(cur) == prev) begin
          udc    <= udc - W'(1);
          qd_clk <= 1'b1;
          state  <= state_e'({1'b0, cur});
        end else begin
          errcnt <= errcnt + W'(1);
          state  <= ST_INIT;
        end
      end
      if (or_clr_udc) udc    <= '0;
      if (or_clr_err) errcnt <= '0;
    end
  end

  always_ff @(posedge sys_clk or negedge areset_n) begin
    if (!areset_n)                  refreg <= '0;
    else if (or_clr_ref)            refreg <= '0;
    else if (ref_s[1] && !ref_s[2]) refreg <= udc;
  end

  always_comb begin
    unique case (or_mux_sel)
      2'b00:   sel = udc;
      2'b01:   sel = refreg;
      2'b10:   sel = errcnt;
      default: sel = '0;
    endcase
  end

  assign position = udc;

  always_comb begin
    if (!or_mux_en)  data_out = '0;
    else if (uword)  data_out = W'(sel[W-1:16]);
    else             data_out = sel;
  end

endmodule
