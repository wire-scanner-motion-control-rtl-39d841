// fgen_addr_counter -- address counter of the function generator.
//
// A two-state machine steps the profile ROM address: in the OUT state
// (out-scan) the address counts up on every tick, in the IN state (in-scan)
// it counts down. When the address has reached the end address (OUT) or 0
// (IN) the next tick changes the state and gives a one-cycle scan_over pulse,
// which ends the active scan; the next scan then runs the other way. The set
// command loads the all-ones address (0xFFF) and the clear command loads 0;
// they are used to move between the offset profile and the fast scan profile.
// The two opposite-counting states, scan_over on the state change and the
// set/clear commands are the card's design. This design's choices: set also
// selects the IN state and clear the OUT state, and the machine starts in OUT.
//
// Interface: tick (divided clock), end_addr, set_max, clr; addr, dir_in
// (1 = counting down), scan_over. Timing: addr changes one clock after tick.
module fgen_addr_counter #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic [AW-1:0] end_addr,
  input  logic          set_max,
  input  logic          clr,
  output logic [AW-1:0] addr,
  output logic          dir_in,
  output logic          scan_over
);

  typedef enum logic {ST_OUT = 1'b0, ST_IN = 1'b1} state_e;
  state_e state;

  assign dir_in = (state == ST_IN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_OUT;
      addr      <= '0;
      scan_over <= 1'b0;
    end else begin
      scan_over <= 1'b0;
      if (set_max) begin
        addr  <= '1;
        state <= ST_IN;
      end else if (clr) begin
        addr  <= '0;
        state <= ST_OUT;
      end else if (tick) begin
        unique case (state)
          ST_OUT:
            if (addr >= end_addr) begin
              state     <= ST_IN;
              scan_over <= 1'b1;
            end else begin
              addr <= addr + AW'(1);
            end
          ST_IN:
            if (addr == '0) begin
              state     <= ST_OUT;
              scan_over <= 1'b1;
            end else begin
              addr <= addr - AW'(1);
            end
        endcase
      end
    end
  end

endmodule
