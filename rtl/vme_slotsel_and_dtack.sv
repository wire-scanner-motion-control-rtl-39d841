// vme_slotsel_and_dtack -- VME slave address verifier and data acknowledge.
//
// Four parts, as on the card: (1) when the address strobe falls, the address
// A[23:1] (A0 taken as 0), the address modifier, the write line, the
// geographical switch and the control flag (AM4: 0 for the A16 control
// modes, 1 for the A24 memory modes) are registered; (2) AMCHECK accepts AM
// 0x29/0x2D (A16 non-privileged/supervisory), 0x39/0x3D (A24) and 0x3B/0x3F
// (A24 block transfer); (3) GACHECK compares A[23:20] with the complement of
// the 4-bit hexadecimal switch (one of 16 cards per crate); (4) chip select
// is active while both checks pass and the address and a data strobe are
// low, and a state machine gives DTACK DTACK_DELAY clocks after chip select,
// or later while wait_req is high (an ADC conversion still running). An LED
// is lit for 2^LED_BITS clocks (0.1 s at 40 MHz) after each acknowledge.
// DTACK is an active-high output driving the open-collector transistor.
// In a block transfer the address strobe stays low; the registered address
// advances by 2 after every data cycle.
//
// This design's choices: the strobes are synchronised by two flip-flops and
// the address is registered in the clock cycle where the synchronised AS
// falls, instead of clocking registers with AS; the bus-error time-out is the
// bus master's. Timing: DTACK follows the data strobe by about
// 2 + DTACK_DELAY clocks (150 ns at 40 MHz); xfer is a one-clock pulse in the
// cycle DTACK rises, in which writes take effect.
module vme_slotsel_and_dtack #(
  parameter int unsigned DTACK_DELAY = 4,
  parameter int unsigned LED_BITS    = 22
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [23:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [3:0]  ga_n,
  input  logic        wait_req,
  output logic        cs,
  output logic        ctrl_n,
  output logic [23:0] addr_q,
  output logic        write_q,
  output logic        xfer,
  output logic        dtack,
  output logic        led
);

  typedef enum logic [1:0] {ST_IDLE, ST_WAIT, ST_ACK} state_e;

  logic [1:0]  as_s;
  logic [3:0]  ds_s;          // two stages of the two strobes
  logic [5:0]  am_q;
  logic [3:0]  ga_q;
  logic        valid;         // an address phase has been registered
  logic        am_ok, ga_ok, blt;
  logic        as_fall;
  state_e      state;
  logic [$clog2(DTACK_DELAY+1)-1:0] cnt;
  logic [LED_BITS-1:0] led_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s <= 2'b11;
      ds_s <= 4'b1111;
    end else begin
      as_s <= {as_s[0], vme_as_n};
      ds_s <= {ds_s[1:0], vme_ds_n};
    end
  end

  // Registered AS: as_s[1]; previous value kept in as_d.
  logic as_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) as_d <= 1'b1;
    else        as_d <= as_s[1];
  end
  assign as_fall = as_d && !as_s[1];

  // REGISTER_ADDR
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      am_q    <= '0;
      ga_q    <= '0;
      write_q <= 1'b0;
      ctrl_n  <= 1'b1;
      valid   <= 1'b0;
    end else if (as_fall) begin
      addr_q  <= {vme_a, 1'b0};
      am_q    <= vme_am;
      ga_q    <= ga_n;
      write_q <= !vme_write_n;
      ctrl_n  <= vme_am[4];
      valid   <= 1'b1;
    end else if (as_s[1]) begin
      valid   <= 1'b0;
    end else if (state == ST_ACK && ds_s[3:2] == 2'b11 && blt) begin
      addr_q  <= addr_q + 24'd2;
    end
  end

  // AMCHECK
  always_comb begin
    unique case (am_q)
      6'h29, 6'h2D, 6'h39, 6'h3D, 6'h3B, 6'h3F: am_ok = 1'b1;
      default:                                  am_ok = 1'b0;
    endcase
  end
  assign blt = (am_q == 6'h3B) || (am_q == 6'h3F);

  // GACHECK: the switch is read complemented.
  assign ga_ok = (addr_q[23:20] == ~ga_q);

  assign cs = valid && am_ok && ga_ok && !as_s[1] && (ds_s[3:2] != 2'b11);

  // DATA_ACKNOWLEDGEMENT
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      cnt     <= '0;
      dtack   <= 1'b0;
      xfer    <= 1'b0;
      led_cnt <= '0;
    end else begin
      xfer <= 1'b0;
      if (led_cnt != '0) led_cnt <= led_cnt - LED_BITS'(1);
      unique case (state)
        ST_IDLE: begin
          dtack <= 1'b0;
          cnt   <= '0;
          if (cs) begin
            state <= ST_WAIT;
            cnt   <= ($bits(cnt))'(1);
          end
        end
        ST_WAIT: begin
          if (!cs) begin
            state <= ST_IDLE;
          end else if (cnt < ($bits(cnt))'(DTACK_DELAY - 1)) begin
            cnt <= cnt + 1'b1;
          end else if (!wait_req) begin
            state   <= ST_ACK;
            dtack   <= 1'b1;
            xfer    <= 1'b1;
            led_cnt <= '1;
          end
        end
        ST_ACK: begin
          if (!cs) begin
            state <= ST_IDLE;
            dtack <= 1'b0;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign led = (led_cnt != '0);

endmodule
