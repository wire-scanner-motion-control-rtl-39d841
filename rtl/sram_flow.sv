// sram_flow -- write and read flow control of one acquisition SRAM
// (IS61LV25616AL, 256K x 16, asynchronous).
//
// Writes are chip-enable controlled: on wr_trig (the ADC chip select going
// active, i.e. the converted data is on the bus) the address and data are
// registered and WE_N goes low; one clock later CE_N is low for one clock
// (25 ns, more than twice the 10-12 ns access time); one clock after that
// WE_N returns high. During a VME A24 read-out of this SRAM (rd_en) CE_N and
// OE_N are held low with the VME word address. Byte enables are tied low on
// the board. The one-cycle CE_N delay and pulse are the card's; the WE_N
// width of three clocks and the registered read path are this design's.
//
// Timing: a write occupies 3 clocks plus one to return to idle, so write
// triggers must be at least 4 clocks apart (a trigger during a write is not
// taken); a read address is applied one clock after rd_en. Assertions check
// that WE_N and OE_N are never low together and that CE_N is only low in a
// read or a write. Their disable condition samples rst_n, which lint
// reports as rst_n used both synchronously and asynchronously; no logic is
// affected.
module sram_flow #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_trig,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [AW-1:0] sram_a,
  output logic          sram_ce_n,
  output logic          sram_we_n,
  output logic          sram_oe_n,
  output logic [DW-1:0] sram_dq_o,
  output logic          sram_dq_oe
);

  typedef enum logic [1:0] {ST_IDLE, ST_SETUP, ST_CE, ST_HOLD} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      sram_a     <= '0;
      sram_ce_n  <= 1'b1;
      sram_we_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (wr_trig) begin
            state      <= ST_SETUP;
            sram_a     <= wr_addr;
            sram_dq_o  <= wr_data;
            sram_dq_oe <= 1'b1;
            sram_we_n  <= 1'b0;
            sram_ce_n  <= 1'b1;
            sram_oe_n  <= 1'b1;
          end else if (rd_en) begin
            sram_a    <= rd_addr;
            sram_ce_n <= 1'b0;
            sram_oe_n <= 1'b0;
            sram_we_n <= 1'b1;
          end else begin
            sram_ce_n <= 1'b1;
            sram_oe_n <= 1'b1;
            sram_we_n <= 1'b1;
          end
        end
        ST_SETUP: begin
          state     <= ST_CE;
          sram_ce_n <= 1'b0;
        end
        ST_CE: begin
          state     <= ST_HOLD;
          sram_ce_n <= 1'b1;
        end
        ST_HOLD: begin
          state      <= ST_IDLE;
          sram_we_n  <= 1'b1;
          sram_dq_oe <= 1'b0;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  a_we_oe: assert property (@(posedge clk) disable iff (!rst_n)
    sram_we_n || sram_oe_n)
    else $error("sram_flow: WE_N and OE_N low together");
  a_ce: assert property (@(posedge clk) disable iff (!rst_n)
    sram_ce_n || !sram_we_n || !sram_oe_n)
    else $error("sram_flow: CE_N low without a read or a write");

endmodule
