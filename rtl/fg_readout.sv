// fg_readout -- function check: VME read-out of the active profile ROM.
//
// To verify the stored motion functions, software clears a read-out counter
// and then reads one VME address (0x14) repeatedly, once per ROM word. While
// such a read is in progress (oe high) the ROM address is switched to the
// read-out counter and the buffer drives the ROM word onto the data bus; the
// counter advances at the falling edge of oe, so the first read returns
// address 0. Both the counter and the buffer are the card's design; edge
// detection in the system clock is this design's.
//
// Interface: oe (read of 0x14 active), clr, rom_data; rd_addr (ROM address
// during the read-out), sel_rd (address switch), rdata (bus value, 0 when
// not reading). Timing: the ROM is synchronous, so data is valid from the
// second clock of oe; the VME acknowledge comes later.
module fg_readout #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          oe,
  input  logic          clr,
  input  logic [DW-1:0] rom_data,
  output logic [AW-1:0] rd_addr,
  output logic          sel_rd,
  output logic [15:0]   rdata
);

  logic oe_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oe_d    <= 1'b0;
      rd_addr <= '0;
    end else begin
      oe_d <= oe;
      if (clr)
        rd_addr <= '0;
      else if (oe_d && !oe)
        rd_addr <= rd_addr + AW'(1);
    end
  end

  assign sel_rd = oe;
  assign rdata  = oe ? 16'(rom_data) : 16'h0000;

endmodule
