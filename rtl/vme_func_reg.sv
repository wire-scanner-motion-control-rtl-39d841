// vme_func_reg -- memory-map decoder and registers of the master FPGA.
//
// Active while the address verifier's chip select is high. In the A16
// control space (ctrl_n = 0) the offset A[7:1] selects:
//   0x00-0x1F  slave FPGA 1 (forwarded on the local bus, f2_en)
//   0x20-0x3F  slave FPGA 2 (f3_en)
//   0x40 w     clear the acquisition address counter
//   0x42 r/w   relay control (4 bits)      0x44/0x46 r/w  I/O register bytes
//   0x48 r/w   switch control (8 bits)     0x4A r/w  SRAM selection (2 bits)
//   0x4C r     version register
//   0x80-0x86  DAC00-DAC03 values (12 bits, read back)
//   0x90-0x94  ADC0-ADC2: a write pulses the ADC's write strobe (control,
//              shadow or offset register); a read starts a conversion and
//              returns the result (DTACK waits for it)
//   0xFE w     master reset of the slave FPGAs
// In the A24 space (ctrl_n = 1) a read returns the word of the selected SRAM
// at A[18:1]. The map is the card's. This design's choices: the DAC values
// are held here and driven to the DAC pins; only A[7:0] is decoded in A16;
// master register reads are 8 bits wide with the upper byte 0.
//
// Writes happen on the xfer pulse. acc_start is a one-clock pulse at the
// start of every access (rising chip select).
//
// Address bits 23-8 are decoded by the address verifier, not here, and no
// master register is wider than 12 bits, so data bits 15-12 are not read.
module vme_func_reg
  import wsmcc_pkg::*;
#(
  parameter logic [7:0] VERSION = 8'h11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cs,
  input  logic        ctrl_n,
  input  logic [23:0] addr,
  input  logic        write,
  input  logic        xfer,
  input  logic [15:0] wdata,
  input  logic [15:0] adc_data [3],
  input  logic [15:0] sram_rdata,
  // decoded selects
  output logic        f2_en,
  output logic        f3_en,
  output logic        sram_rd,
  output logic [2:0]  adc_rd_req,
  output logic [2:0]  adc_sel,
  output logic [2:0]  adc_wr,
  output logic        clr_acq,
  output logic        mrst,
  // registers
  output logic [3:0]  relay,
  output logic [15:0] io_reg,
  output logic [7:0]  switch_reg,
  output logic [1:0]  sram_sel,
  output logic [11:0] dac [4],
  // read data and bus source
  output logic [15:0] rdata,
  output bus_sel_e    bus_sel
);

  logic [7:0] a;
  logic       a16, a24, cs_d, acc_start, wstb;

  assign a    = addr[7:0];
  assign a16  = cs && !ctrl_n;
  assign a24  = cs && ctrl_n;
  assign wstb = a16 && write && xfer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cs_d <= 1'b0;
    else        cs_d <= cs;
  end
  assign acc_start = cs && !cs_d;

  assign f2_en   = a16 && (a[7:5] == 3'b000);
  assign f3_en   = a16 && (a[7:5] == 3'b001);
  assign sram_rd = a24 && !write;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      adc_sel[i]    = a16 && (a == 8'h90 + 8'(2 * i));
      adc_rd_req[i] = adc_sel[i] && !write && acc_start;
      adc_wr[i]     = adc_sel[i] && wstb;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      relay      <= '0;
      io_reg     <= '0;
      switch_reg <= '0;
      sram_sel   <= '0;
      for (int i = 0; i < 4; i++) dac[i] <= 12'h800;
      clr_acq    <= 1'b0;
      mrst       <= 1'b0;
    end else begin
      clr_acq <= wstb && a == 8'h40;
      mrst    <= wstb && a == 8'hFE;
      if (wstb) begin
        case (a)
          8'h42: relay        <= wdata[3:0];
          8'h44: io_reg[7:0]  <= wdata[7:0];
          8'h46: io_reg[15:8] <= wdata[7:0];
          8'h48: switch_reg   <= wdata[7:0];
          8'h4A: sram_sel     <= wdata[1:0];
          8'h80: dac[0]       <= wdata[11:0];
          8'h82: dac[1]       <= wdata[11:0];
          8'h84: dac[2]       <= wdata[11:0];
          8'h86: dac[3]       <= wdata[11:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rdata   = 16'h0000;
    bus_sel = BUS_MASTER;
    if (f2_en)      bus_sel = BUS_F2;
    else if (f3_en) bus_sel = BUS_F3;
    if (sram_rd) begin
      rdata = sram_rdata;
    end else if (a16 && !write) begin
      case (a)
        8'h42: rdata = {12'h000, relay};
        8'h44: rdata = {8'h00, io_reg[7:0]};
        8'h46: rdata = {8'h00, io_reg[15:8]};
        8'h48: rdata = {8'h00, switch_reg};
        8'h4A: rdata = {14'h0000, sram_sel};
        8'h4C: rdata = {8'h00, VERSION};
        8'h80: rdata = {4'h0, dac[0]};
        8'h82: rdata = {4'h0, dac[1]};
        8'h84: rdata = {4'h0, dac[2]};
        8'h86: rdata = {4'h0, dac[3]};
        8'h90: rdata = adc_data[0];
        8'h92: rdata = adc_data[1];
        8'h94: rdata = adc_data[2];
        default: rdata = 16'h0000;
      endcase
    end
  end

endmodule
