// fpga1_master -- master FPGA of the card: VME interface and data flow.
//
// The VME slave interface (address verifier + memory-map decoder) answers
// A16 control accesses and A24 SRAM read-outs. Accesses to 0x00-0x3F are
// forwarded to the slave FPGAs on the local bus; the master keeps its own
// registers, the DAC values and the SRAM selection. The acquisition tick from
// slave 1 starts a conversion in all three ADCs: ADC0 (AD7938, 12-bit
// diagnostics), ADC1 (AD7484, 14 bits + over-range, log amplifier) and ADC2
// (AD7677, 16-bit potentiometer). The opening of each ADC's chip-select
// window writes the converted word into its SRAM; the ruler SRAM is written
// with the upper 16 bits of the 18-bit ruler position on the tick itself.
// All SRAMs of one acquisition share the address taken from the acquisition
// address counter at the tick (sample k at address k after a clear at 0x40);
// in calibration mode the potentiometer SRAM is addressed by the ruler
// position instead, which builds the potentiometer look-up table.
// SRAM numbering follows the SRAM selection register: 0 diagnostics (ADC0),
// 1 log amplifier (ADC1), 2 potentiometer (ADC2), 3 optical ruler.
//
// The partition, the register map, the trigger chain and the calibration
// addressing follow the card. This design's choices: the shared address
// counter and its post-increment, a VME read of an ADC starting a conversion
// and holding DTACK until the result is latched, SRAM writes only for
// conversions started by the acquisition tick, and the AD7484 BUSY inverted
// here.
//
// The AD7677 has no writable registers, so the write strobe decoded for
// ADC2 (0x94) is not connected.
module fpga1_master
  import wsmcc_pkg::*;
#(
  parameter logic [7:0]  VERSION     = 8'h11,
  parameter int unsigned DTACK_DELAY = 4,
  parameter int unsigned LED_BITS    = 22
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME
  input  logic [23:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [15:0] vme_d_i,
  input  logic [3:0]  ga_n,
  output logic        vme_dtack,
  output logic        vme_d_oe,
  output logic [15:0] m_rdata,
  output bus_sel_e    bus_sel,
  output logic        led,
  // local bus to the slave FPGAs
  output lbus_t       lbus2,
  output lbus_t       lbus3,
  output logic        mrst,
  // from slave 1
  input  logic        acq_tick,
  input  logic        cal_mode,
  input  logic [17:0] ruler_pos,
  // ADC0 AD7938
  input  logic        adc0_busy,
  input  logic [11:0] adc0_d,
  output logic        adc0_convst_n,
  output logic        adc0_cs_n,
  output logic        adc0_wr_n,
  // ADC1 AD7484 (BUSY active low)
  input  logic        adc1_busy_n,
  input  logic [14:0] adc1_d,
  output logic        adc1_convst_n,
  output logic        adc1_cs_n,
  output logic        adc1_wr_n,
  // ADC2 AD7677
  input  logic        adc2_busy,
  input  logic [15:0] adc2_d,
  output logic        adc2_convst_n,
  output logic        adc2_cs_n,
  // SRAMs
  output logic [17:0] sram_a     [4],
  output logic [3:0]  sram_ce_n,
  output logic [3:0]  sram_we_n,
  output logic [3:0]  sram_oe_n,
  output logic [15:0] sram_dq_o  [4],
  output logic [3:0]  sram_dq_oe,
  input  logic [15:0] sram_dq_i  [4],
  // FPGA1 registers and DACs
  output logic [3:0]  relay,
  output logic [15:0] io_reg,
  output logic [7:0]  switch_reg,
  output logic [11:0] dac [4]
);

  logic        cs, ctrl_n, write_q, xfer, wait_req;
  logic [23:0] addr_q;
  logic        f2_en, f3_en, sram_rd, clr_acq;
  logic [2:0]  adc_rd_req, adc_sel, adc_wr;
  logic [1:0]  sram_sel;
  logic [15:0] adc_data [3];
  logic [15:0] sram_rdata;
  logic [2:0]  start, done, cs_n_all, cs_n_d, pending, acq_conv;
  logic [11:0] adc0_q;
  logic [14:0] adc1_q;
  logic [15:0] adc2_q;
  logic [17:0] acq_cnt, tick_addr;
  logic        tick_d;
  logic [3:0]  wr_trig;
  logic [17:0] wr_addr [4];
  logic [15:0] wr_data [4];

  vme_slotsel_and_dtack #(.DTACK_DELAY(DTACK_DELAY), .LED_BITS(LED_BITS)) u_sel (
    .clk(clk), .rst_n(rst_n), .vme_a(vme_a), .vme_am(vme_am), .vme_as_n(vme_as_n),
    .vme_ds_n(vme_ds_n), .vme_write_n(vme_write_n), .ga_n(ga_n), .wait_req(wait_req),
    .cs(cs), .ctrl_n(ctrl_n), .addr_q(addr_q), .write_q(write_q), .xfer(xfer),
    .dtack(vme_dtack), .led(led)
  );

  vme_func_reg #(.VERSION(VERSION)) u_reg (
    .clk(clk), .rst_n(rst_n), .cs(cs), .ctrl_n(ctrl_n), .addr(addr_q), .write(write_q),
    .xfer(xfer), .wdata(vme_d_i), .adc_data(adc_data), .sram_rdata(sram_rdata),
    .f2_en(f2_en), .f3_en(f3_en), .sram_rd(sram_rd), .adc_rd_req(adc_rd_req),
    .adc_sel(adc_sel), .adc_wr(adc_wr), .clr_acq(clr_acq), .mrst(mrst),
    .relay(relay), .io_reg(io_reg), .switch_reg(switch_reg), .sram_sel(sram_sel),
    .dac(dac), .rdata(m_rdata), .bus_sel(bus_sel)
  );

  assign vme_d_oe = cs && !write_q;

  always_comb begin
    lbus2       = '0;
    lbus2.en    = f2_en;
    lbus2.rd    = cs && !write_q;
    lbus2.wr    = cs && write_q;
    lbus2.stb   = xfer;
    lbus2.addr  = addr_q[7:0];
    lbus2.wdata = vme_d_i;
    lbus3       = lbus2;
    lbus3.en    = f3_en;
  end

  // ADC write strobes (control/shadow register of ADC0, offset of ADC1).
  assign adc0_wr_n = !adc_wr[0];
  assign adc1_wr_n = !adc_wr[1];

  // Conversion starts: acquisition tick or VME read of the ADC.
  assign start = {3{acq_tick}} | adc_rd_req;

  adc_flow_ad7938 #(.DW(12), .CS_CYCLES(4)) u_adc0 (
    .clk(clk), .rst_n(rst_n), .start(start[0]), .busy(adc0_busy), .adc_d(adc0_d),
    .convst_n(adc0_convst_n), .cs_n(cs_n_all[0]), .data(adc0_q), .done(done[0])
  );

  adc_flow_busy #(.DW(15), .CS_CYCLES(4)) u_adc1 (
    .clk(clk), .rst_n(rst_n), .start(start[1]), .busy(!adc1_busy_n), .adc_d(adc1_d),
    .convst_n(adc1_convst_n), .cs_n(cs_n_all[1]), .data(adc1_q), .done(done[1])
  );

  adc_flow_busy #(.DW(16), .CS_CYCLES(4)) u_adc2 (
    .clk(clk), .rst_n(rst_n), .start(start[2]), .busy(adc2_busy), .adc_d(adc2_d),
    .convst_n(adc2_convst_n), .cs_n(cs_n_all[2]), .data(adc2_q), .done(done[2])
  );

  assign adc0_cs_n = cs_n_all[0];
  assign adc1_cs_n = cs_n_all[1];
  assign adc2_cs_n = cs_n_all[2];

  assign adc_data[0] = 16'(adc0_q);
  assign adc_data[1] = 16'(adc1_q);
  assign adc_data[2] = adc2_q;

  // VME reads of an ADC wait for the conversion; acquisition conversions
  // are remembered so that only they are written to the SRAMs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= '0;
      acq_conv <= '0;
      cs_n_d   <= '1;
    end else begin
      cs_n_d <= cs_n_all;
      for (int i = 0; i < 3; i++) begin
        if (adc_rd_req[i])  pending[i] <= 1'b1;
        else if (done[i])   pending[i] <= 1'b0;
        if (acq_tick)       acq_conv[i] <= 1'b1;
        else if (done[i])   acq_conv[i] <= 1'b0;
      end
    end
  end

  assign wait_req = |(pending & adc_sel);

  // Acquisition address counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq_cnt   <= '0;
      tick_addr <= '0;
      tick_d    <= 1'b0;
    end else begin
      tick_d <= acq_tick;
      if (clr_acq) begin
        acq_cnt <= '0;
      end else if (acq_tick) begin
        tick_addr <= acq_cnt;
        acq_cnt   <= acq_cnt + 18'd1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 3; i++)
      wr_trig[i] = cs_n_d[i] && !cs_n_all[i] && acq_conv[i];
    wr_trig[3] = tick_d;
    wr_addr[0] = tick_addr;
    wr_addr[1] = tick_addr;
    wr_addr[2] = cal_mode ? ruler_pos : tick_addr;
    wr_addr[3] = tick_addr;
    wr_data[0] = 16'(adc0_d);
    wr_data[1] = 16'(adc1_d);
    wr_data[2] = adc2_d;
    wr_data[3] = ruler_pos[17:2];
  end

  for (genvar i = 0; i < 4; i++) begin : g_sram
    sram_flow #(.AW(18), .DW(16)) u_sram (
      .clk(clk), .rst_n(rst_n), .wr_trig(wr_trig[i]), .wr_addr(wr_addr[i]),
      .wr_data(wr_data[i]), .rd_en(sram_rd && sram_sel == 2'(i)), .rd_addr(addr_q[18:1]),
      .sram_a(sram_a[i]), .sram_ce_n(sram_ce_n[i]), .sram_we_n(sram_we_n[i]),
      .sram_oe_n(sram_oe_n[i]), .sram_dq_o(sram_dq_o[i]), .sram_dq_oe(sram_dq_oe[i])
    );
  end

  assign sram_rdata = sram_dq_i[sram_sel];

endmodule
