// wsmcc_top -- wire scanner motion control card (the three FPGAs together).
//
// The card moves a wire scanner through the beam along a stored motion
// profile and records where the wire was and what it measured. A VME64x
// crate controller programs the card over a simple A16/A24 slave interface,
// starts a scan and afterwards reads the acquired samples from four SRAMs.
//
//   fpga1_master  VME slave, master registers, DACs, ADC and SRAM data flow
//   fpga2_slave1  function generator (profile ROMs -> motor DAC), function
//                 check, optical ruler decoder, acquisition clock
//   fpga3_slave2  error register, scan inhibit, 7-segment error display
//
// The master forwards A16 accesses in 0x00-0x1F and 0x20-0x3F to the slaves
// over a local bus (see wsmcc_pkg); the read data of the addressed FPGA is
// put on the VME data lines. The acquisition tick of slave 1 starts the ADC
// conversions in the master, and the scan inhibit of slave 2 blocks scan
// starts in slave 1. VME data is modelled as separate in/out buses with an
// output enable; on the card the bus transceivers sit outside the FPGAs.
// The partition follows the card; the local bus is this design's.
//
// All logic runs on one 40 MHz clock. CLK_HZ and STEP_MS only set the error
// sampling (1 kHz) and display step (0.5 s) time bases.
module wsmcc_top
  import wsmcc_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 40_000_000,
  parameter int unsigned STEP_MS     = 500,
  parameter int unsigned LED_BITS    = 22,
  parameter int unsigned N_ERR       = 25
) (
  input  logic             clk,
  input  logic             sysreset_n,
  // VME
  input  logic [23:1]      vme_a,
  input  logic [5:0]       vme_am,
  input  logic             vme_as_n,
  input  logic [1:0]       vme_ds_n,
  input  logic             vme_write_n,
  input  logic [15:0]      vme_d_i,
  output logic [15:0]      vme_d_o,
  output logic             vme_d_oe,
  output logic             vme_dtack,
  input  logic [3:0]       ga_n,
  output logic             access_led,
  // ADC0 AD7938 (diagnostics)
  input  logic             adc0_busy,
  input  logic [11:0]      adc0_d,
  output logic             adc0_convst_n,
  output logic             adc0_cs_n,
  output logic             adc0_wr_n,
  // ADC1 AD7484 (log amplifier)
  input  logic             adc1_busy_n,
  input  logic [14:0]      adc1_d,
  output logic             adc1_convst_n,
  output logic             adc1_cs_n,
  output logic             adc1_wr_n,
  // ADC2 AD7677 (potentiometer)
  input  logic             adc2_busy,
  input  logic [15:0]      adc2_d,
  output logic             adc2_convst_n,
  output logic             adc2_cs_n,
  // SRAMs
  output logic [17:0]      sram_a     [4],
  output logic [3:0]       sram_ce_n,
  output logic [3:0]       sram_we_n,
  output logic [3:0]       sram_oe_n,
  output logic [15:0]      sram_dq_o  [4],
  output logic [3:0]       sram_dq_oe,
  input  logic [15:0]      sram_dq_i  [4],
  // DACs and board registers
  output logic [11:0]      fgen_dac,
  output logic [11:0]      dac [4],
  output logic [3:0]       relay,
  output logic [15:0]      io_reg,
  output logic [7:0]       switch_reg,
  // optical ruler and timing
  input  logic             or_phase_a,
  input  logic             or_phase_b,
  input  logic             or_ref,
  input  logic             frev,
  input  logic             ext_clk,
  input  logic             acq_gate,
  input  logic             eos_switch,
  input  logic             wire_home,
  input  logic             bobr_clk_ok,
  input  logic             frev_ok,
  input  logic             ext_clk_ok,
  output logic             active_scan,
  output logic             motion_reset,
  output logic             home_mode,
  // error surveillance
  input  logic [N_ERR-1:0] errorlines,
  output logic             scan_inhibit,
  output logic [7:0]       seg_n
);

  lbus_t       lbus2, lbus3;
  logic        mrst, acq_tick, cal_mode;
  logic [17:0] ruler_pos;
  logic [15:0] m_rdata, f2_rdata, f3_rdata;
  bus_sel_e    bus_sel;

  fpga1_master #(.LED_BITS(LED_BITS)) u_master (
    .clk(clk), .rst_n(sysreset_n),
    .vme_a(vme_a), .vme_am(vme_am), .vme_as_n(vme_as_n), .vme_ds_n(vme_ds_n),
    .vme_write_n(vme_write_n), .vme_d_i(vme_d_i), .ga_n(ga_n),
    .vme_dtack(vme_dtack), .vme_d_oe(vme_d_oe), .m_rdata(m_rdata), .bus_sel(bus_sel),
    .led(access_led), .lbus2(lbus2), .lbus3(lbus3), .mrst(mrst),
    .acq_tick(acq_tick), .cal_mode(cal_mode), .ruler_pos(ruler_pos),
    .adc0_busy(adc0_busy), .adc0_d(adc0_d), .adc0_convst_n(adc0_convst_n),
    .adc0_cs_n(adc0_cs_n), .adc0_wr_n(adc0_wr_n),
    .adc1_busy_n(adc1_busy_n), .adc1_d(adc1_d), .adc1_convst_n(adc1_convst_n),
    .adc1_cs_n(adc1_cs_n), .adc1_wr_n(adc1_wr_n),
    .adc2_busy(adc2_busy), .adc2_d(adc2_d), .adc2_convst_n(adc2_convst_n),
    .adc2_cs_n(adc2_cs_n),
    .sram_a(sram_a), .sram_ce_n(sram_ce_n), .sram_we_n(sram_we_n), .sram_oe_n(sram_oe_n),
    .sram_dq_o(sram_dq_o), .sram_dq_oe(sram_dq_oe), .sram_dq_i(sram_dq_i),
    .relay(relay), .io_reg(io_reg), .switch_reg(switch_reg), .dac(dac)
  );

  fpga2_slave1 #(.FG_AW(12), .FG_DW(12)) u_slave1 (
    .clk(clk), .rst_n(sysreset_n), .mrst(mrst), .lbus(lbus2), .rdata(f2_rdata),
    .scan_inhibit(scan_inhibit),
    .or_phase_a(or_phase_a), .or_phase_b(or_phase_b), .or_ref(or_ref),
    .frev(frev), .ext_clk(ext_clk), .acq_gate(acq_gate), .eos_switch(eos_switch),
    .wire_home(wire_home), .bobr_clk_ok(bobr_clk_ok), .frev_ok(frev_ok),
    .ext_clk_ok(ext_clk_ok),
    .fgen_data(fgen_dac), .active_scan(active_scan), .motion_reset(motion_reset),
    .home_mode(home_mode), .acq_tick(acq_tick), .cal_mode(cal_mode), .ruler_pos(ruler_pos)
  );

  fpga3_slave2 #(.N_ERR(N_ERR), .CLK_HZ(CLK_HZ), .STEP_MS(STEP_MS)) u_slave2 (
    .clk(clk), .rst_n(sysreset_n), .mrst(mrst), .lbus(lbus3), .errorlines(errorlines),
    .rdata(f3_rdata), .scan_inhibit(scan_inhibit), .seg_n(seg_n)
  );

  always_comb begin
    unique case (bus_sel)
      BUS_F2:  vme_d_o = f2_rdata;
      BUS_F3:  vme_d_o = f3_rdata;
      default: vme_d_o = m_rdata;
    endcase
  end

endmodule
