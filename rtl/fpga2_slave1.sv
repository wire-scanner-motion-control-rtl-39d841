// fpga2_slave1 -- slave FPGA 1: motion function generation and ruler
// acquisition.
//
// Contains the control unit (register map 0x00-0x1F), the function generator
// driving the motor DAC, the function check read-out, the optical ruler
// quadrature decoder and the acquisition clock generator. The status buffer
// (read at 0x12) reports: D0 scan active, D1 function generator busy, D2
// address at 0, D3 address at end, D4 end-of-stroke switch, D5 wire reset
// home, D6 40 MHz from BOBR present, D7 Frev present, D8 external clock
// present, D9 acquisition gate. D4-D8 come from input pins. The partition
// and the register map are the card's; the status pins and reset wiring
// (a write to 0x1E or the master reset resets everything except the
// control unit's registers) are this design's.
//
// Outputs to the master: the acquisition tick, the calibration-mode flag and
// the ruler position (for the ruler SRAM and for addressing the potentiometer
// SRAM during calibration).
//
// The generator's scan_over and direction outputs are not used at this
// level: the status buffer reports the scan, busy and address-limit flags.
module fpga2_slave1
  import wsmcc_pkg::*;
#(
  parameter int unsigned FG_AW = 12,
  parameter int unsigned FG_DW = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mrst,
  input  lbus_t            lbus,
  output logic [15:0]      rdata,
  input  logic             scan_inhibit,
  // optical ruler
  input  logic             or_phase_a,
  input  logic             or_phase_b,
  input  logic             or_ref,
  // clocks and board status
  input  logic             frev,
  input  logic             ext_clk,
  input  logic             acq_gate,
  input  logic             eos_switch,
  input  logic             wire_home,
  input  logic             bobr_clk_ok,
  input  logic             frev_ok,
  input  logic             ext_clk_ok,
  // motion
  output logic [FG_DW-1:0] fgen_data,
  output logic             active_scan,
  output logic             motion_reset,
  output logic             home_mode,
  // to the master
  output logic             acq_tick,
  output logic             cal_mode,
  output logic [17:0]      ruler_pos
);

  logic [17:0] fg_div;
  logic [15:0] acq_div;
  logic [11:0] fg_end;
  f2_ctrl_t    ctrl;
  logic clr_ref, clr_err, clr_udc, clr_mem, set_fff, clr_fgaddr, start, f2_rst;
  logic [1:0]  or_mux_sel;
  logic        uword, fg_oe, qd_clk, gate_sync;
  logic [17:0] ruler_data;
  logic [15:0] fg_rdata;
  logic [FG_AW-1:0] rd_addr, fg_addr, end_addr;
  logic        rd_sel, busy, scan_over, dir_in;
  logic [9:0]  status;
  logic        srst_n;

  // The FPGA reset command and the master reset clear the working logic.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) srst_n <= 1'b0;
    else        srst_n <= !(f2_rst || mrst);
  end

  f2_control_unit u_cu (
    .clk(clk), .rst_n(rst_n), .lbus(lbus),
    .ruler_data(ruler_data), .status(status), .fg_rdata(fg_rdata),
    .fg_div(fg_div), .acq_div(acq_div), .fg_end(fg_end), .ctrl(ctrl),
    .clr_ref(clr_ref), .clr_err(clr_err), .clr_udc(clr_udc), .clr_mem(clr_mem),
    .set_fff(set_fff), .clr_fgaddr(clr_fgaddr), .start(start),
    .motion_rst(motion_reset), .f2_rst(f2_rst),
    .or_mux_sel(or_mux_sel), .uword(uword), .fg_oe(fg_oe), .rdata(rdata)
  );

  function_generator #(.AW(FG_AW), .DW(FG_DW), .DIVW(18)) u_fg (
    .clk(clk), .rst_n(srst_n), .start(start), .motion_rst(motion_reset),
    .scan_inhibit(scan_inhibit), .div(fg_div), .func_mode(ctrl.func_mode),
    .fg_addr_mode(ctrl.fg_addr_mode), .end_addr_reg(FG_AW'(fg_end)),
    .set_max(set_fff), .clr_addr(clr_fgaddr), .rd_sel(rd_sel), .rd_addr(rd_addr),
    .data(fgen_data), .addr(fg_addr), .end_addr(end_addr),
    .active_scan(active_scan), .busy(busy), .scan_over(scan_over), .dir_in(dir_in)
  );

  fg_readout #(.AW(FG_AW), .DW(FG_DW)) u_rdo (
    .clk(clk), .rst_n(srst_n), .oe(fg_oe), .clr(clr_mem), .rom_data(fgen_data),
    .rd_addr(rd_addr), .sel_rd(rd_sel), .rdata(fg_rdata)
  );

  orqdmux #(.W(18)) u_qd (
    .sys_clk(clk), .areset_n(srst_n), .or_ref(or_ref),
    .or_phase_a(or_phase_a), .or_phase_b(or_phase_b),
    .or_mux_en(1'b1), .or_mux_sel(or_mux_sel),
    .or_clr_udc(clr_udc), .or_clr_ref(clr_ref), .or_clr_err(clr_err),
    .uword(uword), .data_out(ruler_data), .position(ruler_pos), .qd_clk(qd_clk)
  );

  acq_clock_gen #(.W(16)) u_acq (
    .clk(clk), .rst_n(srst_n), .active_scan(active_scan), .clks(ctrl.clks),
    .scan_mode(ctrl.scan_mode), .acq_gate_en(ctrl.acq_gate), .div(acq_div),
    .frev(frev), .ext_clk(ext_clk), .qd_clk(qd_clk), .acq_gate(acq_gate),
    .tick(acq_tick), .gate_sync(gate_sync)
  );

  assign status = {gate_sync, ext_clk_ok, frev_ok, bobr_clk_ok, wire_home,
                   eos_switch, (fg_addr == end_addr), (fg_addr == '0),
                   busy, active_scan};

  assign cal_mode  = ctrl.scan_mode;
  assign home_mode = ctrl.home;

endmodule
