// fpga3_slave2 -- slave FPGA 2: error surveillance.
//
// The comparator status lines (1 = fine) are held in the error register,
// read over VME through the control unit, shown on the 7-segment display,
// and any held error raises scan_inhibit towards the function generator.
// A write to 0x3E or the master reset clears the held errors. Structure and
// behaviour are the card's; the local bus wiring is this design's.
//
// Slave 2 has no data registers to write, so the local bus data lines are
// not used.
module fpga3_slave2
  import wsmcc_pkg::*;
#(
  parameter int unsigned N_ERR   = 25,
  parameter int unsigned CLK_HZ  = 40_000_000,
  parameter int unsigned STEP_MS = 500
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mrst,
  input  lbus_t            lbus,
  input  logic [N_ERR-1:0] errorlines,
  output logic [15:0]      rdata,
  output logic             scan_inhibit,
  output logic [7:0]       seg_n
);

  logic             areset_n, err_rst_n;
  logic [N_ERR-1:0] held;

  f3_control_unit #(.N_ERR(N_ERR)) u_cu (
    .sys_clk(clk), .rst_n(rst_n), .icu_rst(mrst), .icu_en(lbus.en),
    .icu_wr_n(!lbus.wr), .icu_rd(lbus.rd), .icu_stb(lbus.stb),
    .icu_addr(lbus.addr[4:0]), .errorlines(held), .databus(rdata),
    .areset_n(areset_n)
  );

  assign err_rst_n = rst_n && areset_n;

  error_register #(.N(N_ERR), .CLK_HZ(CLK_HZ), .SAMPLE_HZ(1000)) u_er (
    .clk(clk), .rst_n(err_rst_n), .err_in(errorlines), .q(held),
    .scan_inhibit(scan_inhibit)
  );

  sevenseg_display #(.N(N_ERR), .CLK_HZ(CLK_HZ), .STEP_MS(STEP_MS)) u_disp (
    .clk(clk), .rst_n(err_rst_n), .err(held), .seg_n(seg_n)
  );

endmodule
