// function_generator -- motion set-value generator (slave FPGA 1).
//
// A start command sets the active-scan flip-flop (unless the error handling
// inhibits scans). While the scan is active the clock divider ticks every
// div system clocks and the address counter steps through the profile ROM
// selected by func_mode; the ROM word goes to the motor DAC. When the counter
// reaches its end it changes direction and pulses scan_over, which resets the
// active-scan flip-flop; the next start runs the scan the other way. A motion
// reset also clears the flip-flop. During a function check read-out the ROM
// address is switched to the read-out counter. The end address is 0xFFF
// unless the address-restrict mode is set together with profile 2 (linear
// slow scan); then the programmed end address is used. The structure
// (divider, counter, set-reset flip-flop, three ROMs, address switch) is the
// card's; refusing a start while scan_inhibit is high is this design's
// reading of the scan-inhibit signal.
//
// Timing: ROM data follows the address by one clock; scan_over ends the scan
// one clock after the last step.
module function_generator
  import wsmcc_pkg::*;
#(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 12,
  parameter int unsigned DIVW = 18
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            motion_rst,
  input  logic            scan_inhibit,
  input  logic [DIVW-1:0] div,
  input  logic [1:0]      func_mode,
  input  logic            fg_addr_mode,
  input  logic [AW-1:0]   end_addr_reg,
  input  logic            set_max,
  input  logic            clr_addr,
  input  logic            rd_sel,
  input  logic [AW-1:0]   rd_addr,
  output logic [DW-1:0]   data,
  output logic [AW-1:0]   addr,
  output logic [AW-1:0]   end_addr,
  output logic            active_scan,
  output logic            busy,
  output logic            scan_over,
  output logic            dir_in
);

  logic          tick;
  logic [AW-1:0] rom_addr;

  assign end_addr = (fg_addr_mode && func_mode == FM_SLOW) ? end_addr_reg : '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      active_scan <= 1'b0;
    else if (motion_rst || scan_over) active_scan <= 1'b0;
    else if (start && !scan_inhibit) active_scan <= 1'b1;
  end

  assign busy = active_scan && (div > DIVW'(1));

  fgen_clk_div #(.W(DIVW)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (active_scan),
    .div  (div),
    .tick (tick)
  );

  fgen_addr_counter #(.AW(AW)) u_cnt (
    .clk      (clk),
    .rst_n    (rst_n),
    .tick     (tick && active_scan),
    .end_addr (end_addr),
    .set_max  (set_max),
    .clr      (clr_addr),
    .addr     (addr),
    .dir_in   (dir_in),
    .scan_over(scan_over)
  );

  assign rom_addr = rd_sel ? rd_addr : addr;

  profile_rom #(.AW(AW), .DW(DW)) u_rom (
    .clk      (clk),
    .addr     (rom_addr),
    .func_mode(func_mode),
    .data     (data)
  );

endmodule
