// f2_control_unit -- VME control unit of slave FPGA 1.
//
// Enabled by the master for A16 offsets 0x00-0x1F, it decodes A[4:1] with the
// same map as the VME space:
//   write 0x00/0x02  FGEN clock division value, low 16 / high 2 bits
//         0x04/0x08/0x0C  clear ruler reference / error counter / position
//         0x0E  acquisition clock division value (16 bits)
//         0x10  clear memory (read-out) address counter
//         0x12  set FGEN address to 0xFFF      0x14  clear FGEN address
//         0x16  FGEN end address (12 bits)      0x18  control register (8)
//         0x1A  start motion   0x1C  motion reset   0x1E  FPGA reset
//   read  0x00/0x02 division value, 0x04/0x06 ruler reference, 0x08/0x0A
//         ruler errors, 0x0E acquisition division, 0x12 status buffer
//         (10 bits), 0x14 profile ROM word (read-out counter advances per
//         read), 0x16 end address, 0x18 control register.
// Register writes and command strobes happen in the local-bus strobe cycle
// (when DTACK is given). The map is the card's; reset values (division 0 =
// stopped, end address 0xFFF, control 0), one-cycle commands, and clearing
// the read-out counter also on a write to 0x14 (the function check section
// asks for a clear at 0x14, the map lists it at 0x10) are this design's.
//
// The ruler mux select and high-word flag are driven from the address while
// a ruler register is read; otherwise the mux shows the position counter,
// which is what is stored in the ruler SRAM.
//
// Ruler bits 17-16 reach the bus through uword (moved to bits 1-0), so
// ruler_data[17:16] is not read here.
module f2_control_unit
  import wsmcc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  lbus_t       lbus,
  input  logic [17:0] ruler_data,
  input  logic [9:0]  status,
  input  logic [15:0] fg_rdata,
  output logic [17:0] fg_div,
  output logic [15:0] acq_div,
  output logic [11:0] fg_end,
  output f2_ctrl_t    ctrl,
  output logic        clr_ref,
  output logic        clr_err,
  output logic        clr_udc,
  output logic        clr_mem,
  output logic        set_fff,
  output logic        clr_fgaddr,
  output logic        start,
  output logic        motion_rst,
  output logic        f2_rst,
  output logic [1:0]  or_mux_sel,
  output logic        uword,
  output logic        fg_oe,
  output logic [15:0] rdata
);

  logic [4:0] a;
  logic       wstb, rd;

  assign a    = lbus.addr[4:0];
  assign wstb = lbus.en && lbus.wr && lbus.stb;
  assign rd   = lbus.en && lbus.rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fg_div  <= '0;
      acq_div <= '0;
      fg_end  <= '1;
      ctrl    <= '0;
    end else if (wstb) begin
      case (a)
        F2_FGDIV_LO: fg_div[15:0]  <= lbus.wdata;
        F2_FGDIV_HI: fg_div[17:16] <= lbus.wdata[1:0];
        F2_ACQDIV:   acq_div       <= lbus.wdata;
        F2_FGEND:    fg_end        <= lbus.wdata[11:0];
        F2_CTRL:     ctrl          <= f2_ctrl_t'(lbus.wdata[7:0]);
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {clr_ref, clr_err, clr_udc, clr_mem, set_fff, clr_fgaddr, start, motion_rst, f2_rst} <= '0;
    end else begin
      clr_ref    <= wstb && a == F2_RULREF_LO;
      clr_err    <= wstb && a == F2_RULERR_LO;
      clr_udc    <= wstb && a == F2_CLR_UDC;
      clr_mem    <= wstb && (a == F2_CLR_MEM || a == F2_FGROM);
      set_fff    <= wstb && a == F2_SET_FFF;
      clr_fgaddr <= wstb && a == F2_FGROM;
      start      <= wstb && a == F2_START;
      motion_rst <= wstb && a == F2_MRESET;
      f2_rst     <= wstb && a == F2_RESET;
    end
  end

  always_comb begin
    or_mux_sel = 2'b00;
    uword      = 1'b0;
    if (rd) begin
      unique case (a)
        F2_RULREF_LO: or_mux_sel = 2'b01;
        F2_RULREF_HI: begin or_mux_sel = 2'b01; uword = 1'b1; end
        F2_RULERR_LO: or_mux_sel = 2'b10;
        F2_RULERR_HI: begin or_mux_sel = 2'b10; uword = 1'b1; end
        default: ;
      endcase
    end
  end

  assign fg_oe = rd && a == F2_FGROM;

  always_comb begin
    rdata = 16'h0000;
    if (rd) begin
      case (a)
        F2_FGDIV_LO:  rdata = fg_div[15:0];
        F2_FGDIV_HI:  rdata = 16'(fg_div[17:16]);
        F2_RULREF_LO, F2_RULREF_HI, F2_RULERR_LO, F2_RULERR_HI:
                      rdata = ruler_data[15:0];
        F2_ACQDIV:    rdata = acq_div;
        F2_SET_FFF:   rdata = 16'(status);
        F2_FGROM:     rdata = fg_rdata;
        F2_FGEND:     rdata = 16'(fg_end);
        F2_CTRL:      rdata = 16'(ctrl);
        default:      rdata = 16'h0000;
      endcase
    end
  end

endmodule
