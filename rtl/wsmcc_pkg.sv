// wsmcc_pkg -- types and constants shared by the three FPGAs of the wire
// scanner motion control card.
//
// The card has one VME slave interface in the master FPGA. The master decodes
// the A16 control space and forwards accesses for the two slave FPGAs over an
// on-card local bus (lbus_t). The local bus carries the A16 offset (A0 = 0),
// the VME data, a write flag, a read flag that is high for the whole access
// and a one-cycle strobe in the cycle in which DTACK is asserted. The address
// windows (0x00-0x1F slave 1, 0x20-0x3F slave 2, 0x40-0x7F master) follow the
// card's VME map; the local bus signals themselves are this design's choice.
//
// The package also holds the slave-1 control register layout, the profile
// select codes and the common-anode 7-segment codes of the error characters.
package wsmcc_pkg;

  // Local bus from the master FPGA to one slave FPGA.
  typedef struct packed {
    logic        en;     // access falls in this FPGA's address window
    logic        rd;     // read access in progress
    logic        wr;     // write access in progress
    logic        stb;    // one-cycle transfer strobe (DTACK asserted)
    logic [7:0]  addr;   // A16 offset, bit 0 always 0
    logic [15:0] wdata;  // VME data lines
  } lbus_t;

  // Slave 1 control register (VME offset 0x18).
  typedef struct packed {
    logic       fg_addr_mode; // D7: restrict end address (profile 2 only)
    logic       home;         // D6: reset wire home mode
    logic       acq_gate;     // D5: acquisitions use the acquisition gate
    logic       scan_mode;    // D4: 0 normal, 1 calibration (ruler-triggered)
    logic [1:0] clks;         // D3-D2: acquisition clock source
    logic [1:0] func_mode;    // D1-D0: profile select
  } f2_ctrl_t;

  typedef enum logic [1:0] {
    FM_OFFSET = 2'b00,   // linear offset profile
    FM_FAST   = 2'b01,   // accelerated/decelerated fast scan profile
    FM_SLOW   = 2'b10,   // linear slow scan profile
    FM_NOP    = 2'b11    // no operation
  } func_mode_e;

  typedef enum logic [1:0] {
    CLKS_XTAL = 2'b00,   // 40 MHz crystal and acquisition divider
    CLKS_BOBR = 2'b01,   // 40 MHz from BOBR and acquisition divider
    CLKS_FREV = 2'b10,   // revolution frequency from BOBR
    CLKS_EXT  = 2'b11    // external clock
  } clks_e;

  // Source of the VME read data.
  typedef enum logic [2:0] {
    BUS_MASTER = 3'd0,
    BUS_F2     = 3'd1,
    BUS_F3     = 3'd2
  } bus_sel_e;

  // A16 offsets of slave 1.
  localparam logic [4:0] F2_FGDIV_LO = 5'h00, F2_FGDIV_HI = 5'h02,
                         F2_RULREF_LO = 5'h04, F2_RULREF_HI = 5'h06,
                         F2_RULERR_LO = 5'h08, F2_RULERR_HI = 5'h0A,
                         F2_CLR_UDC = 5'h0C, F2_ACQDIV = 5'h0E,
                         F2_CLR_MEM = 5'h10, F2_SET_FFF = 5'h12,
                         F2_FGROM = 5'h14, F2_FGEND = 5'h16, F2_CTRL = 5'h18,
                         F2_START = 5'h1A, F2_MRESET = 5'h1C, F2_RESET = 5'h1E;

  // Segment code for "no error": an underscore, only segment d lit.
  localparam logic [7:0] SEG_NONE = 8'hEF;

  // Character shown for error bit i, common anode, {a,b,c,d,e,f,g,dp},
  // 0 = segment lit: 0-9, A, b, C, d, E, F, I, J, L, M, n, o, P, r, t.
  function automatic logic [7:0] err_char(input logic [4:0] i);
    case (i)
      5'd0:  return 8'h03;  5'd1:  return 8'h9F;  5'd2:  return 8'h25;
      5'd3:  return 8'h0D;  5'd4:  return 8'h99;  5'd5:  return 8'h49;
      5'd6:  return 8'h41;  5'd7:  return 8'h1F;  5'd8:  return 8'h01;
      5'd9:  return 8'h09;  5'd10: return 8'h11;  5'd11: return 8'hC1;
      5'd12: return 8'h63;  5'd13: return 8'h85;  5'd14: return 8'h61;
      5'd15: return 8'h71;  5'd16: return 8'hF3;  5'd17: return 8'h87;
      5'd18: return 8'hE3;  5'd19: return 8'h57;  5'd20: return 8'hD5;
      5'd21: return 8'hC5;  5'd22: return 8'h31;  5'd23: return 8'hF5;
      5'd24: return 8'hE1;
      default: return SEG_NONE;
    endcase
  endfunction

endpackage
