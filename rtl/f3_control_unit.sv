// f3_control_unit -- VME control unit of slave FPGA 2.
//
// Enabled by the master for A16 offsets 0x20-0x3F; icu_addr is the offset
// within that window (A[4:1], A0 = 0). Reading 0x20 returns error bits 15-0,
// reading 0x22 returns error bits 24-16; a write to 0x3E gives a one-clock
// low pulse on areset_n that resets the error register (and so the display
// and the scan inhibit). The master reset (icu_rst) does the same. The map
// is the card's; the reset address 0x3E (the text also names 0x3F, which is
// not reachable with A0 = 0) and the 25-bit error width (the block symbol
// shows 24 lines, the error list has 25) are this design's reading.
//
// databus is 0 when the unit is not being read.
module f3_control_unit #(
  parameter int unsigned N_ERR = 25
) (
  input  logic             sys_clk,
  input  logic             rst_n,
  input  logic             icu_rst,
  input  logic             icu_en,
  input  logic             icu_wr_n,
  input  logic             icu_rd,
  input  logic             icu_stb,
  input  logic [4:0]       icu_addr,
  input  logic [N_ERR-1:0] errorlines,
  output logic [15:0]      databus,
  output logic             areset_n
);

  logic [31:0] err32;
  assign err32 = 32'(errorlines);

  always_comb begin
    databus = 16'h0000;
    if (icu_en && icu_rd) begin
      case (icu_addr)
        5'h00:   databus = err32[15:0];
        5'h02:   databus = err32[31:16];
        default: databus = 16'h0000;
      endcase
    end
  end

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) areset_n <= 1'b0;
    else        areset_n <= !(icu_rst || (icu_en && !icu_wr_n && icu_stb && icu_addr == 5'h1E));
  end

endmodule
