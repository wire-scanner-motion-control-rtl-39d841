// sram_model -- behavioural model of a 256K x 16 asynchronous SRAM for the
// testbenches. A write takes place while CE_N and WE_N are both low (the
// data at the end of the write is kept); a read drives the addressed word
// while CE_N and OE_N are low and WE_N is high, otherwise 0. It counts
// writes and flags a write whose address or data changed while CE_N was
// low, and bus contention (FPGA driving while the SRAM outputs).
module sram_model #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] a,
  input  logic          ce_n,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic [15:0]   dq_i,
  input  logic          dq_oe,
  output logic [15:0]   dq_o
);
  logic [15:0] mem [2**AW];
  int          writes = 0;
  int          violations = 0;
  logic        wr_d = 1'b0;
  logic [AW-1:0] a_d = '0;
  logic [15:0]   dq_d = '0;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 16'h0;

  assign dq_o = (!ce_n && !oe_n && we_n) ? mem[a] : 16'h0;

  always @(posedge clk) begin
    logic wr;
    wr = !ce_n && !we_n;
    if (wr) begin
      mem[a] <= dq_i;
      if (wr_d && (a != a_d || dq_i != dq_d)) violations <= violations + 1;
      if (!dq_oe) violations <= violations + 1;
    end
    if (wr && !wr_d) writes <= writes + 1;
    if (!ce_n && !oe_n && we_n && dq_oe) violations <= violations + 1;
    wr_d <= wr;
    a_d  <= a;
    dq_d <= dq_i;
  end
endmodule
