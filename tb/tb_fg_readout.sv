// tb_fg_readout -- checks the VME read-back of the profile ROM.
//
// While a read is active the ROM word is put on the 16-bit read bus (upper
// bits 0) and the read counter is selected as ROM address; at the end of each
// read the counter advances by one, so consecutive reads return consecutive
// words (a FIFO-like read-out). Clear sets the counter back to 0.
module tb_fg_readout;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        oe = 1'b0;
  logic        clr = 1'b0;
  logic [11:0] rom_data = 12'h000;
  logic [11:0] rd_addr;
  logic        sel_rd;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  fg_readout #(.AW(12), .DW(12)) dut (
    .clk(clk), .rst_n(rst_n), .oe(oe), .clr(clr), .rom_data(rom_data),
    .rd_addr(rd_addr), .sel_rd(sel_rd), .rdata(rdata)
  );

  always #5 clk = ~clk;

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic vme_read(input int len, output logic [15:0] d);
    logic [11:0] a0;
    @(negedge clk);
    a0 = rd_addr;
    oe = 1'b1;
    rom_data = 12'($urandom);
    repeat (len) @(negedge clk);
    check(sel_rd, "read counter not selected during read");
    check(rd_addr == a0, "read counter must not move during a read");
    check(rdata == {4'h0, rom_data}, $sformatf("rdata %h rom %h", rdata, rom_data));
    d = rdata;
    oe = 1'b0;
    @(negedge clk);
    check(rdata == 16'h0000 && !sel_rd, "bus not released");
  endtask

  initial begin
    logic [15:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(rd_addr == 12'd0, "reset address");
    for (int i = 0; i < 300; i++) begin
      check(rd_addr == 12'(i), $sformatf("address %0d before read %0d", rd_addr, i));
      vme_read(1 + ($urandom % 6), d);
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(rd_addr == 12'd0, "clear");
    vme_read(3, d);
    check(rd_addr == 12'd1, "advance after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
