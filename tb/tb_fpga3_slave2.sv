// tb_fpga3_slave2 -- checks slave FPGA 2 through its local bus.
//
// Runs with a 40 kHz clock (40 clocks per 1 ms error sample, 20,000 clocks
// per display step). Error lines going low are held, read over the bus at
// 0x20/0x22 (bus offsets 0x00/0x02), raise scan_inhibit and show on the
// display; a write to 0x3E clears them, as does the master reset.
module tb_fpga3_slave2;
  import wsmcc_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        mrst = 1'b0;
  lbus_t       lb;
  logic [24:0] errl = '1;
  logic [15:0] rdata;
  logic        scan_inhibit;
  logic [7:0]  seg_n;
  int checks = 0, failures = 0;

  fpga3_slave2 #(.N_ERR(25), .CLK_HZ(40_000), .STEP_MS(500)) dut (
    .clk(clk), .rst_n(rst_n), .mrst(mrst), .lbus(lb), .errorlines(errl), .rdata(rdata),
    .scan_inhibit(scan_inhibit), .seg_n(seg_n)
  );

  always #5 clk = ~clk;

  initial begin
    #5ms;
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

  task automatic bus(input bit wr, input logic [7:0] addr, output logic [15:0] d);
    @(negedge clk);
    lb = '0;
    lb.en = 1'b1; lb.wr = wr; lb.rd = !wr; lb.addr = addr & 8'h1F;
    repeat (3) @(negedge clk);
    lb.stb = 1'b1;
    d = rdata;
    @(negedge clk);
    lb = '0;
  endtask

  task automatic read_err(output logic [24:0] e);
    logic [15:0] lo, hi;
    bus(1'b0, 8'h20, lo);
    bus(1'b0, 8'h22, hi);
    e = {hi[8:0], lo};
  endtask

  initial begin
    logic [24:0] e;
    logic [15:0] d;
    lb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (100) @(negedge clk);
    read_err(e);
    check(e == '1 && !scan_inhibit && seg_n == SEG_NONE, "no errors after reset");
    // errors 4 and 17 (J) for 3 ms
    errl[4] = 1'b0;
    errl[17] = 1'b0;
    repeat (120) @(negedge clk);
    errl = '1;
    repeat (100) @(negedge clk);
    read_err(e);
    check(e == ~25'h0020010, $sformatf("held errors %h", e));
    check(scan_inhibit, "scan inhibit");
    check(seg_n == 8'h99 || seg_n == 8'h87, $sformatf("display %h", seg_n));
    // reset by write to 0x3E
    bus(1'b1, 8'h3E, d);
    repeat (5) @(negedge clk);
    read_err(e);
    check(e == '1 && !scan_inhibit && seg_n == SEG_NONE, "write 0x3E clears");
    // master reset
    errl[0] = 1'b0;
    repeat (120) @(negedge clk);
    errl[0] = 1'b1;
    check(scan_inhibit && seg_n == 8'h03, "error 0 held");
    @(negedge clk);
    mrst = 1'b1;
    @(negedge clk);
    mrst = 1'b0;
    repeat (3) @(negedge clk);
    check(!scan_inhibit && seg_n == SEG_NONE, "master reset clears");
    // writes elsewhere do not clear
    errl[24] = 1'b0;
    repeat (120) @(negedge clk);
    errl[24] = 1'b1;
    bus(1'b1, 8'h3C, d);
    bus(1'b1, 8'h20, d);
    repeat (5) @(negedge clk);
    read_err(e);
    check(e == ~25'h1000000 && seg_n == 8'hE1, "other writes keep errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
