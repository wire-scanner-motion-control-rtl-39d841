// tb_f3_control_unit -- checks the VME control unit of slave FPGA 2.
//
// Reads of offsets 0x00/0x02 (VME 0x20/0x22) return the low and high parts
// of the error word; other offsets and idle cycles read 0. A write strobe
// to 0x1E (VME 0x3E) or the master reset gives exactly one clock of
// areset_n low, one clock after the strobe; other writes do nothing.
module tb_f3_control_unit;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        icu_rst = 1'b0, en = 1'b0, wr_n = 1'b1, rd = 1'b0, stb = 1'b0;
  logic [4:0]  a = 5'd0;
  logic [24:0] errl = '1;
  logic [15:0] dbus;
  logic        areset_n;
  int checks = 0, failures = 0;
  int low_clocks = 0;

  f3_control_unit #(.N_ERR(25)) dut (
    .sys_clk(clk), .rst_n(rst_n), .icu_rst(icu_rst), .icu_en(en), .icu_wr_n(wr_n),
    .icu_rd(rd), .icu_stb(stb), .icu_addr(a), .errorlines(errl), .databus(dbus),
    .areset_n(areset_n)
  );

  always #5 clk = ~clk;
  always @(negedge clk) if (rst_n && !areset_n) low_clocks++;

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

  task automatic write(input logic [4:0] addr);
    @(negedge clk);
    en = 1'b1; wr_n = 1'b0; a = addr;
    repeat (3) @(negedge clk);
    stb = 1'b1;
    @(negedge clk);
    stb = 1'b0;
    @(negedge clk);
    en = 1'b0; wr_n = 1'b1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    low_clocks = 0;
    for (int k = 0; k < 50; k++) begin
      errl = 25'($urandom);
      @(negedge clk);
      en = 1'b1; rd = 1'b1; a = 5'h00;
      #1 check(dbus == errl[15:0], "read low word");
      a = 5'h02;
      #1 check(dbus == {7'd0, errl[24:16]}, "read high word");
      a = 5'(2 * ($urandom % 14) + 4);
      #1 check(dbus == 16'h0, "unused offset reads 0");
      en = 1'b0; a = 5'h00;
      #1 check(dbus == 16'h0, "not enabled reads 0");
      rd = 1'b0;
    end
    // writes to other offsets: no reset
    write(5'h00);
    write(5'h1C);
    repeat (3) @(negedge clk);
    check(low_clocks == 0, "no reset from other writes");
    // reset write: one low clock, right after the strobe
    fork
      write(5'h1E);
      begin
        @(negedge clk);
        wait (stb);
        @(negedge clk);
        check(!areset_n, "areset_n low the clock after the strobe");
        @(negedge clk);
        check(areset_n, "areset_n back high");
      end
    join
    check(low_clocks == 1, $sformatf("reset write gives %0d low clocks", low_clocks));
    // master reset
    @(negedge clk);
    icu_rst = 1'b1;
    @(negedge clk);
    icu_rst = 1'b0;
    check(!areset_n, "master reset");
    @(negedge clk);
    check(areset_n && low_clocks == 2, "master reset one clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
