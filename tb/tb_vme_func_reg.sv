// tb_vme_func_reg -- checks the master FPGA's memory map.
//
// Accesses are driven at the decoder's inputs (chip select, control flag,
// address, write, xfer). Checked: read-back of the relay (4 bits), I/O bytes,
// switch (8 bits), SRAM select (2 bits) and DAC registers (12 bits, reset
// mid-scale 0x800); the version register; one-clock pulses for clear
// acquisition address (0x40) and master reset (0xFE); routing of 0x00-0x1F
// and 0x20-0x3F to the slave FPGAs; ADC reads starting one conversion at the
// start of the access and returning the ADC result; ADC writes; A24 reads
// returning SRAM data.
module tb_vme_func_reg;
  import wsmcc_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        cs = 1'b0, ctrl_n = 1'b0, write = 1'b0, xfer = 1'b0;
  logic [23:0] addr = '0;
  logic [15:0] wdata = '0;
  logic [15:0] adc_data [3];
  logic [15:0] sram_rdata = '0;
  logic        f2_en, f3_en, sram_rd, clr_acq, mrst;
  logic [2:0]  adc_rd_req, adc_sel, adc_wr;
  logic [3:0]  relay;
  logic [15:0] io_reg;
  logic [7:0]  switch_reg;
  logic [1:0]  sram_sel;
  logic [11:0] dac [4];
  logic [15:0] rdata;
  bus_sel_e    bus_sel;
  int checks = 0, failures = 0;
  int n_clr = 0, n_mrst = 0;
  int n_req [3];
  int n_wr [3];

  vme_func_reg #(.VERSION(8'h11)) dut (
    .clk(clk), .rst_n(rst_n), .cs(cs), .ctrl_n(ctrl_n), .addr(addr), .write(write),
    .xfer(xfer), .wdata(wdata), .adc_data(adc_data), .sram_rdata(sram_rdata),
    .f2_en(f2_en), .f3_en(f3_en), .sram_rd(sram_rd), .adc_rd_req(adc_rd_req),
    .adc_sel(adc_sel), .adc_wr(adc_wr), .clr_acq(clr_acq), .mrst(mrst), .relay(relay),
    .io_reg(io_reg), .switch_reg(switch_reg), .sram_sel(sram_sel), .dac(dac),
    .rdata(rdata), .bus_sel(bus_sel)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (clr_acq) n_clr++;
    if (mrst) n_mrst++;
    for (int i = 0; i < 3; i++) begin
      if (adc_rd_req[i]) n_req[i]++;
      if (adc_wr[i]) n_wr[i]++;
    end
  end

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // Access: chip select for 6 clocks, xfer in the 5th, read data sampled there.
  task automatic access(input bit a24, input logic [23:0] a, input bit wr,
                        input logic [15:0] wd, output logic [15:0] rd);
    @(negedge clk);
    ctrl_n = a24; addr = a; write = wr; wdata = wd; cs = 1'b1;
    repeat (4) @(negedge clk);
    xfer = 1'b1;
    rd = rdata;
    @(negedge clk);
    xfer = 1'b0;
    @(negedge clk);
    cs = 1'b0;
    @(negedge clk);
  endtask

  task automatic wr16(input logic [7:0] a, input logic [15:0] d);
    logic [15:0] r;
    access(1'b0, {16'h5000, a}, 1'b1, d, r);
  endtask

  task automatic rd16(input logic [7:0] a, output logic [15:0] r);
    access(1'b0, {16'h5000, a}, 1'b0, 16'h0, r);
  endtask

  initial begin
    logic [15:0] r;
    foreach (n_req[i]) begin n_req[i] = 0; n_wr[i] = 0; end
    foreach (adc_data[i]) adc_data[i] = 16'h0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) check(dac[i] == 12'h800, "DAC reset mid-scale");
    rd16(8'h4C, r);
    check(r == 16'h0011, $sformatf("version %h", r));
    for (int k = 0; k < 10; k++) begin
      logic [15:0] v [9];
      foreach (v[i]) v[i] = 16'($urandom);
      wr16(8'h42, v[0]); wr16(8'h44, v[1]); wr16(8'h46, v[2]); wr16(8'h48, v[3]);
      wr16(8'h4A, v[4]);
      for (int i = 0; i < 4; i++) wr16(8'h80 + 8'(2 * i), v[5 + i]);
      check(relay == v[0][3:0] && io_reg == {v[2][7:0], v[1][7:0]} &&
            switch_reg == v[3][7:0] && sram_sel == v[4][1:0], "register outputs");
      for (int i = 0; i < 4; i++) check(dac[i] == v[5 + i][11:0], "DAC output");
      rd16(8'h42, r); check(r == {12'h0, v[0][3:0]}, "relay read");
      rd16(8'h44, r); check(r == {8'h0, v[1][7:0]}, "I/O low read");
      rd16(8'h46, r); check(r == {8'h0, v[2][7:0]}, "I/O high read");
      rd16(8'h48, r); check(r == {8'h0, v[3][7:0]}, "switch read");
      rd16(8'h4A, r); check(r == {14'h0, v[4][1:0]}, "SRAM select read");
      for (int i = 0; i < 4; i++) begin
        rd16(8'h80 + 8'(2 * i), r);
        check(r == {4'h0, v[5 + i][11:0]}, "DAC read");
      end
    end
    // command pulses
    wr16(8'h40, 16'h0);
    wr16(8'hFE, 16'h0);
    wr16(8'h40, 16'h0);
    check(n_clr == 2 && n_mrst == 1, $sformatf("clear %0d, master reset %0d", n_clr, n_mrst));
    rd16(8'h40, r);
    check(n_clr == 2, "read does not clear");
    // slave windows
    for (int k = 0; k < 20; k++) begin
      logic [7:0] a;
      a = 8'(($urandom % 128) * 2);
      @(negedge clk);
      ctrl_n = 1'b0; addr = {16'h5000, a}; write = 1'b0; cs = 1'b1;
      #1;
      check(f2_en == (a < 8'h20) && f3_en == (a >= 8'h20 && a < 8'h40),
            $sformatf("window of %h", a));
      check(bus_sel == ((a < 8'h20) ? BUS_F2 : (a < 8'h40) ? BUS_F3 : BUS_MASTER),
            "read data source");
      @(negedge clk);
      cs = 1'b0;
    end
    check(!f2_en && !f3_en, "windows need chip select");
    // ADC reads and writes
    foreach (n_req[i]) begin n_req[i] = 0; n_wr[i] = 0; end
    for (int i = 0; i < 3; i++) begin
      adc_data[i] = 16'($urandom);
      rd16(8'h90 + 8'(2 * i), r);
      check(r == adc_data[i] && n_req[i] == 1, $sformatf("ADC%0d read, %0d requests", i,
                                                          n_req[i]));
      wr16(8'h90 + 8'(2 * i), 16'h1234);
      check(n_wr[i] == 1 && n_req[i] == 1, $sformatf("ADC%0d write", i));
    end
    // A24 read of SRAM data
    sram_rdata = 16'hBEEF;
    access(1'b1, 24'h5ABCDE, 1'b0, 16'h0, r);
    check(r == 16'hBEEF, "A24 read returns SRAM data");
    @(negedge clk);
    ctrl_n = 1'b1; addr = 24'h500000; write = 1'b0; cs = 1'b1;
    #1 check(sram_rd && !f2_en && !f3_en, "A24 read selects SRAM");
    write = 1'b1;
    #1 check(!sram_rd, "A24 writes do not read SRAM");
    cs = 1'b0;
    // A24 writes do not touch A16 registers
    wr16(8'h42, 16'h0005);
    access(1'b1, 24'h500042, 1'b1, 16'h000F, r);
    check(relay == 4'h5, "A24 write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
