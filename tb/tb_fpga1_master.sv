// tb_fpga1_master -- checks the master FPGA with model ADCs and SRAMs.
//
// A model VME master runs A16 single cycles, A24 single cycles and an A24
// block transfer. Checked: master registers and DTACK timing; forwarding of
// slave accesses on the two local buses with the right enable, address,
// data and strobe; acquisition - after clearing the address counter, each
// acquisition tick converts all three ADCs and writes sample k of every ADC
// and the ruler position to address k of the four SRAMs; calibration mode -
// the potentiometer sample goes to the address given by the ruler position;
// read-out of every SRAM through A24 reads and a block transfer; a VME read
// of an ADC starts a conversion and DTACK waits for its result; master reset.
module tb_fpga1_master;
  import wsmcc_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [23:1] vme_a = '0;
  logic [5:0]  vme_am = '0;
  logic        as_n = 1'b1;
  logic [1:0]  ds_n = 2'b11;
  logic        write_n = 1'b1;
  logic [15:0] vme_d_i = '0;
  logic [3:0]  ga_n = 4'hC;          // slot 3
  logic        dtack, d_oe, led, mrst;
  logic [15:0] m_rdata;
  bus_sel_e    bus_sel;
  lbus_t       lbus2, lbus3;
  logic        acq_tick = 1'b0, cal_mode = 1'b0;
  logic [17:0] ruler_pos = '0;
  logic        adc0_busy, adc1_busy_n, adc2_busy;
  logic [11:0] adc0_d;
  logic [14:0] adc1_d;
  logic [15:0] adc2_d;
  logic        adc0_convst_n, adc0_cs_n, adc0_wr_n;
  logic        adc1_convst_n, adc1_cs_n, adc1_wr_n;
  logic        adc2_convst_n, adc2_cs_n;
  logic [17:0] sram_a [4];
  logic [3:0]  sram_ce_n, sram_we_n, sram_oe_n, sram_dq_oe;
  logic [15:0] sram_dq_o [4];
  logic [15:0] sram_dq_i [4];
  logic [3:0]  relay;
  logic [15:0] io_reg;
  logic [7:0]  switch_reg;
  logic [11:0] dac [4];
  int checks = 0, failures = 0;
  int n_mrst = 0;

  localparam logic [3:0] SLOT = 4'h3;

  fpga1_master #(.LED_BITS(22)) dut (
    .clk(clk), .rst_n(rst_n), .vme_a(vme_a), .vme_am(vme_am), .vme_as_n(as_n),
    .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_d_i(vme_d_i), .ga_n(ga_n),
    .vme_dtack(dtack), .vme_d_oe(d_oe), .m_rdata(m_rdata), .bus_sel(bus_sel), .led(led),
    .lbus2(lbus2), .lbus3(lbus3), .mrst(mrst), .acq_tick(acq_tick), .cal_mode(cal_mode),
    .ruler_pos(ruler_pos),
    .adc0_busy(adc0_busy), .adc0_d(adc0_d), .adc0_convst_n(adc0_convst_n),
    .adc0_cs_n(adc0_cs_n), .adc0_wr_n(adc0_wr_n),
    .adc1_busy_n(adc1_busy_n), .adc1_d(adc1_d), .adc1_convst_n(adc1_convst_n),
    .adc1_cs_n(adc1_cs_n), .adc1_wr_n(adc1_wr_n),
    .adc2_busy(adc2_busy), .adc2_d(adc2_d), .adc2_convst_n(adc2_convst_n),
    .adc2_cs_n(adc2_cs_n),
    .sram_a(sram_a), .sram_ce_n(sram_ce_n), .sram_we_n(sram_we_n), .sram_oe_n(sram_oe_n),
    .sram_dq_o(sram_dq_o), .sram_dq_oe(sram_dq_oe), .sram_dq_i(sram_dq_i),
    .relay(relay), .io_reg(io_reg), .switch_reg(switch_reg), .dac(dac)
  );

  adc_model #(.DW(12), .LAT(2), .CONV(24), .BUSY_LOW(1'b0), .SEED(11)) adc0 (
    .clk(clk), .convst_n(adc0_convst_n), .cs_n(adc0_cs_n), .busy(adc0_busy), .d(adc0_d));
  adc_model #(.DW(15), .LAT(1), .CONV(10), .BUSY_LOW(1'b1), .SEED(22)) adc1 (
    .clk(clk), .convst_n(adc1_convst_n), .cs_n(adc1_cs_n), .busy(adc1_busy_n), .d(adc1_d));
  adc_model #(.DW(16), .LAT(1), .CONV(30), .BUSY_LOW(1'b0), .SEED(33)) adc2 (
    .clk(clk), .convst_n(adc2_convst_n), .cs_n(adc2_cs_n), .busy(adc2_busy), .d(adc2_d));

  for (genvar i = 0; i < 4; i++) begin : g_mem
    sram_model #(.AW(18)) mem (
      .clk(clk), .a(sram_a[i]), .ce_n(sram_ce_n[i]), .we_n(sram_we_n[i]),
      .oe_n(sram_oe_n[i]), .dq_i(sram_dq_o[i]), .dq_oe(sram_dq_oe[i]), .dq_o(sram_dq_i[i]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && mrst) n_mrst++;

  initial begin
    #20ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  function automatic logic [15:0] mem_word(input int i, input int k);
    case (i)
      0: return g_mem[0].mem.mem[k];
      1: return g_mem[1].mem.mem[k];
      2: return g_mem[2].mem.mem[k];
      default: return g_mem[3].mem.mem[k];
    endcase
  endfunction

  function automatic int mem_violations(input int i);
    case (i)
      0: return g_mem[0].mem.violations;
      1: return g_mem[1].mem.violations;
      2: return g_mem[2].mem.violations;
      default: return g_mem[3].mem.violations;
    endcase
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // One VME single cycle. Returns the read data and the DS-to-DTACK clocks.
  task automatic vme(input logic [5:0] am, input logic [23:0] a, input bit wr,
                     input logic [15:0] wd, output logic [15:0] rd, output int lat);
    @(negedge clk);
    vme_a = a[23:1]; vme_am = am; write_n = !wr; vme_d_i = wr ? wd : 16'h0;
    @(negedge clk);
    as_n = 1'b0;
    @(negedge clk);
    ds_n = 2'b00;
    lat = -1;
    rd = 16'h0;
    for (int c = 1; c <= 400; c++) begin
      @(negedge clk);
      if (dtack) begin
        lat = c;
        rd = m_rdata;
        break;
      end
    end
    ds_n = 2'b11;
    as_n = 1'b1;
    repeat (3) @(negedge clk);
  endtask

  task automatic a16w(input logic [7:0] a, input logic [15:0] d);
    logic [15:0] r;
    int lat;
    vme(6'h29, {SLOT, 12'h000, a}, 1'b1, d, r, lat);
    check(lat == 6, $sformatf("A16 write %h DTACK after %0d", a, lat));
  endtask

  task automatic a16r(input logic [7:0] a, output logic [15:0] r, output int lat);
    vme(6'h29, {SLOT, 12'h000, a}, 1'b0, 16'h0, r, lat);
  endtask

  task automatic tick();
    @(negedge clk);
    acq_tick = 1'b1;
    @(negedge clk);
    acq_tick = 1'b0;
    repeat (70) @(negedge clk);
  endtask

  initial begin
    logic [15:0] r;
    int lat, n0, n1, n2;
    logic [15:0] ruler_log [$];
    int v0 [4];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    foreach (v0[i]) v0[i] = mem_violations(i);
    // master registers
    a16r(8'h4C, r, lat);
    check(r == 16'h0011 && lat == 6, $sformatf("version %h lat %0d", r, lat));
    a16w(8'h42, 16'h000A);
    a16w(8'h86, 16'h0ABC);
    check(relay == 4'hA && dac[3] == 12'hABC, "relay and DAC03 written");
    a16r(8'h86, r, lat);
    check(r == 16'h0ABC, "DAC03 read");
    check(led, "access LED on");
    // wrong slot: no answer
    vme(6'h29, {4'h4, 20'h00042}, 1'b0, 16'h0, r, lat);
    check(lat < 0, "other slot not answered");
    // local bus forwarding: watch lbus2/lbus3 while a cycle runs
    fork
      a16w(8'h18, 16'h00A5);
      begin
        wait (lbus2.stb);
        check(lbus2.en && lbus2.wr && lbus2.addr == 8'h18 && lbus2.wdata == 16'h00A5 &&
              !lbus3.en, "slave 1 write on local bus");
      end
    join
    fork
      a16w(8'h3E, 16'h0000);
      begin
        wait (lbus3.stb);
        check(lbus3.en && lbus3.wr && lbus3.addr == 8'h3E && !lbus2.en,
              "slave 2 write on local bus");
      end
    join
    fork
      a16r(8'h06, r, lat);
      begin
        wait (lbus2.stb);
        check(lbus2.en && lbus2.rd && bus_sel == BUS_F2 && d_oe, "slave 1 read");
      end
    join
    fork
      a16r(8'h22, r, lat);
      begin
        wait (lbus3.stb);
        check(lbus3.en && lbus3.rd && bus_sel == BUS_F3, "slave 2 read");
      end
    join
    // acquisition of 50 samples
    a16w(8'h40, 16'h0);
    n0 = adc0.log_q.size(); n1 = adc1.log_q.size(); n2 = adc2.log_q.size();
    for (int k = 0; k < 50; k++) begin
      ruler_pos = 18'(1000 + 4 * k + ($urandom % 4));
      ruler_log.push_back(ruler_pos[17:2]);
      tick();
    end
    check(adc0.log_q.size() - n0 == 50 && adc1.log_q.size() - n1 == 50 &&
          adc2.log_q.size() - n2 == 50, "50 conversions per ADC");
    check(adc0.bad_convst + adc1.bad_convst + adc2.bad_convst == 0, "no overlapping starts");
    begin
      int bad [4];
      foreach (bad[i]) bad[i] = 0;
      for (int k = 0; k < 50; k++) begin
        if (g_mem[0].mem.mem[k] != 16'(adc0.log_q[n0 + k])) bad[0]++;
        if (g_mem[1].mem.mem[k] != 16'(adc1.log_q[n1 + k])) bad[1]++;
        if (g_mem[2].mem.mem[k] != adc2.log_q[n2 + k]) bad[2]++;
        if (g_mem[3].mem.mem[k] != ruler_log[k]) bad[3]++;
      end
      foreach (bad[i]) check(bad[i] == 0, $sformatf("SRAM %0d: %0d wrong samples", i, bad[i]));
      for (int i = 0; i < 4; i++)
        check(mem_violations(i) == v0[i], $sformatf("SRAM %0d write timing", i));
    end
    // A24 read-out of every SRAM
    for (int i = 0; i < 4; i++) begin
      a16w(8'h4A, 16'(i));
      for (int k = 0; k < 50; k += 7) begin
        vme(6'h39, {SLOT, 20'(2 * k)}, 1'b0, 16'h0, r, lat);
        check(lat > 0 && r == mem_word(i, k), $sformatf("A24 SRAM %0d word %0d: %h", i, k, r));
      end
    end
    // block transfer read of SRAM 2 words 10..19
    a16w(8'h4A, 16'd2);
    @(negedge clk);
    vme_a = {SLOT, 19'(10)};
    vme_am = 6'h3B;
    write_n = 1'b1;
    @(negedge clk);
    as_n = 1'b0;
    for (int k = 10; k < 20; k++) begin
      @(negedge clk);
      ds_n = 2'b00;
      lat = -1;
      for (int c = 1; c <= 40; c++) begin
        @(negedge clk);
        if (dtack) begin lat = c; r = m_rdata; break; end
      end
      check(lat > 0 && r == g_mem[2].mem.mem[k], $sformatf("BLT word %0d: %h", k, r));
      ds_n = 2'b11;
      repeat (3) @(negedge clk);
    end
    as_n = 1'b1;
    repeat (3) @(negedge clk);
    // calibration mode: potentiometer sample to the ruler address
    cal_mode = 1'b1;
    n2 = adc2.log_q.size();
    for (int k = 0; k < 10; k++) begin
      ruler_pos = 18'(5000 + 37 * k);
      tick();
    end
    begin
      int bad;
      bad = 0;
      for (int k = 0; k < 10; k++)
        if (g_mem[2].mem.mem[5000 + 37 * k] != adc2.log_q[n2 + k]) bad++;
      check(bad == 0, $sformatf("calibration table: %0d wrong", bad));
    end
    cal_mode = 1'b0;
    // VME read of ADC2: DTACK waits for the conversion
    n2 = adc2.log_q.size();
    a16r(8'h94, r, lat);
    check(lat > 30 && adc2.log_q.size() == n2 + 1 && r == adc2.log_q[n2],
          $sformatf("ADC2 read %h after %0d clocks", r, lat));
    a16r(8'h90, r, lat);
    check(lat > 20 && r == {4'h0, adc0.log_q[adc0.log_q.size() - 1]}, "ADC0 read");
    a16r(8'h92, r, lat);
    check(lat > 10 && r == {1'b0, adc1.log_q[adc1.log_q.size() - 1]}, "ADC1 read");
    // the VME reads did not write the SRAMs: acquisition address still 60
    check(g_mem[0].mem.writes == 60 || g_mem[0].mem.writes == 61,
          $sformatf("SRAM 0 writes %0d", g_mem[0].mem.writes));
    // ADC0 write strobe
    fork
      a16w(8'h90, 16'h1234);
      begin
        wait (!adc0_wr_n);
        check(1'b1, "ADC0 write strobe");
      end
    join
    // master reset
    a16w(8'hFE, 16'h0);
    check(n_mrst == 1, "master reset pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
