// tb_wl_acq_rates -- the acquisition rates the card is used at, with the
// whole card at its default sizes.
//
// A slow linear scan (40 clocks per profile step, 163,840 clocks) is run
// once for each acquisition division value: 400 and 100 (100 and 400 kSps
// potentiometer tests), 64 (625 kSps, the diagnostics ADC maximum), 40
// (1 MSps, the potentiometer ADC maximum) and 4 (10 MHz, the prototype
// test). The ADC models convert in 24, 8 and 29 clocks. The potentiometer
// ADC's 29 clocks (plus one from CONVST to BUSY) are the most that 1 MSps
// allows: the conversion flow adds 10 clocks to the ADC's own time. For every rate the
// ruler SRAM must get one word per acquisition tick, and the tick count must
// match the scan length over the division value. Up to 1 MSps every tick
// must also give one conversion and one SRAM word in each ADC SRAM, stored
// in order and equal to what the ADC converted. At 10 MHz the ADCs are
// slower than the ticks: each conversion must still be stored exactly once.
module tb_wl_acq_rates;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [23:1] vme_a = '0;
  logic [5:0]  vme_am = '0;
  logic        as_n = 1'b1;
  logic [1:0]  ds_n = 2'b11;
  logic        write_n = 1'b1;
  logic [15:0] vme_d_i = '0;
  logic [15:0] vme_d_o;
  logic        vme_d_oe, dtack, led;
  logic [3:0]  ga_n = 4'h8;          // slot 7
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
  logic [11:0] fgen_dac;
  logic [11:0] dac [4];
  logic [3:0]  relay;
  logic [15:0] io_reg;
  logic [7:0]  switch_reg;
  logic        pa = 1'b0, pb = 1'b0, ref_p = 1'b0;
  logic        frev = 1'b0, ext_clk = 1'b0, acq_gate = 1'b0;
  logic        eos = 1'b0, wire_home = 1'b1, bobr_ok = 1'b1, frev_ok = 1'b1, ext_ok = 1'b0;
  logic        active_scan, motion_reset, home_mode;
  logic [24:0] errorlines = '1;
  logic        scan_inhibit;
  logic [7:0]  seg_n;
  int checks = 0, failures = 0;

  localparam logic [3:0] SLOT = 4'h7;

  wsmcc_top dut (
    .clk(clk), .sysreset_n(rst_n),
    .vme_a(vme_a), .vme_am(vme_am), .vme_as_n(as_n), .vme_ds_n(ds_n),
    .vme_write_n(write_n), .vme_d_i(vme_d_i), .vme_d_o(vme_d_o), .vme_d_oe(vme_d_oe),
    .vme_dtack(dtack), .ga_n(ga_n), .access_led(led),
    .adc0_busy(adc0_busy), .adc0_d(adc0_d), .adc0_convst_n(adc0_convst_n),
    .adc0_cs_n(adc0_cs_n), .adc0_wr_n(adc0_wr_n),
    .adc1_busy_n(adc1_busy_n), .adc1_d(adc1_d), .adc1_convst_n(adc1_convst_n),
    .adc1_cs_n(adc1_cs_n), .adc1_wr_n(adc1_wr_n),
    .adc2_busy(adc2_busy), .adc2_d(adc2_d), .adc2_convst_n(adc2_convst_n),
    .adc2_cs_n(adc2_cs_n),
    .sram_a(sram_a), .sram_ce_n(sram_ce_n), .sram_we_n(sram_we_n), .sram_oe_n(sram_oe_n),
    .sram_dq_o(sram_dq_o), .sram_dq_oe(sram_dq_oe), .sram_dq_i(sram_dq_i),
    .fgen_dac(fgen_dac), .dac(dac), .relay(relay), .io_reg(io_reg), .switch_reg(switch_reg),
    .or_phase_a(pa), .or_phase_b(pb), .or_ref(ref_p), .frev(frev), .ext_clk(ext_clk),
    .acq_gate(acq_gate), .eos_switch(eos), .wire_home(wire_home), .bobr_clk_ok(bobr_ok),
    .frev_ok(frev_ok), .ext_clk_ok(ext_ok), .active_scan(active_scan),
    .motion_reset(motion_reset), .home_mode(home_mode),
    .errorlines(errorlines), .scan_inhibit(scan_inhibit), .seg_n(seg_n)
  );

  adc_model #(.DW(12), .LAT(2), .CONV(24), .BUSY_LOW(1'b0), .SEED(5)) adc0 (
    .clk(clk), .convst_n(adc0_convst_n), .cs_n(adc0_cs_n), .busy(adc0_busy), .d(adc0_d));
  adc_model #(.DW(15), .LAT(1), .CONV(8), .BUSY_LOW(1'b1), .SEED(6)) adc1 (
    .clk(clk), .convst_n(adc1_convst_n), .cs_n(adc1_cs_n), .busy(adc1_busy_n), .d(adc1_d));
  adc_model #(.DW(16), .LAT(1), .CONV(29), .BUSY_LOW(1'b0), .SEED(7)) adc2 (
    .clk(clk), .convst_n(adc2_convst_n), .cs_n(adc2_cs_n), .busy(adc2_busy), .d(adc2_d));

  for (genvar i = 0; i < 4; i++) begin : g_mem
    sram_model #(.AW(18)) mem (
      .clk(clk), .a(sram_a[i]), .ce_n(sram_ce_n[i]), .we_n(sram_we_n[i]),
      .oe_n(sram_oe_n[i]), .dq_i(sram_dq_o[i]), .dq_oe(sram_dq_oe[i]), .dq_o(sram_dq_i[i]));
  end

  always #5 clk = ~clk;



  initial begin
    #100ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

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
      if (failures < 30) $display("FAIL %s", msg);
    end
  endtask

  function automatic logic [15:0] mem_word(input int i, input int k);
    case (i)
      0: return g_mem[0].mem.mem[k];
      1: return g_mem[1].mem.mem[k];
      2: return g_mem[2].mem.mem[k];
      default: return g_mem[3].mem.mem[k];
    endcase
  endfunction

  function automatic int mem_writes(input int i);
    case (i)
      0: return g_mem[0].mem.writes;
      1: return g_mem[1].mem.writes;
      2: return g_mem[2].mem.writes;
      default: return g_mem[3].mem.writes;
    endcase
  endfunction

  // ---------------------------------------------------------------- VME master
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
        rd = vme_d_oe ? vme_d_o : 16'hDEAD;
        break;
      end
    end
    ds_n = 2'b11;
    as_n = 1'b1;
    repeat (3) @(negedge clk);
  endtask

  task automatic wr16(input logic [7:0] a, input logic [15:0] d);
    logic [15:0] r;
    int lat;
    vme(6'h2D, {SLOT, 12'h000, a}, 1'b1, d, r, lat);
    check(lat == 6, $sformatf("write %h: DTACK after %0d clocks", a, lat));
  endtask

  task automatic rd16(input logic [7:0] a, output logic [15:0] r);
    int lat;
    vme(6'h29, {SLOT, 12'h000, a}, 1'b0, 16'h0, r, lat);
    check(lat > 0, $sformatf("read %h: no DTACK", a));
  endtask

  task automatic rd32(input logic [7:0] a, output int v);
    logic [15:0] lo, hi;
    rd16(a, lo);
    rd16(a + 8'h02, hi);
    v = int'({hi[1:0], lo});
  endtask

  task automatic wait_scan_end(input int limit, output int cyc);
    cyc = 0;
    while (active_scan && cyc < limit) begin @(negedge clk); cyc++; end
  endtask

  // ---------------------------------------------------------------- the test
  initial begin
    int divs [5];
    int lat, cyc, n [3], w [4], v [4], ticks, expect_t, bad;
    logic [15:0] r;
    divs = '{400, 100, 64, 40, 4};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 4; i++) v[i] = mem_violations(i);

    wr16(8'h18, 16'h0002);             // normal mode, 40 MHz source, slow profile
    wr16(8'h00, 16'd40);
    wr16(8'h02, 16'd0);
    foreach (divs[j]) begin
      wr16(8'h0E, 16'(divs[j]));
      wr16(8'h40, 16'h0);
      n[0] = adc0.log_q.size(); n[1] = adc1.log_q.size(); n[2] = adc2.log_q.size();
      for (int i = 0; i < 4; i++) w[i] = mem_writes(i);
      wr16(8'h1A, 16'h0);
      wait_scan_end(200000, cyc);
      repeat (200) @(negedge clk);
      check(!active_scan && cyc > 4096 * 40 - 20 && cyc < 4096 * 40 + 20,
            $sformatf("div %0d: scan took %0d clocks", divs[j], cyc));
      ticks = mem_writes(3) - w[3];
      expect_t = (4096 * 40) / divs[j];
      check(ticks >= expect_t - 1 && ticks <= expect_t + 1,
            $sformatf("div %0d: %0d ticks, expected %0d", divs[j], ticks, expect_t));
      for (int i = 0; i < 3; i++) begin
        int conv, wr;
        conv = (i == 0) ? adc0.log_q.size() - n[0] :
               (i == 1) ? adc1.log_q.size() - n[1] : adc2.log_q.size() - n[2];
        wr = mem_writes(i) - w[i];
        check(wr == conv, $sformatf("div %0d ADC%0d: %0d conversions, %0d writes",
                                    divs[j], i, conv, wr));
        if (divs[j] >= 40)
          check(wr == ticks, $sformatf("div %0d ADC%0d: %0d writes for %0d ticks",
                                       divs[j], i, wr, ticks));
        else
          check(wr < ticks && wr > ticks / 16,
                $sformatf("div %0d ADC%0d: %0d writes for %0d ticks", divs[j], i, wr, ticks));
        bad = 0;
        for (int k = 0; k < wr; k++) begin
          logic [15:0] e;
          e = (i == 0) ? 16'(adc0.log_q[n[0] + k]) :
              (i == 1) ? 16'(adc1.log_q[n[1] + k]) : adc2.log_q[n[2] + k];
          if (divs[j] >= 40 && mem_word(i, k) != e) bad++;
        end
        check(bad == 0, $sformatf("div %0d ADC%0d: %0d words wrong", divs[j], i, bad));
      end
    end
    // one word of each SRAM read back over VME at the last rate
    for (int i = 0; i < 4; i++) begin
      wr16(8'h4A, 16'(i));
      vme(6'h39, {SLOT, 20'h00000}, 1'b0, 16'h0, r, lat);
      check(lat > 0 && r == mem_word(i, 0), $sformatf("SRAM %0d read-back %h", i, r));
    end
    for (int i = 0; i < 4; i++)
      check(mem_violations(i) == v[i], $sformatf("SRAM %0d timing violations", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
