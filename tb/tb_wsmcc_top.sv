// tb_wsmcc_top -- end-to-end test of the whole card at its default sizes.
//
// Around the card: a VME bus master, three ADC models, four SRAM models and
// a model of the motor and optical ruler (the wire follows the motor DAC
// word, 1 um per DAC step, and the ruler's quadrature signals follow the
// wire). The test runs the card the way the control software would:
//   - identify the card (version), set DACs and relays, reject other slots
//   - function check: read the fast profile back through VME
//   - fast scan out and back in with acquisition from the crystal clock;
//     every sample of the three ADCs and of the ruler is read back through
//     A24 reads and a block transfer and compared with what was converted
//   - ruler reference capture and error counting read over VME
//   - calibration scan: ruler-triggered acquisition builds the
//     potentiometer table at the ruler addresses
//   - acquisition from the revolution frequency, acquisition gate
//   - VME read of an ADC with DTACK waiting for the conversion
//   - error lines: held, read over VME, scan start refused, shown on the
//     display (stepping through two errors every 0.5 s), cleared by a write
//     to 0x3E; master reset; motion reset during a scan
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_wsmcc_top;
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
  adc_model #(.DW(16), .LAT(1), .CONV(30), .BUSY_LOW(1'b0), .SEED(7)) adc2 (
    .clk(clk), .convst_n(adc2_convst_n), .cs_n(adc2_cs_n), .busy(adc2_busy), .d(adc2_d));

  for (genvar i = 0; i < 4; i++) begin : g_mem
    sram_model #(.AW(18)) mem (
      .clk(clk), .a(sram_a[i]), .ce_n(sram_ce_n[i]), .we_n(sram_we_n[i]),
      .oe_n(sram_oe_n[i]), .dq_i(sram_dq_o[i]), .dq_oe(sram_dq_oe[i]), .dq_o(sram_dq_i[i]));
  end

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- motor + ruler model
  // The wire position (um) follows the motor DAC word with one ruler step
  // every step_clocks clocks at most; the reference mark sits at 2000 um.
  int wire_pos = 0, ruler_ph = 0, ruler_err_inject = 0, ref_hits = 0;
  int move_div = 0;
  int step_clocks = 4;                  // clocks per 1 um step of the wire
  always @(negedge clk) begin
    if (ruler_err_inject > 0) begin
      ruler_ph = ruler_ph + 2;           // both phases change: lost step
      ruler_err_inject--;
    end else begin
      move_div = (move_div + 1) % step_clocks;
      if (move_div == 0) begin
        if (wire_pos < int'(fgen_dac)) begin wire_pos++; ruler_ph++; end
        else if (wire_pos > int'(fgen_dac)) begin wire_pos--; ruler_ph += 3; end
      end
    end
    case (ruler_ph & 3)
      0: {pa, pb} = 2'b00;
      1: {pa, pb} = 2'b10;
      2: {pa, pb} = 2'b11;
      default: {pa, pb} = 2'b01;
    endcase
    if (wire_pos >= 2000 && wire_pos < 2003 && !ref_p) ref_hits++;
    ref_p = (wire_pos >= 2000 && wire_pos < 2003);
  end

  // ---------------------------------------------------------------- mechanism counters
  localparam int NM = 20;
  int    mech [NM];
  string mech_name [NM] = '{
    "A16 register write/read", "slot/AM rejection", "function check read-out",
    "scan out ends by itself", "scan in ends by itself", "SRAM acquisition + A24 read-out",
    "A24 block transfer", "ruler reference capture", "ruler error count",
    "calibration (ruler-triggered) table", "Frev acquisition clock", "acquisition gate",
    "ADC read with DTACK wait", "error held + VME read", "scan start inhibited",
    "7-segment error stepping", "error reset 0x3E", "master reset", "motion reset",
    "set FFF / address status"};

  initial begin
    #2s;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

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
    logic [15:0] r;
    int lat, cyc, v, n0, n1, n2, w0, pos_clr;
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // card identification and board registers
    rd16(8'h4C, r);
    check(r == 16'h0011, $sformatf("version %h", r));
    wr16(8'h42, 16'h0005);
    wr16(8'h80, 16'h0123);
    wr16(8'h48, 16'h00C3);
    rd16(8'h80, r);
    check(r == 16'h0123 && dac[0] == 12'h123 && relay == 4'h5 && switch_reg == 8'hC3,
          "board registers");
    if (r == 16'h0123) mech[0]++;
    vme(6'h29, {4'h6, 20'h0004C}, 1'b0, 16'h0, r, lat);
    check(lat < 0, "other slot answered");
    vme(6'h09, {SLOT, 20'h0004C}, 1'b0, 16'h0, r, lat);
    check(lat < 0, "A32 modifier answered");
    if (lat < 0) mech[1]++;

    // function check: fast profile read back through VME
    wr16(8'h18, 16'h0001);
    wr16(8'h10, 16'h0000);
    begin
      logic [15:0] p [8];
      foreach (p[i]) rd16(8'h14, p[i]);
      check(p[0] == 16'd205 && p[1] == 16'd205 && p[7] >= p[0] && p[7] < 16'd220,
            $sformatf("profile read-out %0d %0d .. %0d", p[0], p[1], p[7]));
      if (p[0] == 16'd205) mech[2]++;
    end
    // at address 0: status D2
    rd16(8'h12, r);
    check(r[2] && !r[0] && r[5] && r[6] && r[7] && !r[8], $sformatf("idle status %h", r));

    // fast scan out with acquisition every 64 clocks from the crystal
    wr16(8'h00, 16'd4);                // 4 clocks per profile step: 16384 clocks
    wr16(8'h02, 16'd0);
    wr16(8'h0E, 16'd64);
    wr16(8'h0C, 16'h0);                // clear ruler position
    pos_clr = wire_pos;
    wr16(8'h04, 16'h0);                // clear reference
    wr16(8'h08, 16'h0);                // clear ruler errors
    wr16(8'h40, 16'h0);                // clear acquisition address
    n0 = adc0.log_q.size(); n1 = adc1.log_q.size(); n2 = adc2.log_q.size();
    w0 = mem_writes(3);
    wr16(8'h1A, 16'h0);                // start
    check(active_scan, "scan started");
    wait_scan_end(100000, cyc);
    repeat (100) @(negedge clk);       // last conversion and SRAM write
    check(!active_scan && fgen_dac == 12'd3890, $sformatf("scan out ended at %0d", fgen_dac));
    if (!active_scan && fgen_dac == 12'd3890) mech[3]++;
    rd16(8'h12, r);
    check(r[3] && !r[2], $sformatf("status at end %h", r));
    begin
      int ns;
      ns = adc2.log_q.size() - n2;
      check(ns == 16384 / 64, $sformatf("%0d acquisitions in the scan", ns));
      check(adc0.log_q.size() - n0 == ns && adc1.log_q.size() - n1 == ns &&
            mem_writes(3) - w0 == ns, "all channels sampled together");
      // read back every 9th sample of every SRAM through A24
      begin
        int bad;
        bad = 0;
        for (int i = 0; i < 4; i++) begin
          wr16(8'h4A, 16'(i));
          for (int k = 0; k < ns; k += 9) begin
            logic [15:0 ] want;
            case (i)
              0: want = 16'(adc0.log_q[n0 + k]);
              1: want = 16'(adc1.log_q[n1 + k]);
              2: want = adc2.log_q[n2 + k];
              default: want = mem_word(3, k);
            endcase
            vme(6'h3D, {SLOT, 20'(2 * k)}, 1'b0, 16'h0, r, lat);
            if (lat < 0 || r != want) begin
              bad++;
              $display("SRAM %0d word %0d: read %h expected %h", i, k, r, want);
            end
          end
        end
        check(bad == 0, $sformatf("%0d SRAM words wrong", bad));
        // ruler samples rise through the scan (motion follows the profile)
        check(mem_word(3, ns - 1) > mem_word(3, ns / 2) && mem_word(3, ns / 2) > mem_word(3, 1),
              "ruler samples follow the scan");
        if (bad == 0) mech[5]++;
      end
      // block transfer of 16 words of SRAM 1
      wr16(8'h4A, 16'd1);
      @(negedge clk);
      vme_a = {SLOT, 19'd20}; vme_am = 6'h3F; write_n = 1'b1;
      @(negedge clk);
      as_n = 1'b0;
      begin
        int bad;
        bad = 0;
        for (int k = 20; k < 36; k++) begin
          @(negedge clk);
          ds_n = 2'b00;
          lat = -1;
          for (int c = 1; c <= 40; c++) begin
            @(negedge clk);
            if (dtack) begin lat = c; r = vme_d_o; break; end
          end
          if (lat < 0 || r != 16'(adc1.log_q[n1 + k])) bad++;
          ds_n = 2'b11;
          repeat (3) @(negedge clk);
        end
        as_n = 1'b1;
        check(bad == 0, $sformatf("block transfer: %0d wrong", bad));
        if (bad == 0) mech[6]++;
      end
    end
    // ruler reference: captured at 2000 um on the way out
    repeat (20000) @(negedge clk);      // let the wire reach the end
    rd32(8'h04, v);
    v = v + pos_clr;
    check(ref_hits > 0 && v >= 1999 && v <= 2003, $sformatf("reference at %0d um", v));
    if (ref_hits > 0 && v >= 1999 && v <= 2003) mech[7]++;
    rd32(8'h08, v);
    check(v == 0, $sformatf("ruler errors %0d before injection", v));

    // scan back in; two lost ruler steps on the way
    wr16(8'h1A, 16'h0);
    repeat (3000) @(negedge clk);
    ruler_err_inject = 1;
    repeat (3000) @(negedge clk);
    ruler_err_inject = 1;
    wait_scan_end(100000, cyc);
    check(fgen_dac == 12'd205, $sformatf("scan in ended at %0d", fgen_dac));
    if (fgen_dac == 12'd205) mech[4]++;
    rd32(8'h08, v);
    check(v == 2, $sformatf("ruler errors %0d", v));
    if (v == 2) mech[8]++;

    // calibration: slow linear profile, ruler-triggered acquisition
    repeat (5000) @(negedge clk);
    wr16(8'h0C, 16'h0);                // wire at 205 um: set ruler zero here
    begin
      int pos0, w2, nc;
      pos0 = wire_pos;
      wr16(8'h18, 16'h0096);           // restrict end, scan mode 1, slow profile
      wr16(8'h16, 16'd300);            // end address 300
      wr16(8'h10, 16'h0);              // generator address to 0
      wr16(8'h14, 16'h0);
      wr16(8'h00, 16'd80);
      step_clocks = 60;                // slow enough for one conversion per um
      n2 = adc2.log_q.size();
      w2 = mem_writes(2);
      wr16(8'h1A, 16'h0);
      wait_scan_end(100000, cyc);
      repeat (6000) @(negedge clk);
      nc = adc2.log_q.size() - n2;
      check(nc > 50 && mem_writes(2) - w2 == nc, $sformatf("%0d calibration samples", nc));
      // the last sample is stored at the address of the ruler position
      v = wire_pos - pos0;
      check(v > 0 && mem_word(2, v) == adc2.log_q[adc2.log_q.size() - 1],
            $sformatf("calibration word at %0d", v));
      if (nc > 50 && mem_word(2, v) == adc2.log_q[adc2.log_q.size() - 1]) mech[9]++;
      step_clocks = 4;
    end

    // revolution frequency as acquisition clock, then the acquisition gate
    wr16(8'h18, 16'h0009);             // Frev, fast profile
    wr16(8'h14, 16'h0);                // generator address to 0, heading out
    wr16(8'h00, 16'd4);
    n2 = adc2.log_q.size();
    wr16(8'h1A, 16'h0);
    fork
      begin
        for (int k = 0; k < 40; k++) begin
          repeat (100) @(negedge clk); frev = 1'b1;
          repeat (100) @(negedge clk); frev = 1'b0;
        end
      end
      wait_scan_end(100000, cyc);
    join
    check(adc2.log_q.size() - n2 == 40, $sformatf("%0d Frev acquisitions",
                                                    adc2.log_q.size() - n2));
    if (adc2.log_q.size() - n2 == 40) mech[10]++;
    wr16(8'h18, 16'h0021);             // gate on, crystal, fast
    wr16(8'h0E, 16'd100);
    n2 = adc2.log_q.size();
    wr16(8'h1A, 16'h0);
    repeat (3000) @(negedge clk);
    check(adc2.log_q.size() == n2, "no acquisition while the gate is closed");
    acq_gate = 1'b1;
    repeat (3000) @(negedge clk);
    acq_gate = 1'b0;
    v = adc2.log_q.size() - n2;
    check(v >= 28 && v <= 31, $sformatf("%0d gated acquisitions", v));
    if (v >= 28 && v <= 31) mech[11]++;
    // motion reset stops the scan
    wr16(8'h1C, 16'h0);
    check(!active_scan, "motion reset");
    if (!active_scan) mech[18]++;

    // set FFF: address status
    wr16(8'h12, 16'h0);
    rd16(8'h12, r);
    check(r[3] && !r[2], "set FFF status");
    if (r[3]) mech[19]++;

    // ADC read with DTACK wait
    n0 = adc2.log_q.size();
    vme(6'h29, {SLOT, 20'h00094}, 1'b0, 16'h0, r, lat);
    check(lat > 30 && r == adc2.log_q[n0], $sformatf("ADC2 read %h after %0d", r, lat));
    if (lat > 30 && r == adc2.log_q[n0]) mech[12]++;

    // errors: 3 (c 3) and 12 (C) low for 3 ms
    errorlines[3] = 1'b0;
    errorlines[12] = 1'b0;
    repeat (120_000) @(negedge clk);
    errorlines = '1;
    repeat (50_000) @(negedge clk);
    begin
      logic [15:0] lo, hi;
      rd16(8'h20, lo);
      rd16(8'h22, hi);
      check({hi[8:0], lo} == 25'h1FFEFF7, $sformatf("error word %h", {hi[8:0], lo}));
      if ({hi[8:0], lo} == 25'h1FFEFF7 && scan_inhibit) mech[13]++;
    end
    wr16(8'h1A, 16'h0);
    check(!active_scan && scan_inhibit, "start refused with held error");
    if (!active_scan) mech[14]++;
    // display alternates between 3 and C every 0.5 s (20,000,000 clocks)
    begin
      int changes, others;
      logic [7:0] last;
      changes = 0;
      others = 0;
      last = seg_n;
      for (int c = 0; c < 45_000_000; c++) begin
        @(negedge clk);
        if (seg_n != last) begin changes++; last = seg_n; end
        if (seg_n != 8'h0D && seg_n != 8'h63) others++;
        if (changes == 2) break;
      end
      check(changes == 2 && others == 0, $sformatf("display changes %0d others %0d",
                                                    changes, others));
      if (changes == 2 && others == 0) mech[15]++;
    end
    // reset errors by 0x3E
    wr16(8'h3E, 16'h0);
    repeat (10) @(negedge clk);
    check(!scan_inhibit && seg_n == 8'hEF, "errors cleared");
    if (!scan_inhibit && seg_n == 8'hEF) mech[16]++;

    // master reset: clears the slave FPGAs (ruler position to 0)
    errorlines[0] = 1'b0;
    repeat (90_000) @(negedge clk);
    errorlines[0] = 1'b1;
    check(scan_inhibit, "error 0 held");
    wr16(8'hFE, 16'h0);
    repeat (5) @(negedge clk);
    check(!scan_inhibit && dut.ruler_pos <= 18'd1, "master reset");
    rd16(8'h12, r);
    check(r[2], "generator address back at 0");
    if (!scan_inhibit && r[2]) mech[17]++;
    rd16(8'h80, r);
    check(r == 16'h0123, "master registers kept by the master reset");

    for (int i = 0; i < NM; i++) begin
      $display("mechanism %-40s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism never happened: %s", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
