// tb_wl_full_stroke -- one full stroke of the linear wire scanner, recorded
// at 1 um resolution, with the whole card at its default sizes.
//
// A 130 mm stroke at 1 um gives 130,000 ruler counts, which must fit one
// 256K-word SRAM. This test drives the card through a calibration scan over
// the full stroke: the slow linear profile takes the motor DAC from 0 to
// 4095, the model wire follows at 32 um per DAC step (131,040 um in all,
// one um every 48 clocks), and every ruler count triggers an acquisition.
// It checks that
//   - every micrometre of the stroke produced exactly one potentiometer
//     sample, stored at the address of its ruler position,
//   - the ruler SRAM holds position bits [17:2] for every acquisition, in
//     acquisition order,
//   - every stored potentiometer word reads back unchanged over VME (A24
//     single reads of the selected SRAM), which is the read-out of one
//     SRAM of the card,
//   - the SRAM models saw no timing violation.
module tb_wl_full_stroke;
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
  // The wire position (um) follows 32 x the motor DAC word, one ruler step
  // every STEP clocks at most.
  localparam int STEP = 48;
  localparam int SCALE = 32;
  int wire_pos = 0, ruler_ph = 0, move_div = 0;
  always @(negedge clk) begin
    move_div = (move_div + 1) % STEP;
    if (move_div == 0) begin
      if (wire_pos < SCALE * int'(fgen_dac)) begin wire_pos++; ruler_ph++; end
      else if (wire_pos > SCALE * int'(fgen_dac)) begin wire_pos--; ruler_ph += 3; end
    end
    case (ruler_ph & 3)
      0: {pa, pb} = 2'b00;
      1: {pa, pb} = 2'b10;
      2: {pa, pb} = 2'b11;
      default: {pa, pb} = 2'b01;
    endcase
  end

  // ---------------------------------------------------------------- SRAM 2 write monitor
  logic [15:0] exp_word [2**18];
  bit          seen [2**18];
  int          pot_writes = 0, pot_far = 0, pot_twice = 0;
  logic        pot_wr_d = 1'b0;
  always @(posedge clk) begin
    logic wr;
    wr = rst_n && !sram_ce_n[2] && !sram_we_n[2];
    if (wr && !pot_wr_d) begin
      pot_writes++;
      if (seen[sram_a[2]]) pot_twice++;
      seen[sram_a[2]] = 1'b1;
      exp_word[sram_a[2]] = sram_dq_o[2];
      if (int'(sram_a[2]) > wire_pos + 1 || int'(sram_a[2]) < wire_pos - 1) pot_far++;
    end
    pot_wr_d <= wr;
  end

  initial begin
    #500ms;
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
    logic [15:0] r;
    int lat, cyc, n2, w3, nticks, bad, distinct, v2, v3;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    wr16(8'h18, 16'h0012);             // calibration mode, slow linear profile
    wr16(8'h14, 16'h0);                // generator address 0
    wr16(8'h00, 16'd1600);             // 1600 clocks per profile step
    wr16(8'h02, 16'd0);
    repeat (STEP * 4) @(negedge clk);  // wire settles at 0
    wr16(8'h0C, 16'h0);                // ruler position 0
    wr16(8'h40, 16'h0);                // acquisition address 0
    n2 = adc2.log_q.size();
    w3 = mem_writes(3);
    v2 = mem_violations(2);
    v3 = mem_violations(3);
    wr16(8'h1A, 16'h0);                // start
    check(active_scan, "scan started");
    wait_scan_end(4096 * 1600 + 100, cyc);
    check(!active_scan && fgen_dac == 12'd4095, $sformatf("scan ended at DAC %0d", fgen_dac));
    check(cyc >= 4096 * 1600 - 100 && cyc <= 4096 * 1600 + 100,
          $sformatf("scan took %0d clocks", cyc));
    while (wire_pos < SCALE * 4095) @(negedge clk);
    repeat (200) @(negedge clk);

    // one potentiometer sample per micrometre, at the ruler address
    distinct = 0;
    for (int p = 0; p < 2**18; p++) if (seen[p]) distinct++;
    check(wire_pos == 131040, $sformatf("stroke %0d um", wire_pos));
    check(distinct >= 130000 && distinct == pot_writes && pot_twice == 0,
          $sformatf("%0d potentiometer samples at %0d addresses, %0d twice",
                    pot_writes, distinct, pot_twice));
    check(adc2.log_q.size() - n2 == pot_writes,
          $sformatf("%0d conversions for %0d writes", adc2.log_q.size() - n2, pot_writes));
    check(pot_far == 0, $sformatf("%0d samples stored away from the ruler position", pot_far));
    bad = 0;
    for (int p = 1; p <= 131040; p++) if (!seen[p]) bad++;
    check(bad == 0, $sformatf("%0d micrometres without a sample", bad));

    // ruler SRAM: acquisition k holds position (k+1) >> 2
    nticks = mem_writes(3) - w3;
    check(nticks == 131040, $sformatf("%0d ruler SRAM writes", nticks));
    bad = 0;
    for (int k = 0; k < nticks; k++)
      if (mem_word(3, k) != 16'((k + 1) >> 2)) begin
        if (bad < 5) $display("ruler word %0d = %0d", k, mem_word(3, k));
        bad++;
      end
    check(bad == 0, $sformatf("%0d ruler SRAM words wrong", bad));

    // read the potentiometer SRAM back over VME
    wr16(8'h4A, 16'd2);
    bad = 0;
    for (int p = 1; p <= 131040; p++) begin
      vme(6'h39, {SLOT, 20'(p * 2)}, 1'b0, 16'h0, r, lat);
      if (lat <= 0 || r != exp_word[p]) begin
        if (bad < 5) $display("read-back %0d: %h, expected %h", p, r, exp_word[p]);
        bad++;
      end
    end
    check(bad == 0, $sformatf("%0d potentiometer words read back wrong", bad));
    check(mem_violations(2) == v2 && mem_violations(3) == v3,
          $sformatf("SRAM timing violations %0d %0d", mem_violations(2) - v2, mem_violations(3) - v3));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
