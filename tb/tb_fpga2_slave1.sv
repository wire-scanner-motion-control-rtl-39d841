// tb_fpga2_slave1 -- checks slave FPGA 1 through its local bus.
//
// Function check: after clearing the read-out counter, consecutive reads of
// 0x14 return the fast profile from address 0 (205, 205, ...). Scan: with
// divider 2 a start runs the generator out to 3890 and stops; status bits
// follow (active, busy, at 0, at end); the acquisition tick runs at the
// programmed divider during the scan. Ruler: a model ruler moves; the
// position output follows, the reference and error registers are read back
// in two words, calibration mode gives one acquisition tick per ruler step.
// Scan inhibit refuses a start; a write to 0x1E resets the working logic.
module tb_fpga2_slave1;
  import wsmcc_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        mrst = 1'b0;
  lbus_t       lb;
  logic [15:0] rdata;
  logic        scan_inhibit = 1'b0;
  logic        pa = 1'b0, pb = 1'b0, ref_p = 1'b0;
  logic        frev = 1'b0, ext_clk = 1'b0, acq_gate = 1'b0;
  logic        eos = 1'b0, home_in = 1'b0, bobr_ok = 1'b1, frev_ok = 1'b0, ext_ok = 1'b1;
  logic [11:0] fgen_data;
  logic        active_scan, motion_reset, home_mode, acq_tick, cal_mode;
  logic [17:0] ruler_pos;
  int checks = 0, failures = 0;
  int ticks = 0, ph = 0, pos = 0;

  fpga2_slave1 #(.FG_AW(12), .FG_DW(12)) dut (
    .clk(clk), .rst_n(rst_n), .mrst(mrst), .lbus(lb), .rdata(rdata),
    .scan_inhibit(scan_inhibit), .or_phase_a(pa), .or_phase_b(pb), .or_ref(ref_p),
    .frev(frev), .ext_clk(ext_clk), .acq_gate(acq_gate), .eos_switch(eos),
    .wire_home(home_in), .bobr_clk_ok(bobr_ok), .frev_ok(frev_ok), .ext_clk_ok(ext_ok),
    .fgen_data(fgen_data), .active_scan(active_scan), .motion_reset(motion_reset),
    .home_mode(home_mode), .acq_tick(acq_tick), .cal_mode(cal_mode), .ruler_pos(ruler_pos)
  );

  always #5 clk = ~clk;
  always @(negedge clk) if (rst_n && acq_tick) ticks++;

  initial begin
    #10ms;
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

  task automatic bus(input bit wr, input logic [7:0] a, input logic [15:0] wd,
                     output logic [15:0] d);
    @(negedge clk);
    lb = '0;
    lb.en = 1'b1; lb.wr = wr; lb.rd = !wr; lb.addr = a; lb.wdata = wd;
    repeat (3) @(negedge clk);
    lb.stb = 1'b1;
    d = rdata;
    @(negedge clk);
    lb = '0;
    @(negedge clk);
  endtask

  task automatic wr(input logic [7:0] a, input logic [15:0] wd);
    logic [15:0] d;
    bus(1'b1, a, wd, d);
  endtask

  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    bus(1'b0, a, 16'h0, d);
  endtask

  task automatic ruler_step(input bit fwd);
    ph = fwd ? ph + 1 : ph + 3;
    pos = fwd ? pos + 1 : pos - 1;
    case (ph & 3)
      0: {pa, pb} = 2'b00;
      1: {pa, pb} = 2'b10;
      2: {pa, pb} = 2'b11;
      default: {pa, pb} = 2'b01;
    endcase
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [15:0] d, hi;
    int t0, cyc;
    lb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    // function check read-out of the fast profile
    wr(8'h18, 16'h0001);                 // FuncMode 01 fast
    wr(8'h10, 16'h0);                    // clear read-out counter
    rd(8'h14, d); check(d == 16'd205, $sformatf("ROM[0] %0d", d));
    rd(8'h14, d); check(d == 16'd205, $sformatf("ROM[1] %0d", d));
    for (int i = 2; i < 20; i++) begin
      logic [15:0] prev;
      prev = d;
      rd(8'h14, d);
      check(d >= prev && d < 16'd260, $sformatf("ROM[%0d] %0d", i, d));
    end
    // status at idle: active 0, busy 0, at address 0, board pins
    rd(8'h12, d);
    check(d[0] == 1'b0 && d[1] == 1'b0 && d[2] == 1'b1 && d[6] == 1'b1 && d[7] == 1'b0 &&
          d[8] == 1'b1, $sformatf("idle status %h", d));
    // scan with divider 2 and acquisition divider 16
    wr(8'h00, 16'd2);
    wr(8'h02, 16'd0);
    wr(8'h0E, 16'd16);
    wr(8'h18, 16'h0001);                 // fast, crystal clock, normal mode
    t0 = ticks;
    wr(8'h1A, 16'h0);                    // start
    check(active_scan, "scan active");
    rd(8'h12, d);
    check(d[0] && d[1], $sformatf("status during scan %h", d));
    cyc = 0;
    while (active_scan && cyc < 20000) begin @(negedge clk); cyc++; end
    check(!active_scan && fgen_data == 12'd3890, $sformatf("scan ended at %0d", fgen_data));
    check(ticks - t0 >= 8192 / 16 - 4 && ticks - t0 <= 8192 / 16 + 4,
          $sformatf("acquisition ticks %0d", ticks - t0));
    rd(8'h12, d);
    check(!d[0] && d[3] && !d[2], $sformatf("status at end %h", d));
    t0 = ticks;
    repeat (100) @(negedge clk);
    check(ticks == t0, "no acquisition after the scan");
    // second start runs back in
    wr(8'h1A, 16'h0);
    cyc = 0;
    while (active_scan && cyc < 20000) begin @(negedge clk); cyc++; end
    check(fgen_data == 12'd205, "inward scan back to 205");
    // set FFF: status at end address
    wr(8'h12, 16'h0);
    rd(8'h12, d);
    check(d[3] && !d[2], "set FFF");
    // ruler
    for (int i = 0; i < 500; i++) ruler_step(($urandom % 100) < 70);
    check(int'(ruler_pos) == (pos & 32'h3FFFF), $sformatf("ruler position %0d model %0d",
                                                          ruler_pos, pos));
    ref_p = 1'b1;
    repeat (5) @(negedge clk);
    ref_p = 1'b0;
    begin
      int refpos;
      refpos = pos;
      for (int i = 0; i < 50; i++) ruler_step(1'b1);
      rd(8'h04, d);
      rd(8'h06, hi);
      check({hi[1:0], d} == 18'(refpos), $sformatf("reference %h model %h", {hi[1:0], d},
                                                   refpos));
      check(int'(ruler_pos) == pos, "position output unchanged by register reads");
    end
    // two errors
    repeat (2) begin
      ph = ph + 2;
      case (ph & 3)
        0: {pa, pb} = 2'b00;
        1: {pa, pb} = 2'b10;
        2: {pa, pb} = 2'b11;
        default: {pa, pb} = 2'b01;
      endcase
      repeat (5) @(negedge clk);
      ruler_step(1'b1);
    end
    rd(8'h08, d);
    rd(8'h0A, hi);
    check(d == 16'd2 && hi == 16'd0, $sformatf("ruler errors %0d", d));
    wr(8'h08, 16'h0);
    rd(8'h08, d);
    check(d == 16'd0, "clear ruler errors");
    // calibration mode: one acquisition tick per ruler step during a scan
    wr(8'h00, 16'd1000);
    wr(8'h18, 16'h0012);                 // scan mode 1, slow profile
    check(cal_mode, "calibration flag");
    wr(8'h1A, 16'h0);
    t0 = ticks;
    for (int i = 0; i < 40; i++) ruler_step(1'b1);
    repeat (3) @(negedge clk);
    check(ticks - t0 == 40, $sformatf("calibration ticks %0d", ticks - t0));
    // motion reset stops
    wr(8'h1C, 16'h0);
    check(!active_scan, "motion reset");
    // scan inhibit
    scan_inhibit = 1'b1;
    wr(8'h1A, 16'h0);
    check(!active_scan, "start refused under scan inhibit");
    scan_inhibit = 1'b0;
    // clear position and FPGA reset
    wr(8'h0C, 16'h0);
    check(ruler_pos == 18'd0, "clear position");
    ruler_step(1'b1);
    ruler_step(1'b1);
    wr(8'h1E, 16'h0);
    check(ruler_pos == 18'd0, "FPGA reset clears position");
    wr(8'h18, 16'h0040);
    check(home_mode, "home mode bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
