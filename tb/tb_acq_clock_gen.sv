// tb_acq_clock_gen -- checks the acquisition clock selection.
//
// Crystal/BOBR source: one tick every div clocks during an active scan,
// none outside a scan. Revolution-frequency and external sources: one tick
// per rising input edge. Calibration mode: one tick per ruler count pulse.
// With the acquisition gate enabled, ticks pass only while the gate is high.
module tb_acq_clock_gen;
  import wsmcc_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        active_scan = 1'b0;
  logic [1:0]  clks = CLKS_XTAL;
  logic        scan_mode = 1'b0, acq_gate_en = 1'b0;
  logic [15:0] div = 16'd10;
  logic        frev = 1'b0, ext_clk = 1'b0, qd_clk = 1'b0, acq_gate = 1'b0;
  logic        tick, gate_sync;
  int checks = 0, failures = 0;
  int ticks = 0;

  acq_clock_gen #(.W(16)) dut (
    .clk(clk), .rst_n(rst_n), .active_scan(active_scan), .clks(clks), .scan_mode(scan_mode),
    .acq_gate_en(acq_gate_en), .div(div), .frev(frev), .ext_clk(ext_clk), .qd_clk(qd_clk),
    .acq_gate(acq_gate), .tick(tick), .gate_sync(gate_sync)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && tick) ticks++;

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

  // n square-wave periods of a slow input, each 2*half clocks
  task automatic wiggle(ref logic s, input int n, input int half);
    repeat (n) begin
      repeat (half) @(negedge clk);
      s = 1'b1;
      repeat (half) @(negedge clk);
      s = 1'b0;
    end
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // no scan: no ticks
    repeat (100) @(negedge clk);
    check(ticks == 0, "tick without scan");
    // crystal divider: 1000 clocks at div 10 -> 100 ticks, spaced 10
    active_scan = 1'b1;
    t0 = ticks;
    repeat (1000) @(negedge clk);
    check(ticks - t0 inside {99, 100}, $sformatf("xtal ticks %0d", ticks - t0));
    clks = CLKS_BOBR;
    div = 16'd25;
    repeat (5) @(negedge clk);
    t0 = ticks;
    repeat (2500) @(negedge clk);
    check(ticks - t0 inside {99, 100, 101}, $sformatf("bobr ticks %0d", ticks - t0));
    // revolution frequency: one tick per rising edge
    clks = CLKS_FREV;
    repeat (5) @(negedge clk);
    t0 = ticks;
    wiggle(frev, 37, 7);
    repeat (5) @(negedge clk);
    check(ticks - t0 == 37, $sformatf("frev ticks %0d", ticks - t0));
    // external clock; frev ignored
    clks = CLKS_EXT;
    repeat (5) @(negedge clk);
    t0 = ticks;
    fork
      wiggle(ext_clk, 23, 5);
      wiggle(frev, 40, 3);
    join
    repeat (5) @(negedge clk);
    check(ticks - t0 == 23, $sformatf("ext ticks %0d", ticks - t0));
    // calibration mode: ruler pulses
    scan_mode = 1'b1;
    t0 = ticks;
    repeat (17) begin
      @(negedge clk); qd_clk = 1'b1;
      @(negedge clk); qd_clk = 1'b0;
      repeat (3) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(ticks - t0 == 17, $sformatf("calibration ticks %0d", ticks - t0));
    scan_mode = 1'b0;
    // acquisition gate
    clks = CLKS_XTAL;
    div = 16'd4;
    acq_gate_en = 1'b1;
    acq_gate = 1'b0;
    repeat (5) @(negedge clk);
    t0 = ticks;
    repeat (400) @(negedge clk);
    check(ticks == t0, "ticks while gate closed");
    acq_gate = 1'b1;
    repeat (3) @(negedge clk);
    check(gate_sync, "gate status");
    t0 = ticks;
    repeat (400) @(negedge clk);
    check(ticks - t0 inside {99, 100, 101}, $sformatf("gated ticks %0d", ticks - t0));
    // end of scan stops ticks
    active_scan = 1'b0;
    repeat (3) @(negedge clk);
    t0 = ticks;
    repeat (200) @(negedge clk);
    check(ticks == t0, "ticks after scan end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
