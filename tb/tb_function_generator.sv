// tb_function_generator -- checks one complete motion set-value generator.
//
// Outward fast scan: after a start the DAC word rises monotonically from 205
// to 3890 along the fast profile, one address every div clocks, and the scan
// ends by itself after 4096 steps (4096*div clocks plus the turn-around
// step and the scan-over register: 4096*div+2 clocks after the start
// pulse). The next start runs inwards back to address 0. A slow scan with the
// address-restrict mode stops at the programmed end address. A start is
// refused while scan_inhibit is high, a motion reset stops a running scan,
// and the read-out select puts the read-out address on the ROM.
module tb_function_generator;
  import wsmcc_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0, motion_rst = 1'b0, scan_inhibit = 1'b0;
  logic [17:0] div = 18'd3;
  logic [1:0]  func_mode = FM_FAST;
  logic        fg_addr_mode = 1'b0;
  logic [11:0] end_addr_reg = 12'd0;
  logic        set_max = 1'b0, clr_addr = 1'b0, rd_sel = 1'b0;
  logic [11:0] rd_addr = 12'd0;
  logic [11:0] data, addr, end_addr;
  logic        active_scan, busy, scan_over, dir_in;
  int checks = 0, failures = 0;

  function_generator #(.AW(12), .DW(12), .DIVW(18)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .motion_rst(motion_rst),
    .scan_inhibit(scan_inhibit), .div(div), .func_mode(func_mode),
    .fg_addr_mode(fg_addr_mode), .end_addr_reg(end_addr_reg), .set_max(set_max),
    .clr_addr(clr_addr), .rd_sel(rd_sel), .rd_addr(rd_addr), .data(data), .addr(addr),
    .end_addr(end_addr), .active_scan(active_scan), .busy(busy), .scan_over(scan_over),
    .dir_in(dir_in)
  );

  always #5 clk = ~clk;

  initial begin
    #20ms;
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

  task automatic pulse(ref logic s);
    @(negedge clk);
    s = 1'b1;
    @(negedge clk);
    s = 1'b0;
  endtask

  // Run one scan; returns its length in clocks and checks the DAC word moves
  // monotonically in the scan's direction.
  task automatic run_scan(input bit inward, output int cyc, output int steps);
    logic [11:0] last_d;
    logic [11:0] last_a;
    int bad;
    cyc = 0;
    steps = 0;
    bad = 0;
    pulse(start);
    last_d = data;
    last_a = addr;
    while (active_scan && cyc < 200000) begin
      @(negedge clk);
      cyc++;
      if (addr != last_a) begin
        steps++;
        if (inward ? (addr != last_a - 12'd1) : (addr != last_a + 12'd1)) bad++;
        last_a = addr;
      end
      if (inward ? (data > last_d) : (data < last_d)) bad++;
      last_d = data;
    end
    check(bad == 0, $sformatf("scan not monotonic (%0d)", bad));
  endtask

  initial begin
    int cyc, steps;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!active_scan && addr == 12'd0 && data == 12'd205, "idle at start of fast profile");
    check(end_addr == 12'hFFF, "end address FFF by default");
    // outward fast scan
    run_scan(1'b0, cyc, steps);
    check(steps == 4095, $sformatf("outward steps %0d", steps));
    check(cyc == 4096 * 3 + 2, $sformatf("outward scan took %0d clocks", cyc));
    check(addr == 12'hFFF && dir_in && data == 12'd3890, "ends at 3890 heading in");
    // inward scan
    run_scan(1'b1, cyc, steps);
    check(steps == 4095 && addr == 12'd0 && !dir_in && data == 12'd205,
          $sformatf("inward scan steps %0d", steps));
    // scan inhibit refuses start
    scan_inhibit = 1'b1;
    pulse(start);
    repeat (10) @(negedge clk);
    check(!active_scan && addr == 12'd0, "start refused while inhibited");
    scan_inhibit = 1'b0;
    // motion reset stops a scan
    pulse(start);
    repeat (100) @(negedge clk);
    check(active_scan && busy && addr > 12'd10, "scan running");
    pulse(motion_rst);
    begin
      logic [11:0] a;
      a = addr;
      repeat (50) @(negedge clk);
      check(!active_scan && addr == a, "motion reset stops scan");
    end
    // restricted slow scan: linear profile, end address 100
    pulse(clr_addr);
    func_mode = FM_SLOW;
    fg_addr_mode = 1'b1;
    end_addr_reg = 12'd100;
    div = 18'd5;
    @(negedge clk);
    check(end_addr == 12'd100, "restricted end address");
    run_scan(1'b0, cyc, steps);
    check(addr == 12'd100 && data == 12'd100 && steps == 100, $sformatf("slow scan to %0d", addr));
    check(cyc == 101 * 5 + 2, $sformatf("slow scan took %0d clocks", cyc));
    // restrict mode has no effect with the fast profile
    func_mode = FM_FAST;
    @(negedge clk);
    check(end_addr == 12'hFFF, "restrict ignored for fast profile");
    // set FFF and read-out select
    pulse(set_max);
    check(addr == 12'hFFF && dir_in, "set FFF");
    rd_sel = 1'b1;
    rd_addr = 12'd2048;
    repeat (2) @(negedge clk);
    check(data == 12'd2048, "read-out address selects ROM");
    rd_addr = 12'd0;
    repeat (2) @(negedge clk);
    check(data == 12'd205, "read-out address 0");
    rd_sel = 1'b0;
    repeat (2) @(negedge clk);
    check(data == 12'd3890, "scan address back on ROM");
    // divider 1 means stopped: busy stays low
    div = 18'd1;
    pulse(start);
    repeat (20) @(negedge clk);
    check(active_scan && !busy && addr == 12'hFFF, "divider 1 holds the generator");
    pulse(motion_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
