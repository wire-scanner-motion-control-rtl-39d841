// tb_fgen_addr_counter -- checks the profile address counter.
//
// A reference model walks the same up/down sequence: from 0 the counter
// counts up one step per tick to the end address, reports scan over, turns,
// counts down to 0, reports scan over and turns again. "Set FFF" jumps to the
// last address heading in, "clear" jumps to 0 heading out. Ticks are given
// at random; the address must follow the model on every clock.
module tb_fgen_addr_counter;
  localparam int AW = 12;
  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          tick = 1'b0;
  logic [AW-1:0] end_addr = '1;
  logic          set_max = 1'b0;
  logic          clr = 1'b0;
  logic [AW-1:0] addr;
  logic          dir_in;
  logic          scan_over;
  int checks = 0, failures = 0;
  int m_addr, m_in, m_over;
  int overs = 0;

  fgen_addr_counter #(.AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .end_addr(end_addr), .set_max(set_max),
    .clr(clr), .addr(addr), .dir_in(dir_in), .scan_over(scan_over)
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
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // Model update for one clock with the inputs applied.
  task automatic model_step();
    m_over = 0;
    if (set_max) begin
      m_addr = (1 << AW) - 1;
      m_in = 1;
    end else if (clr) begin
      m_addr = 0;
      m_in = 0;
    end else if (tick) begin
      if (m_in == 0) begin
        if (m_addr >= int'(end_addr)) begin m_in = 1; m_over = 1; end
        else m_addr++;
      end else begin
        if (m_addr == 0) begin m_in = 0; m_over = 1; end
        else m_addr--;
      end
    end
  endtask

  task automatic run(input int n, input int tick_pct);
    repeat (n) begin
      @(negedge clk);
      tick = ($urandom % 100) < tick_pct;
      @(posedge clk);
      model_step();
      @(negedge clk);
      check(int'(addr) == m_addr && int'(dir_in) == m_in && int'(scan_over) == m_over,
            $sformatf("addr %0d/%0d dir %0d/%0d over %0d/%0d", addr, m_addr, dir_in, m_in,
                      scan_over, m_over));
      if (scan_over) overs++;
      tick = 1'b0;
    end
  endtask

  initial begin
    m_addr = 0; m_in = 0; m_over = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(addr == '0 && !dir_in, "reset state");
    // full out-and-in scan with every clock a tick: 4096 up, 4096 down
    @(negedge clk);
    tick = 1'b1;
    begin
      int cyc;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!scan_over && cyc < 10000);
      check(cyc == 4096 && addr == 12'hFFF && dir_in, $sformatf("out scan took %0d", cyc));
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!scan_over && cyc < 10000);
      check(cyc == 4096 && addr == 12'h000 && !dir_in, $sformatf("in scan took %0d", cyc));
    end
    tick = 1'b0;
    // random ticks with a short end address (restricted slow scan)
    end_addr = 12'd37;
    @(negedge clk);
    clr = 1'b1;
    @(posedge clk); model_step(); @(negedge clk); clr = 1'b0;
    run(3000, 40);
    // set FFF then run in
    end_addr = '1;
    set_max = 1'b1;
    @(posedge clk); model_step(); @(negedge clk); set_max = 1'b0;
    check(addr == 12'hFFF && dir_in, "set FFF");
    run(500, 70);
    // clear while moving
    clr = 1'b1;
    @(posedge clk); model_step(); @(negedge clk); clr = 1'b0;
    check(addr == 12'h000 && !dir_in, "clear");
    end_addr = 12'd5;
    run(200, 100);
    check(overs > 10, $sformatf("scan over seen %0d times", overs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
