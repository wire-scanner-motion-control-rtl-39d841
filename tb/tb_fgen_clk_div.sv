// tb_fgen_clk_div -- checks the function generator clock divider.
//
// For several divider values the distance between ticks must be exactly the
// divider value in system clocks, the tick one clock wide, and no tick may
// come while the divider is disabled or set to 0 or 1.
module tb_fgen_clk_div;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en = 1'b0;
  logic [17:0] div = 18'd0;
  logic        tick;
  int checks = 0, failures = 0;

  fgen_clk_div #(.W(18)) dut (.clk(clk), .rst_n(rst_n), .en(en), .div(div), .tick(tick));

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
      $display("FAIL %s", msg);
    end
  endtask

  // Measure the spacing of the next n ticks. Outputs are sampled on the
  // falling clock edge, inputs change there too.
  task automatic measure(input int unsigned d, input int n);
    int last, cyc;
    last = -1;
    cyc = 0;
    while (n > 0) begin
      @(negedge clk);
      cyc++;
      if (tick) begin
        if (last >= 0)
          check(cyc - last == int'(d), $sformatf("div %0d: spacing %0d", d, cyc - last));
        last = cyc;
        n--;
      end
      if (cyc > 10 * int'(d) + 100) begin
        check(1'b0, $sformatf("div %0d: no tick", d));
        n = 0;
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // disabled: no ticks
    div = 18'd5;
    begin
      int seen;
      seen = 0;
      repeat (50) begin @(negedge clk); if (tick) seen++; end
      check(seen == 0, "tick while disabled");
    end
    for (int k = 0; k < 8; k++) begin
      int unsigned d;
      case (k)
        0: d = 2;  1: d = 3;  2: d = 7;  3: d = 100;
        default: d = 2 + ($urandom % 300);
      endcase
      en = 1'b0;
      div = 18'(d);
      @(negedge clk);
      en = 1'b1;
      // first tick comes d clocks after enable
      begin
        int c;
        c = 0;
        do begin @(negedge clk); c++; end while (!tick && c < 1000);
        check(c == int'(d), $sformatf("div %0d: first tick after %0d", d, c));
      end
      measure(d, 5);
    end
    // divider 0 and 1 stop the generator
    @(negedge clk);
    div = 18'd1;
    begin
      int seen;
      seen = 0;
      repeat (3) @(negedge clk);
      repeat (50) begin @(negedge clk); if (tick) seen++; end
      check(seen == 0, "tick with divider 1");
    end
    // largest divider value: check the first period only
    en = 1'b0;
    div = 18'h3FFFF;
    @(negedge clk);
    en = 1'b1;
    measure(32'h3FFFF, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
