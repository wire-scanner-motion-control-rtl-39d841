// tb_error_register -- checks the error hold register at the card's rates.
//
// With a 40 MHz clock the lines are sampled every 40,000 clocks (1 kHz). An
// error line that goes low must be held within one sample period (plus the
// two synchroniser clocks), must stay held after the line recovers, must
// raise scan_inhibit and must not disturb the other bits. A reset sets all
// bits to 1 again. Several errors accumulate.
module tb_error_register;
  localparam int N = 25;
  localparam int DIV = 40_000;
  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] err_in = '1;
  logic [N-1:0] q;
  logic         scan_inhibit;
  int checks = 0, failures = 0;

  error_register #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .err_in(err_in), .q(q), .scan_inhibit(scan_inhibit)
  );

  always #5 clk = ~clk;

  initial begin
    #100ms;
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

  // Drop line b for 'low' clocks; return clocks until q[b] fell (or -1).
  task automatic drop(input int b, input int low, output int lat);
    lat = -1;
    @(negedge clk);
    err_in[b] = 1'b0;
    for (int c = 1; c <= DIV + 10; c++) begin
      @(negedge clk);
      if (c == low) err_in[b] = 1'b1;
      if (lat < 0 && !q[b]) lat = c;
    end
    err_in[b] = 1'b1;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    int lat;
    logic [N-1:0] exp_q;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(q == '1 && !scan_inhibit, "reset state all ones");
    // no error for several sample periods
    repeat (3 * DIV) @(negedge clk);
    check(q == '1 && !scan_inhibit, "no error held");
    // single error, line low for 2 ms: held within one sample period
    exp_q = '1;
    for (int k = 0; k < 5; k++) begin
      int b;
      b = (k == 0) ? 0 : (k == 1) ? N - 1 : int'($urandom % N);
      drop(b, 2 * DIV, lat);
      exp_q[b] = 1'b0;
      check(lat > 0 && lat <= DIV + 3, $sformatf("bit %0d held after %0d clocks", b, lat));
      repeat (2 * DIV) @(negedge clk);
      check(q == exp_q, $sformatf("held pattern %h expected %h", q, exp_q));
      check(scan_inhibit, "scan inhibit with held error");
    end
    // reset clears everything
    do_reset();
    check(q == '1 && !scan_inhibit, "reset clears held errors");
    // a line low for a full sample period is always caught, even when it
    // has recovered long before it is looked at
    drop(7, DIV + 1, lat);
    check(lat > 0 && !q[7] && (q | 25'h80) == '1, "error over one period caught and held");
    do_reset();
    // lines that recover before the next sample are not caught by that
    // sample: with a 100-clock error only some placements are caught, the
    // register must never invent errors on other bits
    begin
      int caught;
      caught = 0;
      for (int k = 0; k < 20; k++) begin
        repeat ($urandom % DIV) @(negedge clk);
        drop(3, 100, lat);
        if (lat > 0) caught++;
        check((q | 25'h8) == '1, "only the dropped bit may be held");
        do_reset();
      end
      check(caught < 5, $sformatf("short glitches caught %0d of 20", caught));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
