// tb_sevenseg_display -- checks the error character display.
//
// Runs with a 20 kHz clock so that the 0.5 s step is 10,000 clocks. No
// error: an underscore. One error: its character, steady. Several errors: the
// characters take turns, each shown for one step. Every one of the 25
// characters is checked against the card's common-anode code table
// (a = bit 7 ... dp = bit 0, 0 = segment lit).
module tb_sevenseg_display;
  localparam int N = 25;
  localparam int STEP = 10_000;
  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] err = '1;
  logic [7:0]   seg_n;
  int checks = 0, failures = 0;

  // 0-9, A b C d E F, I J L M n o P r t
  localparam logic [7:0] CODE [N] = '{
    8'h03, 8'h9F, 8'h25, 8'h0D, 8'h99, 8'h49, 8'h41, 8'h1F, 8'h01, 8'h09,
    8'h11, 8'hC1, 8'h63, 8'h85, 8'h61, 8'h71,
    8'hF3, 8'h87, 8'hE3, 8'h57, 8'hD5, 8'hC5, 8'h31, 8'hF5, 8'hE1};
  localparam logic [7:0] NONE = 8'hEF;

  sevenseg_display #(.N(N), .CLK_HZ(20_000), .STEP_MS(500)) dut (
    .clk(clk), .rst_n(rst_n), .err(err), .seg_n(seg_n)
  );

  always #5 clk = ~clk;

  initial begin
    #50ms;
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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(seg_n == NONE, "underscore after reset");
    repeat (3 * STEP) @(negedge clk);
    check(seg_n == NONE, "underscore with no error");
    // each character on its own
    for (int b = 0; b < N; b++) begin
      err = '1;
      err[b] = 1'b0;
      repeat (N + 4) @(negedge clk);
      check(seg_n == CODE[b], $sformatf("bit %0d shows %h expected %h", b, seg_n, CODE[b]));
    end
    // one error stays on over several steps
    err = '1;
    err[5] = 1'b0;
    repeat (N + 4) @(negedge clk);
    begin
      int bad;
      bad = 0;
      repeat (3 * STEP) begin
        @(negedge clk);
        if (seg_n != CODE[5]) bad++;
      end
      check(bad == 0, "single error steady");
    end
    // two errors alternate every step
    err = '1;
    err[3] = 1'b0;
    err[12] = 1'b0;
    repeat (N + 4) @(negedge clk);
    begin
      int changes, shown3, shown12, other, run, minrun, maxrun;
      logic [7:0] last;
      changes = 0; shown3 = 0; shown12 = 0; other = 0; run = 0;
      minrun = 1 << 30; maxrun = 0;
      last = seg_n;
      repeat (6 * STEP) begin
        @(negedge clk);
        if (seg_n == CODE[3]) shown3++;
        else if (seg_n == CODE[12]) shown12++;
        else other++;
        run++;
        if (seg_n != last) begin
          if (changes > 0) begin
            if (run < minrun) minrun = run;
            if (run > maxrun) maxrun = run;
          end
          changes++;
          run = 0;
          last = seg_n;
        end
      end
      check(other == 0, "only the two error characters");
      check(changes >= 5 && changes <= 7, $sformatf("%0d changes in 3 s", changes));
      check(minrun >= STEP - 2 && maxrun <= STEP + N + 2,
            $sformatf("step length %0d..%0d", minrun, maxrun));
    end
    // errors gone: underscore again
    err = '1;
    repeat (2 * N + 4) @(negedge clk);
    check(seg_n == NONE, "underscore after errors clear");
    // reset while showing
    err[20] = 1'b0;
    repeat (N + 4) @(negedge clk);
    check(seg_n == CODE[20], "show n");
    rst_n = 1'b0;
    @(negedge clk);
    check(seg_n == NONE, "reset shows underscore");
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
