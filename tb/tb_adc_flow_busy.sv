// tb_adc_flow_busy -- checks the conversion flow control of
// the pulse-started ADCs (convert-start released when BUSY rises).
//
// An ADC model converts on the falling convert-start edge. For each start
// tick the flow must start exactly one conversion (convst_n falls one clock
// after the tick), release convst_n at the right moment, open a chip-select
// window of CS_CYCLES = 4 clocks starting 3 clocks after BUSY falls, and
// latch the converted value with a one-clock done pulse at the end of it.
// Starts that arrive during a conversion must be ignored without lock-up.
module tb_adc_flow_busy;
  localparam int DW = 16;
  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic          busy;
  logic [DW-1:0] adc_d;
  logic          convst_n, cs_n, done;
  logic [DW-1:0] data;
  int checks = 0, failures = 0;
  int dones = 0;

  adc_flow_busy #(.DW(DW), .CS_CYCLES(4)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .adc_d(adc_d),
    .convst_n(convst_n), .cs_n(cs_n), .data(data), .done(done)
  );

  adc_model #(.DW(DW), .LAT(2), .CONV(30), .BUSY_LOW(1'b0), .SEED(7)) adc (
    .clk(clk), .convst_n(convst_n), .cs_n(cs_n), .busy(busy), .d(adc_d)
  );

  always #5 clk = ~clk;
  always @(negedge clk) if (rst_n && done) dones++;

  initial begin
    #2ms;
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
    repeat (3) @(negedge clk);
    check(convst_n && cs_n && !done, "idle after reset");
    for (int k = 0; k < 40; k++) begin
      int t_busy_fall, t_cs, t_cv_rise, t, cs_len;
      bit seen_busy;
      seen_busy = 1'b0;
      t_busy_fall = -1; t_cs = -1; t_cv_rise = -1; cs_len = 0;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(!convst_n, "convst_n falls one clock after start");
      t = 0;
      while (t < 200 && !done) begin
        @(negedge clk);
        t++;
        if (t_cv_rise < 0 && convst_n) t_cv_rise = t;
        if (busy) seen_busy = 1'b1;
        if (t_busy_fall < 0 && seen_busy && !busy) t_busy_fall = t;
        if (!cs_n) begin
          if (t_cs < 0) t_cs = t;
          cs_len++;
          check(adc_d == adc.result, "data on bus during chip select");
        end
      end
      check(done && data == adc.log_q[adc.log_q.size() - 1],
            $sformatf("latched %h expected %h", data, adc.log_q[adc.log_q.size() - 1]));
      check(t_cs - t_busy_fall == 3, $sformatf("cs_n %0d clocks after BUSY fall",
                                               t_cs - t_busy_fall));
      check(cs_len == 4, $sformatf("chip select %0d clocks", cs_len));
      check(t_cv_rise > 0 && t_cv_rise <= 6, $sformatf("convst_n released at BUSY rise (%0d)",
                                                       t_cv_rise));
      repeat ($urandom % 20) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    check(adc.conversions == 40 && dones == 40 && adc.bad_convst == 0,
          $sformatf("%0d conversions, %0d done", adc.conversions, dones));
    check(convst_n && cs_n, "idle without start");
    // starts arriving every 1-60 clocks, many during a conversion: those
    // are ignored, the flow never locks up and every conversion completes
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      repeat ($urandom % 60) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    check(adc.bad_convst == 0 && adc.conversions == dones && adc.conversions > 80,
          $sformatf("overrun: %0d conversions, %0d done, %0d ignored edges",
                    adc.conversions, dones, adc.bad_convst));
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (100) @(negedge clk);
    check(adc.conversions == dones && data == adc.log_q[adc.log_q.size() - 1],
          "converts again after the overrun test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
