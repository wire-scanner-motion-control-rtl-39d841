// tb_vme_slotsel_and_dtack -- checks the VME address verifier and DTACK.
//
// A model bus master runs single cycles and block transfers. Accepted:
// AM 0x29/0x2D/0x39/0x3D/0x3B/0x3F with A[23:20] equal to the inverted
// slot switch; then DTACK comes DTACK_DELAY = 4 clocks after chip select
// (6 clocks after the data strobe, with the two synchroniser clocks), with
// one xfer pulse per cycle, and drops after the strobes are released.
// Rejected: any other AM and any other slot - no DTACK at all. A wait
// request holds DTACK off. In a block transfer the address advances by 2 per
// data cycle. The access LED is tested with LED_BITS = 8 (256 clocks).
module tb_vme_slotsel_and_dtack;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [23:1] vme_a = '0;
  logic [5:0]  vme_am = '0;
  logic        as_n = 1'b1;
  logic [1:0]  ds_n = 2'b11;
  logic        write_n = 1'b1;
  logic [3:0]  ga_n = 4'hA;        // slot 5
  logic        wait_req = 1'b0;
  logic        cs, ctrl_n, write_q, xfer, dtack, led;
  logic [23:0] addr_q;
  int checks = 0, failures = 0;
  int xfers = 0;

  vme_slotsel_and_dtack #(.DTACK_DELAY(4), .LED_BITS(8)) dut (
    .clk(clk), .rst_n(rst_n), .vme_a(vme_a), .vme_am(vme_am), .vme_as_n(as_n),
    .vme_ds_n(ds_n), .vme_write_n(write_n), .ga_n(ga_n), .wait_req(wait_req), .cs(cs),
    .ctrl_n(ctrl_n), .addr_q(addr_q), .write_q(write_q), .xfer(xfer), .dtack(dtack), .led(led)
  );

  always #5 clk = ~clk;
  always @(negedge clk) if (rst_n && xfer) xfers++;

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

  // One single cycle; returns the clocks from DS low to DTACK (-1: none).
  task automatic cycle(input logic [23:0] a, input logic [5:0] am, input bit wr, output int lat);
    @(negedge clk);
    vme_a = a[23:1];
    vme_am = am;
    write_n = !wr;
    @(negedge clk);
    as_n = 1'b0;
    @(negedge clk);
    ds_n = 2'b00;
    lat = -1;
    for (int c = 1; c <= 40; c++) begin
      @(negedge clk);
      if (dtack) begin lat = c; break; end
    end
    ds_n = 2'b11;
    as_n = 1'b1;
    repeat (4) @(negedge clk);
    check(!dtack && !cs, "DTACK released after the strobes");
  endtask

  initial begin
    int lat, x0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // accepted modes
    for (int i = 0; i < 6; i++) begin
      logic [5:0] am;
      logic [23:0] a;
      am = (i == 0) ? 6'h29 : (i == 1) ? 6'h2D : (i == 2) ? 6'h39 :
           (i == 3) ? 6'h3D : (i == 4) ? 6'h3B : 6'h3F;
      a = {4'h5, 20'(($urandom % 65536) * 2)};
      x0 = xfers;
      cycle(a, am, i[0], lat);
      check(lat == 6, $sformatf("AM %h: DTACK after %0d clocks", am, lat));
      check(xfers - x0 == 1, "one xfer per cycle");
      check(addr_q == a && write_q == i[0] && ctrl_n == am[4],
            $sformatf("registered address %h ctrl %b", addr_q, ctrl_n));
    end
    // rejected address modifiers
    for (int k = 0; k < 30; k++) begin
      logic [5:0] am;
      do am = 6'($urandom); while (am inside {6'h29, 6'h2D, 6'h39, 6'h3D, 6'h3B, 6'h3F});
      cycle({4'h5, 20'h00040}, am, 1'b0, lat);
      check(lat < 0, $sformatf("AM %h must not be answered", am));
    end
    // rejected slots
    for (int s = 0; s < 16; s++) begin
      cycle({4'(s), 20'h00040}, 6'h29, 1'b0, lat);
      check((s == 5) ? (lat == 6) : (lat < 0), $sformatf("slot %0d answered %0d", s, lat));
    end
    ga_n = 4'h0;                   // slot 15
    cycle({4'hF, 20'h00010}, 6'h2D, 1'b1, lat);
    check(lat == 6, "slot 15");
    ga_n = 4'hA;
    // wait request holds DTACK
    fork
      cycle({4'h5, 20'h00090}, 6'h29, 1'b0, lat);
      begin
        @(negedge clk);
        wait_req = 1'b1;
        repeat (25) @(negedge clk);
        wait_req = 1'b0;
      end
    join
    check(lat > 20, $sformatf("DTACK waits for the request (%0d)", lat));
    // block transfer: AS low, 8 data cycles
    @(negedge clk);
    vme_a = 23'h280100;            // 0x500200
    vme_am = 6'h3B;
    write_n = 1'b1;
    @(negedge clk);
    as_n = 1'b0;
    x0 = xfers;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      ds_n = 2'b00;
      lat = -1;
      for (int c = 1; c <= 40; c++) begin
        @(negedge clk);
        if (dtack) begin lat = c; break; end
      end
      check(lat == 6 && addr_q == 24'h500200 + 24'(2 * k),
            $sformatf("BLT beat %0d: lat %0d addr %h", k, lat, addr_q));
      ds_n = 2'b11;
      repeat (4) @(negedge clk);
      check(!dtack, "DTACK released between beats");
    end
    as_n = 1'b1;
    check(xfers - x0 == 8, "eight BLT transfers");
    // access LED: on after DTACK, off 256 clocks later
    repeat (300) @(negedge clk);
    check(!led, "LED off when idle");
    cycle({4'h5, 20'h00042}, 6'h29, 1'b0, lat);
    check(led, "LED on after access");
    repeat (260) @(negedge clk);
    check(!led, "LED off again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
