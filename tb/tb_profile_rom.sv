// tb_profile_rom -- checks the three motion profiles.
//
// Fast profile: the tabulated points of the card's profile (205 at the
// start, 2045/2047/2048/2050 around the middle, 3890 at the end), monotonic
// rise, and point symmetry about the middle. Offset profile: 0 to 205 in a
// straight line. Slow profile: y = x. "No operation" holds the last output.
// The read is synchronous: data must appear one clock after the address.
module tb_profile_rom;
  logic        clk = 1'b0;
  logic [11:0] addr = 12'd0;
  logic [1:0]  fm = 2'b01;
  logic [11:0] data;
  int checks = 0, failures = 0;
  logic [11:0] fast [4096];

  profile_rom #(.AW(12), .DW(12)) dut (.clk(clk), .addr(addr), .func_mode(fm), .data(data));

  always #5 clk = ~clk;

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

  task automatic rd(input logic [1:0] m, input int a, output logic [11:0] d);
    @(negedge clk);
    fm = m;
    addr = 12'(a);
    @(negedge clk);
    d = data;
  endtask

  initial begin
    logic [11:0] d;
    int sym;
    // latency: a new address is visible after exactly one rising edge
    @(negedge clk);
    fm = 2'b10;
    addr = 12'd100;
    @(negedge clk);
    addr = 12'd200;
    #1;
    check(data == 12'd100, "slow profile data one clock after address");
    @(negedge clk);
    check(data == 12'd200, "second address");
    // fast profile
    for (int a = 0; a < 4096; a++) begin
      rd(2'b01, a, d);
      fast[a] = d;
    end
    check(fast[0] == 12'd205 && fast[1] == 12'd205, "fast start 205");
    check(fast[2046] == 12'd2045, $sformatf("fast[2046]=%0d", fast[2046]));
    check(fast[2047] == 12'd2047, $sformatf("fast[2047]=%0d", fast[2047]));
    check(fast[2048] == 12'd2048, $sformatf("fast[2048]=%0d", fast[2048]));
    check(fast[2049] == 12'd2050, $sformatf("fast[2049]=%0d", fast[2049]));
    check(fast[4094] == 12'd3890 && fast[4095] == 12'd3890, "fast end 3890");
    for (int a = 1; a < 4096; a++)
      check(fast[a] >= fast[a-1], $sformatf("fast not monotonic at %0d", a));
    sym = 0;
    for (int a = 0; a < 2048; a++)
      if ((int'(fast[a]) + int'(fast[4095-a]) - 4095) > 1 ||
          (int'(fast[a]) + int'(fast[4095-a]) - 4095) < -1) sym++;
    check(sym == 0, $sformatf("fast profile not symmetric at %0d points", sym));
    // steepest in the middle: the linear part climbs about 2 per step
    check(int'(fast[2100]) - int'(fast[2000]) > 150, "linear part slope");
    check(int'(fast[100]) - int'(fast[0]) < 40, "acceleration part slope");
    // offset profile: round(205 * x / 4096)
    for (int k = 0; k < 200; k++) begin
      int a;
      a = (k == 0) ? 0 : (k == 1) ? 4095 : int'($urandom % 4096);
      rd(2'b00, a, d);
      check(int'(d) - (205 * a + 2048) / 4096 <= 1 && (205 * a + 2048) / 4096 - int'(d) <= 1,
            $sformatf("offset[%0d]=%0d", a, d));
    end
    // slow profile: y = x
    for (int k = 0; k < 300; k++) begin
      int a;
      a = int'($urandom % 4096);
      rd(2'b10, a, d);
      check(d == 12'(a), $sformatf("slow[%0d]=%0d", a, d));
    end
    // no operation keeps the output
    rd(2'b10, 1234, d);
    rd(2'b11, 7, d);
    check(d == 12'd1234, "NOP holds output");
    rd(2'b11, 4000, d);
    check(d == 12'd1234, "NOP holds output 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
