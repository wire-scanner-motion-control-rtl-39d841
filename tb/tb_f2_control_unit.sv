// tb_f2_control_unit -- checks the register map of slave FPGA 1.
//
// Writes to 0x00/0x02 (function generator divider, 18 bits), 0x0E
// (acquisition divider), 0x16 (end address, 12 bits) and 0x18 (control
// register) must be read back. Writes to the command offsets must give a
// one-clock pulse on the matching command line only, one clock after the
// transfer strobe. Reads of 0x04-0x0A must steer the ruler multiplexer
// (reference/error, low/high word) and return its data; 0x12 returns the
// status and 0x14 the ROM read-out with its output enable.
module tb_f2_control_unit;
  import wsmcc_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  lbus_t       lb;
  logic [17:0] ruler_data = 18'd0;
  logic [9:0]  status = 10'd0;
  logic [15:0] fg_rdata = 16'd0;
  logic [17:0] fg_div;
  logic [15:0] acq_div;
  logic [11:0] fg_end;
  f2_ctrl_t    ctrl;
  logic clr_ref, clr_err, clr_udc, clr_mem, set_fff, clr_fgaddr, start, motion_rst, f2_rst;
  logic [1:0]  or_mux_sel;
  logic        uword, fg_oe;
  logic [15:0] rdata;
  int checks = 0, failures = 0;
  int pulses [9];

  f2_control_unit dut (
    .clk(clk), .rst_n(rst_n), .lbus(lb), .ruler_data(ruler_data), .status(status),
    .fg_rdata(fg_rdata), .fg_div(fg_div), .acq_div(acq_div), .fg_end(fg_end), .ctrl(ctrl),
    .clr_ref(clr_ref), .clr_err(clr_err), .clr_udc(clr_udc), .clr_mem(clr_mem),
    .set_fff(set_fff), .clr_fgaddr(clr_fgaddr), .start(start), .motion_rst(motion_rst),
    .f2_rst(f2_rst), .or_mux_sel(or_mux_sel), .uword(uword), .fg_oe(fg_oe), .rdata(rdata)
  );

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    if (clr_ref)    pulses[0]++;
    if (clr_err)    pulses[1]++;
    if (clr_udc)    pulses[2]++;
    if (clr_mem)    pulses[3]++;
    if (set_fff)    pulses[4]++;
    if (clr_fgaddr) pulses[5]++;
    if (start)      pulses[6]++;
    if (motion_rst) pulses[7]++;
    if (f2_rst)     pulses[8]++;
  end

  initial begin
    #1ms;
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

  task automatic write(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk);
    lb = '0;
    lb.en = 1'b1; lb.wr = 1'b1; lb.addr = a; lb.wdata = d;
    repeat (3) @(negedge clk);
    lb.stb = 1'b1;
    @(negedge clk);
    lb = '0;
  endtask

  task automatic read(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk);
    lb = '0;
    lb.en = 1'b1; lb.rd = 1'b1; lb.addr = a;
    repeat (3) @(negedge clk);
    lb.stb = 1'b1;
    d = rdata;
    @(negedge clk);
    lb = '0;
  endtask

  initial begin
    logic [15:0] d;
    int prev_cnt [9];
    lb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (pulses[i]) pulses[i] = 0;
    check(fg_end == 12'hFFF && ctrl == '0 && fg_div == '0, "reset values");
    // read/write registers
    for (int k = 0; k < 20; k++) begin
      logic [15:0] lo, hi, ad, en, cr;
      lo = 16'($urandom); hi = 16'($urandom); ad = 16'($urandom);
      en = 16'($urandom); cr = 16'($urandom);
      write(8'h00, lo);
      write(8'h02, hi);
      write(8'h0E, ad);
      write(8'h16, en);
      write(8'h18, cr);
      check(fg_div == {hi[1:0], lo} && acq_div == ad && fg_end == en[11:0] &&
            ctrl == f2_ctrl_t'(cr[7:0]), "register outputs");
      read(8'h00, d); check(d == lo, "read divider low");
      read(8'h02, d); check(d == {14'd0, hi[1:0]}, "read divider high");
      read(8'h0E, d); check(d == ad, "read acquisition divider");
      read(8'h16, d); check(d == {4'd0, en[11:0]}, "read end address");
      read(8'h18, d); check(d == {8'd0, cr[7:0]}, "read control register");
    end
    foreach (pulses[i]) check(pulses[i] == 0, $sformatf("no command from registers (%0d)", i));
    // command offsets -> which pulse counters must move
    begin
      static logic [7:0] cmd_a [8] = '{8'h04, 8'h08, 8'h0C, 8'h10, 8'h12, 8'h14, 8'h1A, 8'h1C};
      for (int c = 0; c < 9; c++) begin
        logic [7:0] a;
        logic [8:0] expect_mask;
        a = (c < 8) ? cmd_a[c] : 8'h1E;
        case (c)
          0: expect_mask = 9'b000000001;
          1: expect_mask = 9'b000000010;
          2: expect_mask = 9'b000000100;
          3: expect_mask = 9'b000001000;
          4: expect_mask = 9'b000010000;
          5: expect_mask = 9'b000101000; // clears read-out and generator address
          6: expect_mask = 9'b001000000;
          7: expect_mask = 9'b010000000;
          default: expect_mask = 9'b100000000;
        endcase
        foreach (prev_cnt[i]) prev_cnt[i] = pulses[i];
        write(a, 16'h0);
        repeat (2) @(negedge clk);
        for (int i = 0; i < 9; i++)
          check(pulses[i] - prev_cnt[i] == int'(expect_mask[i]),
                $sformatf("write %h: line %0d pulsed %0d times", a, i, pulses[i] - prev_cnt[i]));
      end
    end
    // pulse timing: one clock after the strobe
    fork
      write(8'h1A, 16'h0);
      begin
        wait (lb.stb);
        @(negedge clk);
        check(start, "start one clock after the strobe");
        @(negedge clk);
        check(!start, "start one clock wide");
      end
    join
    // ruler multiplexer during reads
    @(negedge clk);
    lb = '0; lb.en = 1'b1; lb.rd = 1'b1;
    ruler_data = 18'h2ABCD;
    lb.addr = 8'h04; #1 check(or_mux_sel == 2'b01 && !uword && rdata == 16'hABCD, "ref low");
    lb.addr = 8'h06; #1 check(or_mux_sel == 2'b01 && uword, "ref high");
    lb.addr = 8'h08; #1 check(or_mux_sel == 2'b10 && !uword, "err low");
    lb.addr = 8'h0A; #1 check(or_mux_sel == 2'b10 && uword, "err high");
    lb.addr = 8'h12; status = 10'h2A5; #1 check(rdata == 16'h02A5, "status read");
    lb.addr = 8'h14; fg_rdata = 16'h0123; #1 check(fg_oe && rdata == 16'h0123, "ROM read-out");
    lb.addr = 8'h16; #1 check(!fg_oe, "fg_oe only at 0x14");
    lb.en = 1'b0; lb.addr = 8'h04; #1 check(or_mux_sel == 2'b00 && rdata == 16'h0, "idle");
    lb = '0;
    // writes without the enable do nothing
    write(8'h18, 16'h0000);
    @(negedge clk);
    lb.wr = 1'b1; lb.stb = 1'b1; lb.addr = 8'h18; lb.wdata = 16'h00FF;
    @(negedge clk);
    lb = '0;
    check(ctrl == '0, "write needs enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
