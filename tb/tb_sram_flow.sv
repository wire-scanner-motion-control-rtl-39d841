// tb_sram_flow -- checks the write/read flow of one acquisition SRAM.
//
// A model SRAM is attached. Random words are written at random moments
// (wr_trig pulses) and must end up at their addresses; each write must drive
// WE_N low first, then CE_N low for exactly one clock one clock later, with
// address and data stable and the data bus driven the whole time. VME
// read-out (rd_en) must present the addressed word with CE_N and OE_N low
// one clock later and never drive the data bus.
module tb_sram_flow;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        wr_trig = 1'b0;
  logic [17:0] wr_addr = '0;
  logic [15:0] wr_data = '0;
  logic        rd_en = 1'b0;
  logic [17:0] rd_addr = '0;
  logic [17:0] sram_a;
  logic        ce_n, we_n, oe_n, dq_oe;
  logic [15:0] dq_o, dq_i;
  int checks = 0, failures = 0;
  logic [15:0] ref_mem [int];

  sram_flow #(.AW(18), .DW(16)) dut (
    .clk(clk), .rst_n(rst_n), .wr_trig(wr_trig), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .sram_a(sram_a), .sram_ce_n(ce_n), .sram_we_n(we_n),
    .sram_oe_n(oe_n), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe)
  );

  sram_model #(.AW(18)) mem (
    .clk(clk), .a(sram_a), .ce_n(ce_n), .we_n(we_n), .oe_n(oe_n), .dq_i(dq_o),
    .dq_oe(dq_oe), .dq_o(dq_i)
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

  initial begin
    int w0, v0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(ce_n && we_n && oe_n && !dq_oe, "idle after reset");
    w0 = mem.writes;
    v0 = mem.violations;
    // writes with timing check
    for (int k = 0; k < 300; k++) begin
      logic [17:0] a;
      logic [15:0] d;
      a = (k < 200) ? 18'(k) : 18'($urandom);
      d = 16'($urandom);
      ref_mem[int'(a)] = d;
      wr_addr = a;
      wr_data = d;
      wr_trig = 1'b1;
      @(negedge clk);
      wr_trig = 1'b0;
      wr_addr = '0;
      wr_data = '0;
      check(!we_n && ce_n && dq_oe && sram_a == a && dq_o == d, "setup: WE_N low first");
      @(negedge clk);
      check(!we_n && !ce_n && sram_a == a && dq_o == d, "CE_N low one clock later");
      @(negedge clk);
      check(!we_n && ce_n, "CE_N one clock wide");
      @(negedge clk);
      check(we_n && ce_n && !dq_oe, "write finished after 3 clocks");
      repeat ($urandom % 3) @(negedge clk);
    end
    check(mem.writes - w0 == 300 && mem.violations == v0,
          $sformatf("%0d writes, %0d violations", mem.writes - w0, mem.violations - v0));
    // read-out
    rd_en = 1'b1;
    foreach (ref_mem[a]) begin
      rd_addr = 18'(a);
      @(negedge clk);
      check(!ce_n && !oe_n && we_n && !dq_oe && sram_a == 18'(a), "read cycle");
      check(dq_i == ref_mem[a], $sformatf("word %0d read %h expected %h", a, dq_i, ref_mem[a]));
    end
    rd_en = 1'b0;
    @(negedge clk);
    check(ce_n && oe_n, "read released");
    check(mem.violations == v0, "no bus contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
