// tb_orqdmux -- checks the optical ruler decoder.
//
// A model ruler moves the wire back and forth in 1 um steps; the phase pair
// (A,B) follows the quadrature sequence, forward A leading B. The position
// counter must match the model (18-bit wrap-around included), a simultaneous
// change of both phases must count one error and leave the position alone,
// the reference pulse must capture the position, the three clears must work
// and the multiplexer must give low/high words. The count appears 3 clocks
// after a phase edge, with a one-clock qd_clk pulse.
module tb_orqdmux;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        ref_p = 1'b0, pa = 1'b0, pb = 1'b0;
  logic        en = 1'b1;
  logic [1:0]  sel = 2'b00;
  logic        clr_udc = 1'b0, clr_ref = 1'b0, clr_err = 1'b0, uword = 1'b0;
  logic [17:0] dout;
  logic        qd_clk;
  logic [17:0] position;
  int checks = 0, failures = 0;
  int pos = 0, errs = 0, ph = 0, qd_count = 0;
  int ref_pos = 0;

  orqdmux #(.W(18)) dut (
    .sys_clk(clk), .areset_n(rst_n), .or_ref(ref_p), .or_phase_a(pa), .or_phase_b(pb),
    .or_mux_en(en), .or_mux_sel(sel), .or_clr_udc(clr_udc), .or_clr_ref(clr_ref),
    .or_clr_err(clr_err), .uword(uword), .data_out(dout), .position(position), .qd_clk(qd_clk)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (qd_clk) qd_count++;

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

  // phase index 0..3 -> (A,B): 00, 10, 11, 01
  function automatic logic [1:0] phase_ab(input int p);
    case (p & 3)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  task automatic apply_phase();
    {pa, pb} = phase_ab(ph);
  endtask

  task automatic step(input bit fwd, input int hold);
    @(negedge clk);
    ph = fwd ? ph + 1 : ph + 3;
    pos = fwd ? pos + 1 : pos - 1;
    apply_phase();
    repeat (hold) @(negedge clk);
  endtask

  task automatic read_reg(input logic [1:0] s, output int v);
    @(negedge clk);
    sel = s;
    uword = 1'b0;
    #1;
    v = int'(dout[15:0]);
    uword = 1'b1;
    #1;
    check(dout[17:2] == 16'd0, "high word has only two bits");
    v = v | (int'(dout[1:0]) << 16);
    uword = 1'b0;
    sel = 2'b00;
  endtask

  task automatic check_pos(input string where);
    int v;
    read_reg(2'b00, v);
    check(v == (pos & 32'h3FFFF), $sformatf("%s: position %0d model %0d", where, v,
                                            pos & 32'h3FFFF));
    check(int'(position) == v, $sformatf("%s: position output %0d", where, position));
  endtask

  initial begin
    int v, q0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check_pos("reset");
    // latency: one forward step, count visible after exactly 3 rising edges
    @(negedge clk);
    ph = ph + 1;
    pos++;
    apply_phase();
    @(negedge clk);
    @(negedge clk);
    check(dout == 18'd0, "count too early");
    @(negedge clk);
    check(dout == 18'd1 && qd_clk, "count after 3 clocks with qd_clk");
    @(negedge clk);
    check(!qd_clk, "qd_clk one clock wide");
    // random walk, steps held 1..8 clocks (at least one clock per phase state)
    q0 = qd_count;
    for (int i = 0; i < 4000; i++)
      step(($urandom % 100) < 60, 1 + ($urandom % 8));
    repeat (4) @(negedge clk);
    check_pos("random walk");
    check(qd_count - q0 == 4000, $sformatf("qd_clk pulses %0d", qd_count - q0));
    // backwards through zero: counter wraps to 2^18-1
    begin
      int p0;
      p0 = pos;
      for (int i = 0; i < p0 + 5; i++) step(1'b0, 2);
    end
    repeat (4) @(negedge clk);
    check_pos("wrap below zero");
    for (int i = 0; i < 10; i++) step(1'b1, 2);
    repeat (4) @(negedge clk);
    check_pos("back above zero");
    // reference pulse captures the position
    for (int i = 0; i < 300; i++) step(1'b1, 1);
    @(negedge clk);
    ref_p = 1'b1;
    repeat (6) @(negedge clk);
    ref_p = 1'b0;
    ref_pos = pos;
    for (int i = 0; i < 50; i++) step(1'b1, 2);
    repeat (4) @(negedge clk);
    @(negedge clk);
    sel = 2'b01;
    #1 check(int'(position) == pos, "position output ignores the multiplexer");
    read_reg(2'b01, v);
    check(v == ref_pos, $sformatf("reference %0d model %0d", v, ref_pos));
    // error: both phases change at once
    for (int k = 0; k < 7; k++) begin
      @(negedge clk);
      ph = ph + 2;
      apply_phase();
      errs++;
      repeat (5) @(negedge clk);
      for (int i = 0; i < 20; i++) step(($urandom % 2) == 1, 2);
    end
    repeat (4) @(negedge clk);
    read_reg(2'b10, v);
    check(v == errs, $sformatf("error count %0d model %0d", v, errs));
    // position unaffected by the errors: the state machine re-initialises
    // on the new state without counting it, so the model skips that jump
    check_pos("after errors");
    // select 11 and disabled mux give zero
    @(negedge clk);
    sel = 2'b11;
    #1 check(dout == 18'd0, "select 11 is zero");
    sel = 2'b00;
    en = 1'b0;
    #1 check(dout == 18'd0, "disabled mux is zero");
    en = 1'b1;
    // clears
    @(negedge clk);
    clr_err = 1'b1;
    @(negedge clk);
    clr_err = 1'b0;
    read_reg(2'b10, v);
    check(v == 0, "clear error counter");
    read_reg(2'b01, v);
    check(v == ref_pos, "reference kept by error clear");
    @(negedge clk);
    clr_ref = 1'b1;
    @(negedge clk);
    clr_ref = 1'b0;
    read_reg(2'b01, v);
    check(v == 0, "clear reference");
    @(negedge clk);
    clr_udc = 1'b1;
    @(negedge clk);
    clr_udc = 1'b0;
    pos = 0;
    check_pos("clear position");
    for (int i = 0; i < 25; i++) step(1'b1, 3);
    repeat (4) @(negedge clk);
    check_pos("count after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
