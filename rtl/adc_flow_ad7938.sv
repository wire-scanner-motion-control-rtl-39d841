// adc_flow_ad7938 -- conversion flow control of the multiplexed diagnostics
// ADC (AD7938).
//
// This ADC needs its conversion-start input held low for the whole
// conversion. A start tick (acquisition clock) pulls convst_n low; when the
// ADC's BUSY falls (conversion end) a one-clock one-shot releases convst_n
// and opens a chip-select/read window of CS_CYCLES clocks. The window keeps
// the ADC data on the bus long enough for the SRAM write, and the result is
// latched in its last clock (done pulse). The order of events follows the
// card's three-flip-flop circuit (acquisition clock sets CONVST_N low, the
// BUSY one-shot sets it high); implementing it as edge detection in the
// system clock with a synchronised BUSY is this design's choice.
//
// A start while a conversion is still in progress (from the accepted start
// to the done pulse) is ignored: the ADC would ignore the second
// convert-start edge and the flow would wait for it forever.
//
// Timing: convst_n falls one clock after start; cs_n falls 3 clocks after
// BUSY falls and stays low CS_CYCLES clocks.
module adc_flow_ad7938 #(
  parameter int unsigned DW        = 12,
  parameter int unsigned CS_CYCLES = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          busy,
  input  logic [DW-1:0] adc_d,
  output logic          convst_n,
  output logic          cs_n,
  output logic [DW-1:0] data,
  output logic          done
);

  logic [2:0] busy_s;
  logic       conv;     // a conversion is in progress (start until done)
  logic       oneshot;
  logic [$clog2(CS_CYCLES+1)-1:0] cs_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_s <= '0;
    else        busy_s <= {busy_s[1:0], busy};
  end

  assign oneshot = busy_s[2] && !busy_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      convst_n <= 1'b1;
      cs_n     <= 1'b1;
      cs_cnt   <= '0;
      data     <= '0;
      done     <= 1'b0;
      conv     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !conv)
        conv <= 1'b1;
      else if (done)
        conv <= 1'b0;
      if (oneshot)
        convst_n <= 1'b1;
      else if (start && !conv)
        convst_n <= 1'b0;
      if (oneshot) begin
        cs_n   <= 1'b0;
        cs_cnt <= ($bits(cs_cnt))'(CS_CYCLES - 1);
      end else if (!cs_n) begin
        if (cs_cnt == '0) begin
          cs_n <= 1'b1;
          data <= adc_d;
          done <= 1'b1;
        end else begin
          cs_cnt <= cs_cnt - 1'b1;
        end
      end
    end
  end

endmodule
