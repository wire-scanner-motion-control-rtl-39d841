// adc_flow_busy -- conversion flow control of the potentiometer ADC (AD7677)
// and of the logarithmic amplifier ADC (AD7484).
//
// Both ADCs start converting at the falling edge of convst_n and need it only
// as a pulse: a start tick pulls convst_n low and the rising edge of BUSY
// releases it. When BUSY falls the data of the current conversion is valid
// (parallel mode 1), and a chip-select/read window of CS_CYCLES clocks is
// opened for the SRAM write; the result is latched in its last clock (done
// pulse). One entity serves both parts; the AD7484's BUSY has the opposite
// level and is inverted outside. This follows the card; the synchronised
// edge detection is this design's.
//
// A start while a conversion is still in progress (from the accepted start
// to the done pulse) is ignored: the ADC would ignore the second
// convert-start edge and the flow would wait for it forever.
//
// Timing: convst_n falls one clock after start and rises 3 clocks after BUSY
// rises; cs_n falls 3 clocks after BUSY falls.
module adc_flow_busy #(
  parameter int unsigned DW        = 16,
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
  logic       busy_rise, busy_fall;
  logic [$clog2(CS_CYCLES+1)-1:0] cs_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_s <= '0;
    else        busy_s <= {busy_s[1:0], busy};
  end

  assign busy_rise = busy_s[1] && !busy_s[2];
  assign busy_fall = busy_s[2] && !busy_s[1];

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
      if (busy_rise)
        convst_n <= 1'b1;
      else if (start && !conv)
        convst_n <= 1'b0;
      if (busy_fall) begin
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
