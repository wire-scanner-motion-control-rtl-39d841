// adc_model -- behavioural model of a parallel-output ADC for the testbenches.
//
// A falling convst_n starts a conversion: BUSY goes active LAT clocks later
// and stays active CONV clocks. When BUSY ends, the result (a new value
// each conversion, from a seeded sequence) is driven on d while cs_n is low
// and the value is pushed into a log so that testbenches can compare what
// was stored. BUSY_LOW = 1 gives an active-low BUSY (AD7484). convst_n
// rising during the conversion is allowed (pulse start) as is holding it low
// until BUSY ends (AD7938).
module adc_model #(
  parameter int unsigned DW       = 12,
  parameter int unsigned LAT      = 2,
  parameter int unsigned CONV     = 20,
  parameter bit          BUSY_LOW = 1'b0,
  parameter int unsigned SEED     = 1
) (
  input  logic          clk,
  input  logic          convst_n,
  input  logic          cs_n,
  output logic          busy,
  output logic [DW-1:0] d
);
  logic          busy_i = 1'b0;
  logic          cv_d = 1'b1;
  logic [DW-1:0] result = '0;
  logic [31:0]   lfsr = SEED;
  int            cnt = 0;
  int            conversions = 0;
  int            bad_convst = 0;   // conversion requested while busy
  logic [DW-1:0] log_q [$];

  assign busy = busy_i ^ BUSY_LOW;
  assign d    = cs_n ? '0 : result;

  always @(posedge clk) begin
    cv_d <= convst_n;
    if (cnt > 0) begin
      cnt <= cnt - 1;
      if (cnt == int'(CONV) + 1) busy_i <= 1'b1;
      if (cnt == 1) begin
        busy_i <= 1'b0;
        lfsr = lfsr * 1103515245 + 12345;
        result <= DW'(lfsr >> 7);
        log_q.push_back(DW'(lfsr >> 7));
        conversions <= conversions + 1;
      end
    end else if (cv_d && !convst_n) begin
      cnt <= int'(LAT + CONV);
    end
    if (cnt > 0 && cv_d && !convst_n) bad_convst <= bad_convst + 1;
  end
endmodule
