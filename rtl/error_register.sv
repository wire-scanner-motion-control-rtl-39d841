// error_register -- holds the card's error status lines (slave FPGA 2).
//
// Each status line comes from a comparator and is 1 when the surveyed value
// is fine and 0 on an error. The lines are sampled at SAMPLE_HZ (1 kHz); on
// each sample every register bit is loaded with (its own output AND the
// input), so a 0 stays until the asynchronous reset sets all bits to 1 again.
// Any held 0 raises scan_inhibit, which stops new scans from starting. With
// 1 kHz sampling an error is registered within about 1 ms. The AND feedback,
// the asynchronous set-to-one reset and the 1 kHz rate are the card's design;
// the two-flip-flop input synchroniser and the sample enable derived from
// the system clock are this design's.
module error_register #(
  parameter int unsigned N         = 25,
  parameter int unsigned CLK_HZ    = 40_000_000,
  parameter int unsigned SAMPLE_HZ = 1000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] err_in,
  output logic [N-1:0] q,
  output logic         scan_inhibit
);

  localparam int unsigned DIV = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned CW  = $clog2(DIV);

  logic [CW-1:0] cnt;
  logic          sample;
  logic [N-1:0]  s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      sample <= 1'b0;
      s1     <= '1;
      s2     <= '1;
    end else begin
      s1 <= err_in;
      s2 <= s1;
      if (cnt == CW'(DIV - 1)) begin
        cnt    <= '0;
        sample <= 1'b1;
      end else begin
        cnt    <= cnt + CW'(1);
        sample <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '1;
    else if (sample) q <= q & s2;
  end

  assign scan_inhibit = ~&q;

endmodule
