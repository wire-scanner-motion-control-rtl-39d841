// profile_rom -- the three motion profile ROMs of the function generator.
//
// Each ROM holds 2^AW words of DW bits; the word at address x is the motor
// set value (DAC code) at step x of a scan. The profiles are:
//   FuncMode 00  linear offset profile: y = round(Yoff/(Xmax+1) * x), used to
//                move the wire from the hard end to about 5 % of the stroke;
//   FuncMode 01  fast scan profile: a quadratic acceleration part
//                a*x^2 + Yoff, a linear constant-speed part b*x + c + Yoff
//                covering 25 % of the full range around the middle, and a
//                quadratic deceleration part -a*(x-Xmax)^2 + Yrange + Yoff;
//   FuncMode 10  linear slow scan profile: y = round((Ymax+1)/(Xmax+1) * x);
//   FuncMode 11  no operation: the output keeps its last value.
// with Ymax = 2^DW-1, Xmax = 2^AW-1, Yoff = round(0.05*Ymax),
// Yrange = Ymax - 2*Yoff, Ymid = Yrange/2, Xmid = Xmax/2,
// Y1 = Ymid - 0.25*Ymax/2, X1 = 2*Xmid*Y1/(Ymid+Y1), X2 = Xmax - X1,
// a = Y1/X1^2, b = 2*a*X1, c = Y1 - b*X1. The acceleration part is used for
// x < round(X1), the linear part for round(X1) <= x < round(X2).
//
// The profiles and their equations are the ones of the card's design; there
// they are generated off-line and loaded as memory initialisation files. Here
// the same equations are evaluated when the ROM is elaborated, so the
// contents follow AW and DW. At AW = DW = 12 the fast profile starts at 205,
// passes 2047/2048 at addresses 2047/2048 and ends at 3890.
//
// Timing: synchronous read, data valid one clock after the address (as an
// FPGA block RAM).
module profile_rom
  import wsmcc_pkg::*;
#(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 12
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [1:0]    func_mode,
  output logic [DW-1:0] data
);

  localparam int unsigned DEPTH = 2 ** AW;

  function automatic logic [DW-1:0] prof_offset(input int unsigned x);
    real ymax, xmax, yoff;
    ymax = 2.0 ** DW - 1.0;
    xmax = 2.0 ** AW - 1.0;
    yoff = real'(longint'(0.05 * ymax));
    return DW'(longint'((yoff / (xmax + 1.0)) * real'(x)));
  endfunction

  function automatic logic [DW-1:0] prof_fast(input int unsigned x);
    real ymax, xmax, yoff, yrange, ymid, xmid, y1, x1, x2, a, b, c, xr, y;
    ymax   = 2.0 ** DW - 1.0;
    xmax   = 2.0 ** AW - 1.0;
    yoff   = real'(longint'(0.05 * ymax));
    yrange = ymax - 2.0 * yoff;
    ymid   = yrange / 2.0;
    xmid   = xmax / 2.0;
    y1     = ymid - (0.25 * ymax) / 2.0;
    x1     = (2.0 * xmid * y1) / (ymid + y1);
    x2     = xmax - x1;
    a      = y1 / (x1 * x1);
    b      = 2.0 * a * x1;
    c      = y1 - b * x1;
    xr     = real'(x);
    if (longint'(x) < longint'(x1))
      y = a * xr * xr + yoff;
    else if (longint'(x) < longint'(x2))
      y = b * xr + c + yoff;
    else
      y = -a * (xr - xmax) * (xr - xmax) + yrange + yoff;
    return DW'(longint'(y));
  endfunction

  function automatic logic [DW-1:0] prof_linear(input int unsigned x);
    real ymax, xmax;
    ymax = 2.0 ** DW - 1.0;
    xmax = 2.0 ** AW - 1.0;
    return DW'(longint'(((ymax + 1.0) / (xmax + 1.0)) * real'(x)));
  endfunction

  logic [DW-1:0] rom_offset [DEPTH];
  logic [DW-1:0] rom_fast   [DEPTH];
  logic [DW-1:0] rom_linear [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      rom_offset[i] = prof_offset(i);
      rom_fast[i]   = prof_fast(i);
      rom_linear[i] = prof_linear(i);
    end
  end

  always_ff @(posedge clk) begin
    case (func_mode)
      FM_OFFSET: data <= rom_offset[addr];
      FM_FAST:   data <= rom_fast[addr];
      FM_SLOW:   data <= rom_linear[addr];
      default:   data <= data;
    endcase
  end

endmodule
