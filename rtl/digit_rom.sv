// digit_rom: one-bit ROM with the ten 16x16 digits used for the coin, level,
// attack and hit-point read-outs.
//
// Ten digits of 16 x 16 pixels at one bit per pixel (320 bytes), as in the
// published picture table. Pixel (x, y) of digit d is at address
// (d*16 + y)*16 + x. The read is registered (latency one clock).
//
// The digit shapes are this design's own: seven-segment digits computed when
// the ROM is initialised. The segments are two pixels thick:
//   a: rows 1-2,   columns 4-11      d: rows 13-14, columns 4-11
//   g: rows 7-8,   columns 4-11
//   f: columns 2-3,   rows 2-7       b: columns 12-13, rows 2-7
//   e: columns 2-3,   rows 8-13      c: columns 12-13, rows 8-13
module digit_rom
  import mc_pkg::*;
#(
  localparam int unsigned DEPTH = DIG_W * DIG_H * DIG_N,
  localparam int unsigned ADDR_W    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [ADDR_W-1:0] addr,
  output logic          q
);

  logic mem [DEPTH];

  // Segments lit per digit, {a,b,c,d,e,f,g}.
  function automatic logic [6:0] segments(input int d);
    case (d)
      0: return 7'b1111110;
      1: return 7'b0110000;
      2: return 7'b1101101;
      3: return 7'b1111001;
      4: return 7'b0110011;
      5: return 7'b1011011;
      6: return 7'b1011111;
      7: return 7'b1110000;
      8: return 7'b1111111;
      default: return 7'b1111011;
    endcase
  endfunction

  function automatic logic pixel(input int d, input int col, input int row);
    logic [6:0] s;
    logic mid_x, left, right, upper, lower;
    s     = segments(d);
    mid_x = (col >= 4 && col <= 11);
    left  = (col == 2 || col == 3);
    right = (col == 12 || col == 13);
    upper = (row >= 2 && row <= 7);
    lower = (row >= 8 && row <= 13);
    return (s[6] && mid_x && (row == 1 || row == 2))   ||
           (s[5] && right && upper)                ||
           (s[4] && right && lower)                ||
           (s[3] && mid_x && (row == 13 || row == 14)) ||
           (s[2] && left && lower)                 ||
           (s[1] && left && upper)                 ||
           (s[0] && mid_x && (row == 7 || row == 8));
  endfunction

  initial begin
    for (int d = 0; d < int'(DIG_N); d++)
      for (int y = 0; y < int'(DIG_H); y++)
        for (int x = 0; x < int'(DIG_W); x++)
          mem[(d * int'(DIG_H) + y) * int'(DIG_W) + x] = pixel(d, x, y);
  end

  always_ff @(posedge clk) q <= mem[addr];

endmodule
