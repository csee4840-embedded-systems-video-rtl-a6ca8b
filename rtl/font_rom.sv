// font_rom: one-bit 5x8 character ROM for the text on screen.
//
// It holds FONT_N = 53 glyphs of 5 x 8 pixels, one bit per pixel, as in the
// published picture table (265 bytes). Pixel (col, row) of glyph g is at
// address g*40 + row*5 + col; a 1 is drawn, a 0 is transparent. The read is
// registered: the bit for the address sampled on a clock edge appears after
// that edge (latency one clock).
//
// Glyph numbering is this design's choice: 0 is the space, 1..26 are the
// letters A..Z, 27..36 the digits 0..9; the remaining codes are blank. The
// letter shapes are a common 5x7 pixel font (bottom row empty), written below
// as five column bytes per glyph, bit r of a column byte being row r.
module font_rom
  import mc_pkg::*;
#(
  localparam int unsigned DEPTH = FONT_W * FONT_H * FONT_N,
  localparam int unsigned ADDR_W    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [ADDR_W-1:0] addr,
  output logic          q
);

  logic mem [DEPTH];

  // Five column bytes, leftmost column in the top byte.
  function automatic logic [39:0] glyph_cols(input int code);
    case (code)
      1:  return 40'h7C_12_11_12_7C;  // A
      2:  return 40'h7F_49_49_49_36;  // B
      3:  return 40'h3E_41_41_41_22;  // C
      4:  return 40'h7F_41_41_41_3E;  // D
      5:  return 40'h7F_49_49_49_41;  // E
      6:  return 40'h7F_09_09_09_01;  // F
      7:  return 40'h3E_41_41_51_73;  // G
      8:  return 40'h7F_08_08_08_7F;  // H
      9:  return 40'h00_41_7F_41_00;  // I
      10: return 40'h20_40_41_3F_01;  // J
      11: return 40'h7F_08_14_22_41;  // K
      12: return 40'h7F_40_40_40_40;  // L
      13: return 40'h7F_02_1C_02_7F;  // M
      14: return 40'h7F_04_08_10_7F;  // N
      15: return 40'h3E_41_41_41_3E;  // O
      16: return 40'h7F_09_09_09_06;  // P
      17: return 40'h3E_41_51_21_5E;  // Q
      18: return 40'h7F_09_19_29_46;  // R
      19: return 40'h26_49_49_49_32;  // S
      20: return 40'h03_01_7F_01_03;  // T
      21: return 40'h3F_40_40_40_3F;  // U
      22: return 40'h1F_20_40_20_1F;  // V
      23: return 40'h3F_40_38_40_3F;  // W
      24: return 40'h63_14_08_14_63;  // X
      25: return 40'h03_04_78_04_03;  // Y
      26: return 40'h61_59_49_4D_43;  // Z
      27: return 40'h3E_51_49_45_3E;  // 0
      28: return 40'h00_42_7F_40_00;  // 1
      29: return 40'h72_49_49_49_46;  // 2
      30: return 40'h21_41_49_4D_33;  // 3
      31: return 40'h18_14_12_7F_10;  // 4
      32: return 40'h27_45_45_45_39;  // 5
      33: return 40'h3C_4A_49_49_31;  // 6
      34: return 40'h41_21_11_09_07;  // 7
      35: return 40'h36_49_49_49_36;  // 8
      36: return 40'h46_49_49_29_1E;  // 9
      default: return 40'h0;          // space and unused codes
    endcase
  endfunction

  initial begin
    for (int gl = 0; gl < int'(FONT_N); gl++) begin
      logic [39:0] cols;
      cols = glyph_cols(gl);
      for (int r = 0; r < int'(FONT_H); r++)
        for (int c = 0; c < int'(FONT_W); c++)
          mem[gl * 40 + r * 5 + c] = cols[(4 - c) * 8 + r];
    end
  end

  always_ff @(posedge clk) q <= mem[addr];

endmodule
