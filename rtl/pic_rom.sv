// pic_rom: picture ROM holding N images of W x H pixels, one byte per pixel.
//
// Each byte is an index into the colour table (color_table); index 0 is the
// transparent colour. Pixel (x, y) of image i is at address (i*H + y)*W + x.
// There are two read ports with the same timing: the address is sampled on a
// rising clock edge and the byte appears on the matching q output after that
// edge (read latency one clock), as the on-chip ROMs of the original system
// are configured. A renderer layer that can show two copies of a picture on
// the same line (the elf and the enemy) uses the second port.
//
// Sizes follow the published picture table: slots 5 x 100x128, boss
// 4 x 96x128, elf 2 x 64x64, background 7 x 32x32 tiles. The pictures
// themselves are not part of this RTL. When INIT_FILE names a hex file it is
// loaded; otherwise the ROM is filled with a test pattern computed here:
//   opaque pictures (tiles): SEED + 16*i + 8*((x/8 + y/8) mod 2), 0 replaced by 1;
//   other pictures: 8'hFF on the one-pixel frame; inside the ellipse inscribed
//   in the image SEED + 16*i + y/16, plus 8 in the right half (0 -> 1);
//   0 (transparent) elsewhere.
module pic_rom #(
  parameter int unsigned W         = 64,
  parameter int unsigned H         = 64,
  parameter int unsigned N         = 2,
  parameter bit          OPAQUE    = 1'b0,
  parameter logic [7:0]  SEED      = 8'h20,
  parameter string       INIT_FILE = "",
  localparam int unsigned DEPTH    = W * H * N,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_a,
  output logic [7:0]    q_a,
  input  logic [AW-1:0] addr_b,
  output logic [7:0]    q_b
);

  logic [7:0] mem [DEPTH];

  // A pattern byte, with 0 (transparent) replaced by 1.
  function automatic logic [7:0] nonzero(input int v);
    return (8'(v) == 8'h00) ? 8'h01 : 8'(v);
  endfunction

  // The test pattern is filled row by row: the two colours a row can take and
  // the ellipse limit of the row are worked out once per row, so that each
  // pixel costs one comparison.
  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      int     a;
      longint dx, dy, lim, h2, w2;
      logic [7:0] lo, hi;
      logic   edge_row;
      a  = 0;
      h2 = longint'(H) * longint'(H);
      w2 = longint'(W) * longint'(W);
      for (int i = 0; i < int'(N); i++)
        for (int y = 0; y < int'(H); y++) begin
          if (OPAQUE) begin
            lo = nonzero(int'(SEED) + 16 * i + 8 * ((y / 8) % 2));
            hi = nonzero(int'(SEED) + 16 * i + 8 * ((y / 8 + 1) % 2));
          end else begin
            lo = nonzero(int'(SEED) + 16 * i + y / 16);
            hi = nonzero(int'(SEED) + 16 * i + y / 16 + 8);
          end
          dy  = longint'(2 * y + 1) - longint'(H);
          lim = w2 * h2 - dy * dy * w2;
          edge_row = (y == 0) || (y == int'(H) - 1);
          for (int x = 0; x < int'(W); x++) begin
            if (OPAQUE) begin
              mem[a] = ((x / 8) % 2 == 1) ? hi : lo;
            end else if (edge_row || x == 0 || x == int'(W) - 1) begin
              mem[a] = 8'hFF;
            end else begin
              dx = longint'(2 * x + 1) - longint'(W);
              mem[a] = (dx * dx * h2 > lim) ? 8'h00 : (x >= int'(W) / 2) ? hi : lo;
            end
            a++;
          end
        end
    end
  end

  always_ff @(posedge clk) begin
    q_a <= mem[addr_a];
    q_b <= mem[addr_b];
  end

endmodule
