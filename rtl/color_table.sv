// color_table: the colour table that the one-byte picture pixels index.
//
// Pictures are stored at one byte per pixel instead of three; each byte
// selects one of 256 entries of this table, which gives the 24-bit RGB colour
// sent to the VGA DAC. The lookup is registered: the colour for the index
// sampled on a clock edge appears after that edge (latency one clock).
//
// The document does not give the table's entries. This design uses the
// fixed 3-3-2 split: index bits [7:5] are red, [4:2] green, [1:0] blue, each
// widened to eight bits by repeating its bits. Index 0 (black) also serves as
// the transparent colour of the pictures; the renderer never looks it up for a
// transparent pixel.
module color_table (
  input  logic        clk,
  input  logic [7:0]  idx,
  output logic [23:0] rgb
);

  logic [23:0] table_q [256];

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [2:0] r, g;
      logic [1:0] b;
      r = 3'(i >> 5);
      g = 3'(i >> 2);
      b = 2'(i);
      table_q[i] = {r, r, r[2:1], g, g, g[2:1], b, b, b, b};
    end
  end

  always_ff @(posedge clk) rgb <= table_q[idx];

endmodule
