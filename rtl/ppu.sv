// ppu: the picture generator of the VGA module. For every screen position it
// decides which element is on top and sends that element's colour.
//
// Elements, from the top of the stack down:
//   pointer          hard-coded arrow, colour chosen by the pointer pattern
//   text             menu words (5x8 font ROM), one enable bit per word, and
//                    the labels COIN, LV, ATK, HP
//   numbers          three 16x16 digits (digit ROM) for coin, level, attack, HP
//   elf weapon       hard-coded 16x16 shape chosen by the weapon type
//   enemy weapon     hard-coded 16x16 disc or diamond
//   protective rings hard-coded circles around the elf and the enemy
//   blood bars       boss bar under the menu line, elf and enemy bars above
//                    the sprites, length from the blood percentage
//   elf, enemy       64x64 pictures from the elf ROM (two read ports), mirrored
//                    when folded; the enemy faces the elf
//   boss             96x128 picture from the boss ROM
//   slots            three 100x128 pictures from the slot ROM, side by side
//   fire, walls      32x32 tiles from the background ROM: flames stacked in
//                    the bottom corners, a wall frame and a floor row
//   black            everything else
// ROM pictures are one byte per pixel indexing color_table; byte 0 is
// transparent and lets the next element through. Hard-coded elements carry
// their own 24-bit colour.
//
// Pipeline and timing: x, y, de and the syncs enter together. Stage 0
// computes every element's hit and ROM address; stage 1 registers hits while
// the ROMs (latency one) deliver their bytes, and picks the top element;
// stage 2 registers the colour-table lookup; stages 3 and 4 register the
// output. Colour, syncs and blank therefore leave LAT = 4 clocks after their
// position entered, two pixels at a two-clock pixel.
//
// From the description: which pictures sit in ROM and their sizes, one byte
// per pixel through a colour table, weapons and protective circles drawn by
// logic, the elements and their register fields. This design's choices: the
// stacking order, the screen positions (mc_pkg), the hard-coded shapes and
// colours, and the meaning given to fold (mirror) and action (lunge).
//
// Interface: clk; cmd (decoded commands); x, y, de, hsync_n, vsync_n;
// r, g, b, hsync_n_o, vsync_n_o, blank_n_o.
module ppu
  import mc_pkg::*;
#(
  parameter string SLOT_FILE = "",
  parameter string BOSS_FILE = "",
  parameter string ELF_FILE  = "",
  parameter string TILE_FILE = "",
  localparam int unsigned LAT = 4
) (
  input  logic       clk,
  input  draw_cmd_t  cmd,
  input  logic [9:0] x,
  input  logic [9:0] y,
  input  logic       de,
  input  logic       hsync_n,
  input  logic       vsync_n,
  output logic [7:0] r,
  output logic [7:0] g,
  output logic [7:0] b,
  output logic       hsync_n_o,
  output logic       vsync_n_o,
  output logic       blank_n_o
);

  // ------------------------------------------------------------ constants
  localparam int unsigned MENU_LEN  = 29;
  localparam logic [8*MENU_LEN-1:0] MENU = "SLOT CATCH BATTLE BOSS ONLINE";
  localparam logic [8*16-1:0] LABELS = "COINLV  ATK HP  ";
  localparam int unsigned CHAR_PITCH = 8;

  // Word number of each menu character (spaces belong to no word: 15).
  function automatic logic [MENU_LEN-1:0][3:0] menu_words();
    logic [MENU_LEN-1:0][3:0] w;
    int k;
    k = 0;
    for (int c = 0; c < int'(MENU_LEN); c++) begin
      if (MENU[8*(MENU_LEN-1-c) +: 8] == " ") begin
        w[c] = 4'd15;
        k++;
      end else begin
        w[c] = 4'(k);
      end
    end
    return w;
  endfunction
  localparam logic [MENU_LEN-1:0][3:0] MENU_WORD = menu_words();

  function automatic logic [5:0] glyph_of(input logic [7:0] ch);
    if (ch >= 8'h41 && ch <= 8'h5A) return 6'(ch - 8'h41 + 8'd1);    // A..Z
    if (ch >= 8'h30 && ch <= 8'h39) return 6'(ch - 8'h30 + 8'd27);   // 0..9
    return 6'd0;
  endfunction

  // 16x16 hard-coded shapes in centred odd coordinates cx, cy in -15..15.
  function automatic logic shape(input logic [2:0] kind, input logic [3:0] dx, input logic [3:0] dy);
    int cx, cy, ax, ay, d2;
    cx = 2 * int'(dx) - 15;
    cy = 2 * int'(dy) - 15;
    ax = (cx < 0) ? -cx : cx;
    ay = (cy < 0) ? -cy : cy;
    d2 = cx * cx + cy * cy;
    case (kind)
      3'd0: return d2 <= 225;                          // ball
      3'd1: return ax + ay <= 15;                      // diamond
      3'd2: return 1'b1;                               // block
      3'd3: return ax <= 3 || ay <= 3;                 // cross
      3'd4: return d2 >= 121 && d2 <= 225;             // ring
      3'd5: return ay <= 5;                            // horizontal bolt
      3'd6: return ax <= 5;                            // vertical bolt
      default: return (ax > ay ? ax - ay : ay - ax) <= 4;  // X
    endcase
  endfunction

  // ------------------------------------------------------------ stage 0
  logic [10:0] px, py;
  assign px = {1'b0, x};
  assign py = {1'b0, y};

  function automatic logic in_span(input logic [10:0] p, input logic [10:0] p0, input logic [10:0] len);
    return p >= p0 && p < p0 + len;
  endfunction

  // pointer: right-pointing arrow, 8 wide and 8 high
  logic        ptr_hit;
  logic [10:0] ptr_dx, ptr_dy;
  always_comb begin
    ptr_dx  = px - {2'b0, cmd.ptr_x};
    ptr_dy  = py - {2'b0, cmd.ptr_y};
    ptr_hit = cmd.ptr_visible && in_span(px, {2'b0, cmd.ptr_x}, 11'd8) &&
              in_span(py, {2'b0, cmd.ptr_y}, 11'd8) &&
              (ptr_dx <= ((ptr_dy < 11'd4) ? ptr_dy : 11'd7 - ptr_dy) * 11'd2);
  end

  // text: menu line and the four labels share the font ROM
  localparam int unsigned FONT_AW = $clog2(FONT_W * FONT_H * FONT_N);
  logic               text_hit;
  logic [23:0]        text_rgb;
  logic [FONT_AW-1:0] font_addr;
  always_comb begin
    logic [10:0] tx, ty, cidx;
    logic [5:0]  gl;
    text_hit  = 1'b0;
    text_rgb  = fixed_color(4'd0);
    gl        = '0;
    tx        = '0;
    ty        = '0;
    cidx      = '0;
    if (in_span(py, 11'(TEXT_Y0), 11'(FONT_H)) &&
        in_span(px, 11'(TEXT_X0), 11'(MENU_LEN * CHAR_PITCH))) begin
      tx   = px - 11'(TEXT_X0);
      ty   = py - 11'(TEXT_Y0);
      cidx = tx >> 3;
      if (MENU_WORD[cidx[4:0]] != 4'd15 && cmd.words[MENU_WORD[cidx[4:0]]] && tx[2:0] < 3'(FONT_W)) begin
        text_hit = 1'b1;
        gl       = glyph_of(MENU[8*(MENU_LEN-1-int'(cidx[4:0])) +: 8]);
      end
    end
    for (int k = 0; k < 4; k++) begin
      if (in_span(py, 11'(NUM_Y0 + 4 + k * NUM_DY), 11'(FONT_H)) &&
          in_span(px, 11'(LABEL_X0), 11'(4 * CHAR_PITCH))) begin
        tx   = px - 11'(LABEL_X0);
        ty   = py - 11'(NUM_Y0 + 4 + k * NUM_DY);
        cidx = tx >> 3;
        if (tx[2:0] < 3'(FONT_W)) begin
          text_hit = 1'b1;
          text_rgb = fixed_color(4'd1);
          gl       = glyph_of(LABELS[8*(15 - 4*k - int'(cidx[1:0])) +: 8]);
        end
      end
    end
    font_addr = FONT_AW'(gl * 40 + ty[2:0] * 5 + tx[2:0]);
  end

  // numbers: three digits per read-out row
  localparam int unsigned DIG_AW = $clog2(DIG_W * DIG_H * DIG_N);
  logic              num_hit;
  logic [DIG_AW-1:0] dig_addr;
  always_comb begin
    logic [10:0] dx, dy;
    logic [3:0]  d;
    num_hit  = 1'b0;
    dig_addr = '0;
    dx       = '0;
    dy       = '0;
    d        = '0;
    for (int k = 0; k < 4; k++) begin
      if (in_span(py, 11'(NUM_Y0 + k * NUM_DY), 11'(DIG_H)) &&
          in_span(px, 11'(NUM_X0), 11'(3 * DIG_W))) begin
        dx       = px - 11'(NUM_X0);
        dy       = py - 11'(NUM_Y0 + k * NUM_DY);
        d        = cmd.num[k][4*(2 - int'(dx[5:4])) +: 4];
        num_hit  = 1'b1;
        dig_addr = DIG_AW'(({7'd0, d} * 11'd16 + dy) * 11'd16 + {7'd0, dx[3:0]});
      end
    end
  end

  // weapons
  logic elf_w_hit, enemy_w_hit;
  always_comb begin
    logic [10:0] dx, dy, ex, ey;
    dx = px - {2'b0, cmd.elf_w_x};
    dy = py - {2'b0, cmd.elf_w_y};
    ex = px - {2'b0, cmd.enemy_w_x};
    ey = py - {2'b0, cmd.enemy_w_y};
    elf_w_hit = cmd.elf_w_en && in_span(px, {2'b0, cmd.elf_w_x}, 11'd16) &&
                in_span(py, {2'b0, cmd.elf_w_y}, 11'd16) &&
                shape(cmd.elf_w_type, dx[3:0], dy[3:0]);
    enemy_w_hit = cmd.enemy_w_en && in_span(px, {2'b0, cmd.enemy_w_x}, 11'd16) &&
                  in_span(py, {2'b0, cmd.enemy_w_y}, 11'd16) &&
                  shape({2'b0, cmd.enemy_w_shape}, ex[3:0], ey[3:0]);
  end

  // protective rings, centred on the 64x64 sprites
  function automatic logic ring(input logic [10:0] p, input logic [10:0] q,
                                input logic [10:0] x0, input logic [10:0] y0);
    int cx, cy, d2;
    cx = int'(p) - int'(x0) - 32;
    cy = int'(q) - int'(y0) - 32;
    d2 = cx * cx + cy * cy;
    return d2 >= int'(CIRCLE_R_IN * CIRCLE_R_IN) && d2 <= int'(CIRCLE_R_OUT * CIRCLE_R_OUT);
  endfunction

  logic ring_hit;
  assign ring_hit = (cmd.elf_circle   && ring(px, py, {1'b0, cmd.elf_x},   {2'b0, cmd.elf_y})) ||
                    (cmd.enemy_circle && ring(px, py, {1'b0, cmd.enemy_x}, {2'b0, cmd.enemy_y}));

  // blood bars, 4 pixels high
  logic        bar_hit;
  logic [23:0] bar_rgb;
  always_comb begin
    bar_hit = 1'b0;
    bar_rgb = fixed_color(4'd1);
    if (cmd.boss_bar_en && in_span(py, 11'(BOSSBAR_Y0), 11'd4) &&
        in_span(px, 11'(TEXT_X0), {2'b0, cmd.boss_bar_len})) begin
      bar_hit = 1'b1;
    end
    if (cmd.elf_bar_en && in_span(py + 11'd8, {2'b0, cmd.elf_y}, 11'd4) &&
        in_span(px, {1'b0, cmd.elf_x}, {3'b0, cmd.elf_bar_len})) begin
      bar_hit = 1'b1;
      bar_rgb = fixed_color(4'd2);
    end
    if (cmd.enemy_bar_en && in_span(py + 11'd8, {2'b0, cmd.enemy_y}, 11'd4) &&
        in_span(px, {1'b0, cmd.enemy_x}, {3'b0, cmd.enemy_bar_len})) begin
      bar_hit = 1'b1;
      bar_rgb = fixed_color(4'd1);
    end
  end

  // elf and enemy pictures (elf ROM, two ports)
  localparam int unsigned ELF_AW = $clog2(ELF_W * ELF_H * ELF_N);
  logic              elf_hit, enemy_hit;
  logic [ELF_AW-1:0] elf_addr, enemy_addr;
  always_comb begin
    logic [10:0] dx, dy, ex, ey;
    logic [5:0]  col, ecol;
    dx   = px - {1'b0, cmd.elf_x};
    dy   = py - {2'b0, cmd.elf_y};
    ex   = px - {1'b0, cmd.enemy_x};
    ey   = py - {2'b0, cmd.enemy_y};
    col  = cmd.elf_fold ? 6'd63 - dx[5:0] : dx[5:0];
    ecol = cmd.enemy_fold ? ex[5:0] : 6'd63 - ex[5:0];
    elf_hit    = cmd.elf_visible && in_span(px, {1'b0, cmd.elf_x}, 11'(ELF_W)) &&
                 in_span(py, {2'b0, cmd.elf_y}, 11'(ELF_H));
    enemy_hit  = cmd.enemy_visible && in_span(px, {1'b0, cmd.enemy_x}, 11'(ELF_W)) &&
                 in_span(py, {2'b0, cmd.enemy_y}, 11'(ELF_H));
    elf_addr   = {cmd.elf_img, dy[5:0], col};
    enemy_addr = {cmd.enemy_img, ey[5:0], ecol};
  end

  // boss picture
  localparam int unsigned BOSS_AW = $clog2(BOSS_W * BOSS_H * BOSS_N);
  logic               boss_hit;
  logic [BOSS_AW-1:0] boss_addr;
  always_comb begin
    logic [10:0] dx, dy;
    dx        = px - 11'(BOSS_X0);
    dy        = py - 11'(BOSS_Y0);
    boss_hit  = cmd.boss_en && in_span(px, 11'(BOSS_X0), 11'(BOSS_W)) &&
                in_span(py, 11'(BOSS_Y0), 11'(BOSS_H));
    boss_addr = BOSS_AW'((({15'd0, cmd.boss_img} * 17'(BOSS_H)) + {10'd0, dy[6:0]}) * 17'(BOSS_W) + {10'd0, dx[6:0]});
  end

  // slot pictures
  localparam int unsigned SLOT_AW = $clog2(SLOT_W * SLOT_H * SLOT_N);
  logic               slot_hit;
  logic [SLOT_AW-1:0] slot_addr;
  always_comb begin
    logic [10:0] dx, dy;
    logic [1:0]  s;
    dy = py - 11'(SLOT_Y0);
    if (px < 11'(SLOT_X0 + SLOT_W)) begin
      s = 2'd0; dx = px - 11'(SLOT_X0);
    end else if (px < 11'(SLOT_X0 + 2 * SLOT_W)) begin
      s = 2'd1; dx = px - 11'(SLOT_X0 + SLOT_W);
    end else begin
      s = 2'd2; dx = px - 11'(SLOT_X0 + 2 * SLOT_W);
    end
    slot_hit  = cmd.slots_visible && cmd.slot_ok[s] &&
                in_span(px, 11'(SLOT_X0), 11'(3 * SLOT_W)) &&
                in_span(py, 11'(SLOT_Y0), 11'(SLOT_H));
    slot_addr = SLOT_AW'((({14'd0, cmd.slot_img[s]} * 17'(SLOT_H)) + {10'd0, dy[6:0]}) * 17'(SLOT_W) + {10'd0, dx[6:0]});
  end

  // fire and walls (background tile ROM)
  localparam int unsigned TILE_AW = $clog2(TILE_W * TILE_H * TILE_N);
  logic               tile_hit;
  logic [TILE_AW-1:0] tile_addr;
  always_comb begin
    logic [2:0]  t;
    logic [10:0] fire_top;
    fire_top = 11'(V_ACTIVE - TILE_H) - {2'b0, cmd.fire_tiles, 5'b0};
    tile_hit = 1'b0;
    t        = 3'(TILE_WALL0);
    if (cmd.fire_en && py >= fire_top && py < 11'(V_ACTIVE - TILE_H) &&
        in_span(px, 11'(TILE_W), 11'(TILE_W))) begin
      tile_hit = 1'b1;
      t        = 3'(TILE_FLAME_L);
    end else if (cmd.fire_en && py >= fire_top && py < 11'(V_ACTIVE - TILE_H) &&
                 in_span(px, 11'(H_ACTIVE - 2 * TILE_W), 11'(TILE_W))) begin
      tile_hit = 1'b1;
      t        = 3'(TILE_FLAME_R);
    end else if (cmd.wall_en && py >= 11'(V_ACTIVE - TILE_H) && py < 11'(V_ACTIVE)) begin
      tile_hit = 1'b1;
      t        = 3'(TILE_FLOOR0);
    end else if (cmd.wall_en && (py < 11'(TILE_H) || px < 11'(TILE_W) ||
                 (px >= 11'(H_ACTIVE - TILE_W) && px < 11'(H_ACTIVE)))) begin
      tile_hit = 1'b1;
      t        = 3'(TILE_WALL0);
    end
    tile_addr = {t, py[4:0], px[4:0]};
  end

  // ------------------------------------------------------------ ROMs
  logic       font_q, dig_q;
  logic [7:0] elf_q, enemy_q, boss_q, slot_q, tile_q, unused_q0, unused_q1, unused_q2;

  font_rom  u_font (.clk(clk), .addr(font_addr), .q(font_q));
  digit_rom u_dig  (.clk(clk), .addr(dig_addr),  .q(dig_q));

  pic_rom #(.W(ELF_W), .H(ELF_H), .N(ELF_N), .SEED(8'h40), .INIT_FILE(ELF_FILE)) u_elf (
    .clk(clk), .addr_a(elf_addr), .q_a(elf_q), .addr_b(enemy_addr), .q_b(enemy_q));
  pic_rom #(.W(BOSS_W), .H(BOSS_H), .N(BOSS_N), .SEED(8'hA0), .INIT_FILE(BOSS_FILE)) u_boss (
    .clk(clk), .addr_a(boss_addr), .q_a(boss_q), .addr_b('0), .q_b(unused_q0));
  pic_rom #(.W(SLOT_W), .H(SLOT_H), .N(SLOT_N), .SEED(8'h10), .INIT_FILE(SLOT_FILE)) u_slot (
    .clk(clk), .addr_a(slot_addr), .q_a(slot_q), .addr_b('0), .q_b(unused_q1));
  pic_rom #(.W(TILE_W), .H(TILE_H), .N(TILE_N), .OPAQUE(1'b1), .SEED(8'h60), .INIT_FILE(TILE_FILE)) u_tile (
    .clk(clk), .addr_a(tile_addr), .q_a(tile_q), .addr_b('0), .q_b(unused_q2));

  // ------------------------------------------------------------ stage 1
  logic        s1_ptr, s1_text, s1_num, s1_elf_w, s1_enemy_w, s1_ring, s1_bar;
  logic        s1_elf, s1_enemy, s1_boss, s1_slot, s1_tile, s1_de;
  logic [23:0] s1_ptr_rgb, s1_text_rgb, s1_elf_w_rgb, s1_bar_rgb;

  always_ff @(posedge clk) begin
    s1_ptr       <= ptr_hit;
    s1_text      <= text_hit;
    s1_num       <= num_hit;
    s1_elf_w     <= elf_w_hit;
    s1_enemy_w   <= enemy_w_hit;
    s1_ring      <= ring_hit;
    s1_bar       <= bar_hit;
    s1_elf       <= elf_hit;
    s1_enemy     <= enemy_hit;
    s1_boss      <= boss_hit;
    s1_slot      <= slot_hit;
    s1_tile      <= tile_hit;
    s1_de        <= de;
    s1_ptr_rgb   <= fixed_color(cmd.ptr_color);
    s1_text_rgb  <= text_rgb;
    s1_elf_w_rgb <= fixed_color(cmd.elf_w_color);
    s1_bar_rgb   <= bar_rgb;
  end

  // pick the top element
  logic        s1_is_pal;
  logic [7:0]  s1_idx;
  logic [23:0] s1_rgb;
  always_comb begin
    s1_is_pal = 1'b0;
    s1_idx    = TRANSPARENT;
    s1_rgb    = 24'h000000;
    if (s1_ptr)                               s1_rgb = s1_ptr_rgb;
    else if (s1_text && font_q)               s1_rgb = s1_text_rgb;
    else if (s1_num && dig_q)                 s1_rgb = fixed_color(4'd1);
    else if (s1_elf_w)                        s1_rgb = s1_elf_w_rgb;
    else if (s1_enemy_w)                      s1_rgb = fixed_color(4'd7);
    else if (s1_ring)                         s1_rgb = fixed_color(4'd5);
    else if (s1_bar)                          s1_rgb = s1_bar_rgb;
    else if (s1_elf && elf_q != TRANSPARENT)  begin s1_is_pal = 1'b1; s1_idx = elf_q;   end
    else if (s1_enemy && enemy_q != TRANSPARENT) begin s1_is_pal = 1'b1; s1_idx = enemy_q; end
    else if (s1_boss && boss_q != TRANSPARENT) begin s1_is_pal = 1'b1; s1_idx = boss_q;  end
    else if (s1_slot && slot_q != TRANSPARENT) begin s1_is_pal = 1'b1; s1_idx = slot_q;  end
    else if (s1_tile && tile_q != TRANSPARENT) begin s1_is_pal = 1'b1; s1_idx = tile_q;  end
  end

  // ------------------------------------------------------------ stage 2
  logic [23:0] pal_rgb, s2_rgb;
  logic        s2_is_pal, s2_de;

  color_table u_pal (.clk(clk), .idx(s1_idx), .rgb(pal_rgb));

  always_ff @(posedge clk) begin
    s2_is_pal <= s1_is_pal;
    s2_rgb    <= s1_rgb;
    s2_de     <= s1_de;
  end

  // ------------------------------------------------------------ stages 3, 4
  logic [23:0] s3_rgb, s4_rgb;
  always_ff @(posedge clk) begin
    s3_rgb <= !s2_de ? 24'h000000 : (s2_is_pal ? pal_rgb : s2_rgb);
    s4_rgb <= s3_rgb;
  end
  assign {r, g, b} = s4_rgb;

  // syncs and blank follow the colour through the same number of registers
  logic [LAT-1:0] hs_d, vs_d, de_d;
  always_ff @(posedge clk) begin
    hs_d <= {hs_d[LAT-2:0], hsync_n};
    vs_d <= {vs_d[LAT-2:0], vsync_n};
    de_d <= {de_d[LAT-2:0], de};
  end
  assign hsync_n_o = hs_d[LAT-1];
  assign vsync_n_o = vs_d[LAT-1];
  assign blank_n_o = de_d[LAT-1];

endmodule
