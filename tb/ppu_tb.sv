// ppu_tb: checks the picture generator pixel by pixel.
// A scene is set up through the command struct (walls, flames, slots, elf,
// enemy, boss, rings, bars, weapons, pointer, text, numbers). Single screen
// positions are then presented and the colour four clocks later is compared
// with a colour worked out here: ROM pixels from the test-pattern formulas and
// the 3-3-2 colour table, hard-coded elements from their colours. The probes
// cover every element, the stacking order between overlapping elements,
// transparency, mirroring (whole enemy lines, both ways), word enables, blanking, and the four-clock latency
// of colour and syncs.
module ppu_tb;
  import mc_pkg::*;

  logic clk = 0;
  draw_cmd_t cmd;
  logic [9:0] x = '0, y = '0;
  logic de = 0, hs = 1, vs = 1;
  logic [7:0] r, g, b;
  logic hs_o, vs_o, blank_o;
  int checks = 0, failures = 0;

  ppu dut (.clk, .cmd, .x, .y, .de, .hsync_n(hs), .vsync_n(vs),
           .r, .g, .b, .hsync_n_o(hs_o), .vsync_n_o(vs_o), .blank_n_o(blank_o));

  always #5 clk = ~clk;

  localparam logic [23:0] BLACK = 24'h000000, WHITE = 24'hFFFFFF, RED = 24'hFF2020,
                          GREEN = 24'h20FF20, BLUE = 24'h2040FF, YELLOW = 24'hFFFF20,
                          CYAN = 24'h20FFFF, ORANGE = 24'hFF8000;

  function automatic logic [23:0] pal(int idx);
    int r3, g3, b2;
    r3 = (idx >> 5) & 7; g3 = (idx >> 2) & 7; b2 = idx & 3;
    return {8'((r3 * 73) / 2), 8'((g3 * 73) / 2), 8'(b2 * 85)};
  endfunction

  function automatic int sprite(int i, int px, int py, int w, int h, int seed);
    int cx, cy, v;
    if (px == 0 || py == 0 || px == w - 1 || py == h - 1) return 255;
    cx = 2 * px + 1 - w;
    cy = 2 * py + 1 - h;
    if (longint'(cx) * cx * h * h + longint'(cy) * cy * w * w > longint'(w) * w * h * h) return 0;
    v = (seed + 16 * i + py / 16 + ((2 * px >= w) ? 8 : 0)) % 256;
    return (v == 0) ? 1 : v;
  endfunction

  function automatic int tile(int i, int px, int py);
    return 8'h60 + 16 * i + ((((px % 32) >> 3) ^ ((py % 32) >> 3)) & 1) * 8;
  endfunction

  task automatic probe(string what, int px, int py, logic [23:0] expv);
    @(negedge clk);
    x = 10'(px); y = 10'(py); de = 1;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if ({r, g, b} !== expv) begin
      failures++;
      $display("FAIL %s at (%0d,%0d): %h expected %h", what, px, py, {r, g, b}, expv);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = '0;
    cmd.wall_en = 1; cmd.fire_en = 1; cmd.fire_tiles = 4'd2;
    cmd.slots_visible = 1; cmd.slot_img[0] = 3'd0; cmd.slot_img[1] = 3'd1; cmd.slot_img[2] = 3'd4;
    cmd.slot_ok = 3'b111;
    cmd.elf_visible = 1; cmd.elf_img = 1; cmd.elf_x = 10'd100; cmd.elf_y = 9'd200;
    cmd.enemy_visible = 1; cmd.enemy_img = 0; cmd.enemy_x = 10'd448; cmd.enemy_y = 9'd280;
    cmd.elf_bar_en = 1; cmd.elf_bar_len = 8'd40; cmd.enemy_bar_en = 1; cmd.enemy_bar_len = 8'd24;
    cmd.boss_bar_en = 1; cmd.boss_bar_len = 9'd64;
    cmd.elf_circle = 1;
    cmd.elf_w_en = 1; cmd.elf_w_type = 3'd1; cmd.elf_w_color = 4'd4; cmd.elf_w_x = 9'd300; cmd.elf_w_y = 9'd60;
    cmd.enemy_w_en = 1; cmd.enemy_w_shape = 1'b0; cmd.enemy_w_x = 9'd400; cmd.enemy_w_y = 9'd60;
    cmd.words = 14'b1;
    cmd.num[0] = 12'h010; cmd.num[1] = 12'h001; cmd.num[2] = 12'h010; cmd.num[3] = 12'h003;
    cmd.ptr_visible = 1; cmd.ptr_color = 4'd3; cmd.ptr_x = 9'd200; cmd.ptr_y = 9'd100;
    repeat (3) @(posedge clk);

    // background tiles
    probe("top wall", 10, 10, pal(tile(0, 10, 10)));
    probe("side wall", 620, 300, pal(tile(0, 620, 300)));
    probe("floor", 100, 460, pal(tile(2, 100, 460)));
    probe("left flame", 40, 400, pal(tile(4, 40, 400)));
    probe("right flame", 600, 400, pal(tile(5, 600, 400)));
    probe("above flames", 40, 383, BLACK);
    // slots
    probe("slot 0", 220, 240, pal(sprite(0, 50, 64, 100, 128, 8'h10)));
    probe("slot 1", 320, 240, pal(sprite(1, 50, 64, 100, 128, 8'h10)));
    probe("slot 2", 420, 240, pal(sprite(4, 50, 64, 100, 128, 8'h10)));
    probe("slot 1 frame", 270, 176, pal(255));
    // elf and enemy
    probe("elf", 110, 232, pal(sprite(1, 10, 32, 64, 64, 8'h40)));
    probe("elf right half", 150, 232, pal(sprite(1, 50, 32, 64, 64, 8'h40)));
    probe("elf transparent corner", 101, 201, BLACK);
    probe("enemy faces left", 458, 312, pal(sprite(0, 53, 32, 64, 64, 8'h40)));
    // one whole enemy line, below the slots: mirrored sprite over black
    for (int dx = 0; dx < 64; dx++) begin
      int v;
      v = sprite(0, 63 - dx, 50, 64, 64, 8'h40);
      probe("enemy line", 448 + dx, 330, (v == 0) ? BLACK : pal(v));
    end
    // hard-coded elements
    probe("ring over slot", 170, 232, CYAN);
    probe("pointer", 200, 101, BLUE);
    probe("beside pointer", 207, 101, BLACK);
    probe("elf weapon centre", 307, 67, YELLOW);
    probe("elf weapon corner", 300, 60, BLACK);
    probe("enemy weapon", 407, 67, ORANGE);
    probe("boss bar", 50, 57, RED);
    probe("boss bar end", 104, 57, BLACK);
    probe("elf bar", 120, 193, GREEN);
    probe("elf bar end", 145, 193, BLACK);
    probe("enemy bar", 450, 273, RED);
    // text and numbers
    probe("S of SLOT", 41, 40, WHITE);
    probe("beside S", 40, 40, BLACK);
    probe("CATCH off", 81, 40, BLACK);
    probe("label C", 520, 45, RED);
    probe("coin digit 1", 580, 44, RED);
    probe("coin digit 0 middle", 559, 47, BLACK);
    probe("coin digit 0 top", 559, 41, RED);
    probe("hp digit 3", 591, 161, RED);

    // changes to the scene
    @(negedge clk);
    cmd.words = 14'b11;
    cmd.elf_fold = 1;
    cmd.enemy_fold = 1;
    cmd.boss_en = 1; cmd.boss_img = 2'd2;
    cmd.slot_img[2] = 3'd5; cmd.slot_ok[2] = 1'b0;
    cmd.elf_w_type = 3'd2;
    probe("CATCH on", 81, 40, WHITE);
    probe("elf folded", 110, 232, pal(sprite(1, 53, 32, 64, 64, 8'h40)));
    for (int dx = 0; dx < 64; dx++) begin
      int v;
      v = sprite(0, dx, 50, 64, 64, 8'h40);
      probe("enemy folded line", 448 + dx, 330, (v == 0) ? BLACK : pal(v));
    end
    probe("boss over slot", 320, 200, pal(sprite(2, 48, 80, 96, 128, 8'hA0)));
    probe("missing slot image", 420, 240, BLACK);
    probe("weapon block corner", 300, 60, YELLOW);
    @(negedge clk) cmd.wall_en = 0;
    probe("walls off", 10, 10, BLACK);

    // blanking
    @(negedge clk) cmd.wall_en = 1;
    @(negedge clk) x = 10'd10; y = 10'd10; de = 0;
    repeat (4) @(posedge clk);
    #1 begin checks++; if ({r, g, b} != BLACK || blank_o) begin failures++; $display("FAIL blanking"); end end

    // latency of colour and syncs: exactly four clocks
    probe("black before latency test", 40, 383, BLACK);
    @(negedge clk) x = 10'd10; y = 10'd10; de = 1; hs = 0; vs = 0;
    repeat (3) @(posedge clk);
    #1 begin
      checks++;
      if ({r, g, b} != BLACK || !hs_o || !vs_o) begin failures++; $display("FAIL output before 4 clocks"); end
    end
    @(posedge clk);
    #1 begin
      checks++;
      if ({r, g, b} != pal(tile(0, 10, 10)) || hs_o || vs_o || !blank_o) begin
        failures++; $display("FAIL output at 4 clocks");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
