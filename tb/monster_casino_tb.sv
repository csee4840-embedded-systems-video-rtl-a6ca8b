// monster_casino_tb: end-to-end test of the peripheral at its default
// parameters (50 MHz clock, 640x480 VGA, 8 kHz audio).
//
// Acting as the game software, the testbench writes the eight registers over
// the Avalon-MM port at the start of vertical sync and lets the peripheral
// draw the next frame, which it captures from the VGA outputs (one sample per
// pixel, while VGA_CLK is low). Three frames follow the game's modes:
//   slot mode    walls, three slot pictures, menu text, read-outs, pointer;
//                a write with chipselect low tries to turn the boss on
//   battle mode  elf (lunging) and enemy, weapons, protective ring, blood bars
//   boss mode    boss picture, flames, boss blood bar
// Captured pixels are compared with colours worked out here from the ROM
// test-pattern formulas and the 3-3-2 colour table. Meanwhile the sound
// register selects a tone, stored music, and both, and the left audio
// channel is stalled for a while. Line and frame lengths are checked on the
// sync outputs. Each mechanism is counted and one never seen is a failure.
module monster_casino_tb;
  logic clk = 0, reset = 1;
  logic chipselect = 0, write = 0;
  logic [2:0]  address = '0;
  logic [31:0] writedata = '0;
  logic [7:0]  R, G, B;
  logic VGA_CLK, HS, VS, BLANK_n, SYNC_n;
  logic signed [15:0] ldata, rdata;
  logic lvalid, rvalid, lready = 1, rready = 1, stick;
  int checks = 0, failures = 0;

  monster_casino dut (
    .clk, .reset, .chipselect, .write, .address, .writedata,
    .VGA_R(R), .VGA_G(G), .VGA_B(B), .VGA_CLK, .VGA_HS(HS), .VGA_VS(VS),
    .VGA_BLANK_n(BLANK_n), .VGA_SYNC_n(SYNC_n),
    .left_data(ldata), .left_valid(lvalid), .left_ready(lready),
    .right_data(rdata), .right_valid(rvalid), .right_ready(rready),
    .sample_tick(stick));

  always #10 clk = ~clk;   // 50 MHz

  localparam logic [23:0] BLACK = 24'h000000, WHITE = 24'hFFFFFF, RED = 24'hFF2020,
                          GREEN = 24'h20FF20, BLUE = 24'h2040FF, YELLOW = 24'hFFFF20,
                          CYAN = 24'h20FFFF, ORANGE = 24'hFF8000;

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    M_REG_WRITE, M_IGNORED_WRITE, M_WALL, M_FLOOR, M_FLAME, M_SLOT, M_ELF, M_ENEMY_MIRROR,
    M_LUNGE, M_BOSS, M_TRANSPARENT, M_RING, M_WEAPON, M_BAR, M_TEXT, M_DIGITS, M_POINTER,
    M_TONE, M_MUSIC, M_MIX, M_STALL, M_LINE, M_FRAME, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  task automatic expect_px(mech_e m, string what, int px, int py, logic [23:0] expv);
    checks++;
    if (fb[py][px] !== expv) begin
      failures++;
      $display("FAIL %s at (%0d,%0d): %h expected %h", what, px, py, fb[py][px], expv);
    end else begin
      seen[m]++;
    end
  endtask

  // ------------------------------------------------------------ models
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

  // register words, packed here bit by bit
  function automatic logic [31:0] w_boss(int attack, int blood, int pattern, int blood_en, int boss_en);
    return 32'(attack << 12 | blood << 8 | pattern << 4 | blood_en << 3 | boss_en << 2);
  endfunction
  function automatic logic [31:0] w_sound(int rom_en, int tone_en, int half);
    return 32'(rom_en << 19 | tone_en << 18 | half);
  endfunction
  function automatic logic [31:0] w_bg(int words, int fire, int eb, int nb, int fire_en, int eb_en, int nb_en, int wall);
    return 32'(words << 18 | fire << 14 | eb << 10 | nb << 6 | fire_en << 5 | eb_en << 4 | nb_en << 3 | wall << 2);
  endfunction
  function automatic logic [31:0] w_slots(int ewx, int ewy, int ewp, int ewen, int s2, int s1, int s0, int vis);
    return 32'(ewx << 23 | ewy << 14 | ewp << 13 | ewen << 12 | s2 << 9 | s1 << 6 | s0 << 3 | vis << 2);
  endfunction
  function automatic logic [31:0] w_weapon(int wx, int wy, int pat, int typ, int edef, int ndef, int att);
    return 32'(wx << 23 | wy << 14 | pat << 10 | typ << 7 | edef << 6 | ndef << 5 | att << 4);
  endfunction
  function automatic logic [31:0] w_elf(int ey, int ex, int np, int ep, int nact, int eact, int nfold, int efold, int nvis, int evis);
    return 32'(ey << 23 | ex << 14 | np << 12 | ep << 11 | nact << 10 | eact << 9 | nfold << 8 | efold << 7 | nvis << 6 | evis << 5);
  endfunction
  function automatic logic [31:0] w_char(int hp, int atk, int lv, int coin);
    return 32'(hp << 24 | atk << 16 | lv << 10 | coin << 4);
  endfunction
  function automatic logic [31:0] w_ptr(int px, int py, int pat, int mv, int vis);
    return 32'(px << 23 | py << 14 | pat << 10 | mv << 6 | vis << 5);
  endfunction

  task automatic bus_write(int a, logic [31:0] d, logic cs = 1'b1);
    @(negedge clk);
    chipselect = cs; write = 1; address = 3'(a); writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
    if (cs) seen[M_REG_WRITE]++;
  endtask

  // ------------------------------------------------------------ capture
  logic [23:0] fb [480][640];
  int row = 0, col = 0, frames_done = 0;
  bit armed = 0;
  int hs_count = 0, line_len = 0, lines = 0, frame_lines = 0;
  logic hs_q = 1, vs_q = 1;

  always @(posedge clk) begin
    #1;
    if (!reset && !VGA_CLK) begin
      // sync timing seen at the outputs, in pixels
      line_len++;
      if (!HS && hs_q) begin
        if (hs_count > 1) begin
          checks++;
          if (line_len != 800) begin failures++; $display("FAIL line length %0d", line_len); end
          else seen[M_LINE]++;
        end
        hs_count++;
        line_len = 0;
        lines++;
      end
      if (!VS && vs_q) begin
        if (frame_lines > 0) begin
          checks++;
          if (lines != 525) begin failures++; $display("FAIL frame lines %0d", lines); end
          else seen[M_FRAME]++;
        end
        frame_lines++;
        lines = 0;
      end
      hs_q = HS;
      vs_q = VS;
      // picture
      if (!VS) begin
        row = 0; col = 0; armed = 1;
      end else if (armed && BLANK_n && row < 480) begin
        fb[row][col] = {R, G, B};
        col++;
        if (col == 640) begin
          col = 0;
          row++;
          if (row == 480) frames_done++;
        end
      end
    end
  end

  // ------------------------------------------------------------ audio
  int lq [$];
  always @(posedge clk) if (!reset && lvalid && lready) lq.push_back(int'(ldata));

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_vsync_start();
    @(negedge VS);
  endtask

  task automatic wait_frame();
    int f;
    f = frames_done;
    while (frames_done == f) @(posedge clk);
  endtask

  initial begin
    int target;
    repeat (4) @(posedge clk);
    @(negedge clk) reset = 0;

    // ------------------------------------------------ slot mode
    wait_vsync_start();
    bus_write(0, w_boss(0, 0, 0, 0, 0));
    bus_write(1, w_sound(0, 1, 50000));                   // 500 Hz tone
    bus_write(2, w_bg(14'b00001, 0, 0, 0, 0, 0, 0, 1));  // menu word SLOT, walls
    bus_write(3, w_slots(0, 0, 0, 0, 4, 1, 0, 1));
    bus_write(4, w_weapon(0, 0, 0, 0, 0, 0, 0));
    bus_write(5, w_elf(0, 0, 0, 0, 0, 0, 0, 0, 0, 0));
    bus_write(6, w_char(3, 10, 1, 10));
    bus_write(7, w_ptr(200, 100, 3, 0, 1));
    bus_write(0, w_boss(0, 0, 2, 0, 1), 1'b0);            // not selected: ignored
    lq.delete();
    wait_frame();
    expect_px(M_WALL, "top wall", 10, 10, pal(tile(0, 10, 10)));
    expect_px(M_WALL, "side wall", 620, 300, pal(tile(0, 620, 300)));
    expect_px(M_FLOOR, "floor", 100, 460, pal(tile(2, 100, 460)));
    expect_px(M_SLOT, "slot 0", 220, 240, pal(sprite(0, 50, 64, 100, 128, 8'h10)));
    expect_px(M_SLOT, "slot 1", 320, 240, pal(sprite(1, 50, 64, 100, 128, 8'h10)));
    expect_px(M_SLOT, "slot 2", 420, 240, pal(sprite(4, 50, 64, 100, 128, 8'h10)));
    expect_px(M_IGNORED_WRITE, "no boss over slot", 320, 200, pal(sprite(1, 50, 24, 100, 128, 8'h10)));
    expect_px(M_TRANSPARENT, "slot corner", 171, 177, BLACK);
    expect_px(M_TEXT, "S of SLOT", 41, 40, WHITE);
    expect_px(M_TEXT, "CATCH off", 81, 40, BLACK);
    expect_px(M_TEXT, "label C", 520, 45, RED);
    expect_px(M_DIGITS, "coin 1", 580, 44, RED);
    expect_px(M_DIGITS, "coin 0 middle", 559, 47, BLACK);
    expect_px(M_DIGITS, "hp 3", 591, 161, RED);
    expect_px(M_POINTER, "pointer", 200, 101, BLUE);
    // tone samples so far
    checks++;
    if (lq.size() < 50) begin failures++; $display("FAIL few samples %0d", lq.size()); end
    begin
      int flips, bad;
      flips = 0; bad = 0;
      for (int i = 2; i < lq.size(); i++) begin
        if (lq[i] != 4096 && lq[i] != -4096) bad++;
        if (lq[i] != lq[i-1]) flips++;
      end
      checks++;
      if (bad != 0 || flips == 0) begin failures++; $display("FAIL tone: %0d bad, %0d flips", bad, flips); end
      else seen[M_TONE]++;
    end

    // ------------------------------------------------ battle mode
    wait_vsync_start();
    bus_write(1, w_sound(1, 0, 0));                        // stored music
    bus_write(2, w_bg(14'b00100, 0, 5, 3, 0, 1, 1, 1));
    bus_write(3, w_slots(400, 60, 0, 1, 0, 0, 0, 0));      // enemy weapon on, slots off
    bus_write(4, w_weapon(300, 60, 4, 1, 1, 0, 1));        // elf weapon diamond, ring
    bus_write(5, w_elf(200, 100, 0, 1, 0, 1, 0, 0, 1, 1)); // elf lunging, enemy visible
    lq.delete();
    wait_frame();
    // elf drawn 16 pixels to the right of its register position
    expect_px(M_ELF, "elf", 126, 232, pal(sprite(1, 10, 32, 64, 64, 8'h40)));
    expect_px(M_LUNGE, "left of lunging elf", 105, 232, BLACK);
    expect_px(M_ENEMY_MIRROR, "enemy", 458, 312, pal(sprite(0, 53, 32, 64, 64, 8'h40)));
    expect_px(M_RING, "ring", 186, 232, CYAN);
    expect_px(M_WEAPON, "elf weapon", 307, 67, YELLOW);
    expect_px(M_WEAPON, "enemy weapon", 407, 67, ORANGE);
    expect_px(M_BAR, "elf bar", 120, 193, GREEN);
    expect_px(M_BAR, "enemy bar", 450, 273, RED);
    expect_px(M_TEXT, "B of BATTLE", 129, 40, WHITE);
    begin
      int bad;
      bad = 0;
      for (int i = 3; i < lq.size(); i++) begin
        int d;
        d = lq[i] - lq[i-1];
        if (d != 1024 && d != -1024) bad++;
      end
      checks++;
      if (bad != 0 || lq.size() < 50) begin failures++; $display("FAIL music steps: %0d bad", bad); end
      else seen[M_MUSIC]++;
    end

    // ------------------------------------------------ boss mode
    wait_vsync_start();
    bus_write(0, w_boss(0, 4, 2, 1, 1));
    bus_write(1, w_sound(1, 1, 50000));                    // music and tone
    bus_write(2, w_bg(14'b01000, 2, 0, 0, 1, 0, 0, 1));
    bus_write(3, w_slots(0, 0, 0, 0, 0, 0, 0, 0));
    bus_write(4, w_weapon(0, 0, 0, 0, 0, 0, 0));
    bus_write(5, w_elf(0, 0, 0, 0, 0, 0, 0, 0, 0, 0));
    // stall the left channel for ten sample periods
    @(negedge clk) lready = 0;
    begin
      logic signed [15:0] held;
      do begin
        @(posedge clk);
        #1;
      end while (!lvalid);
      held = ldata;
      target = 0;
      repeat (10 * 6250) begin
        @(posedge clk); #1;
        if (!lvalid || ldata != held) target++;
      end
      checks++;
      if (target != 0) begin failures++; $display("FAIL left sample not held"); end
      else seen[M_STALL]++;
    end
    @(negedge clk) lready = 1;
    lq.delete();
    wait_frame();
    expect_px(M_BOSS, "boss", 320, 200, pal(sprite(2, 48, 80, 96, 128, 8'hA0)));
    expect_px(M_FLAME, "left flame", 40, 400, pal(tile(4, 40, 400)));
    expect_px(M_FLAME, "right flame", 600, 400, pal(tile(5, 600, 400)));
    expect_px(M_BAR, "boss bar", 50, 57, RED);
    expect_px(M_BAR, "boss bar end", 104, 57, BLACK);
    begin
      int hi, lo;
      hi = 0; lo = 0;
      foreach (lq[i]) begin
        if (lq[i] > 8192) hi++;
        if (lq[i] < -8192) lo++;
      end
      checks++;
      if (hi == 0 || lo == 0) begin failures++; $display("FAIL mix range"); end
      else seen[M_MIX]++;
    end

    // every mechanism happened
    for (int m = 0; m < int'(M_COUNT); m++) begin
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never seen", mech_e'(m));
      end else begin
        $display("mechanism %-16s seen %0d times", mech_e'(m), seen[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
