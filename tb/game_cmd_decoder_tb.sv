// game_cmd_decoder_tb: checks the register-to-command decoding.
// Random register words are applied; the testbench unpacks the fields with its
// own bit positions (not the package structs) and works out the expected
// commands: bar lengths, lunge positions, decimal digits, slot validity and
// the sound fields. It also checks the one-clock register delay.
module game_cmd_decoder_tb;
  import mc_pkg::*;

  logic clk = 0, reset = 1;
  logic [31:0] regs [8];
  draw_cmd_t   cmd;
  sound_cmd_t  snd;
  int checks = 0, failures = 0;

  game_cmd_decoder dut (.clk, .reset, .regs_i(regs), .cmd_o(cmd), .snd_o(snd));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int bits(logic [31:0] w, int hi, int lo);
    return int'((w >> lo) & ((32'd1 << (hi - lo + 1)) - 1));
  endfunction

  function automatic int bcd(int v);
    return ((v / 100) << 8) | (((v / 10) % 10) << 4) | (v % 10);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) regs[i] = '0;
    repeat (2) @(posedge clk);
    #1 expect_eq("reset cmd", longint'(cmd.boss_en), 0);
    reset = 0;
    for (int n = 0; n < 300; n++) begin
      int ex, ey, efold, eact, exp_x;
      @(negedge clk);
      for (int i = 0; i < 8; i++) regs[i] = $urandom;
      @(posedge clk);
      #1;
      // boss word (byte offset 00)
      expect_eq("boss_en",  cmd.boss_en, bits(regs[0], 2, 2));
      expect_eq("boss_img", cmd.boss_img, bits(regs[0], 5, 4));
      expect_eq("boss_bar_en", cmd.boss_bar_en, bits(regs[0], 2, 2) & bits(regs[0], 3, 3));
      expect_eq("boss_bar_len", cmd.boss_bar_len, 16 * bits(regs[0], 11, 8));
      // sound word (04)
      expect_eq("half_period", snd.half_period, bits(regs[1], 17, 0));
      expect_eq("tone_en", snd.tone_en, bits(regs[1], 18, 18));
      expect_eq("rom_en", snd.rom_en, bits(regs[1], 19, 19));
      // background word (08)
      expect_eq("wall_en", cmd.wall_en, bits(regs[2], 2, 2));
      expect_eq("fire_en", cmd.fire_en, bits(regs[2], 5, 5));
      expect_eq("fire_tiles", cmd.fire_tiles, (bits(regs[2], 17, 14) > 13) ? 13 : bits(regs[2], 17, 14));
      expect_eq("words", cmd.words, bits(regs[2], 31, 18));
      expect_eq("elf_bar_len", cmd.elf_bar_len, 8 * bits(regs[2], 13, 10));
      expect_eq("enemy_bar_len", cmd.enemy_bar_len, 8 * bits(regs[2], 9, 6));
      expect_eq("elf_bar_en", cmd.elf_bar_en, bits(regs[2], 4, 4) & bits(regs[5], 5, 5));
      expect_eq("enemy_bar_en", cmd.enemy_bar_en, bits(regs[2], 3, 3) & bits(regs[5], 6, 6));
      // slots and enemy weapon (12)
      expect_eq("slots_visible", cmd.slots_visible, bits(regs[3], 2, 2));
      for (int s = 0; s < 3; s++) begin
        expect_eq("slot_img", cmd.slot_img[s], bits(regs[3], 5 + 3 * s, 3 + 3 * s));
        expect_eq("slot_ok", cmd.slot_ok[s], bits(regs[3], 5 + 3 * s, 3 + 3 * s) < 5);
      end
      expect_eq("enemy_w_en", cmd.enemy_w_en, bits(regs[3], 12, 12));
      expect_eq("enemy_w_shape", cmd.enemy_w_shape, bits(regs[3], 13, 13));
      expect_eq("enemy_w_x", cmd.enemy_w_x, bits(regs[3], 31, 23));
      expect_eq("enemy_w_y", cmd.enemy_w_y, bits(regs[3], 22, 14));
      // elf weapon (16)
      expect_eq("elf_w_en", cmd.elf_w_en, bits(regs[4], 4, 4));
      expect_eq("elf_w_type", cmd.elf_w_type, bits(regs[4], 9, 7));
      expect_eq("elf_w_color", cmd.elf_w_color, bits(regs[4], 13, 10));
      expect_eq("elf_w_x", cmd.elf_w_x, bits(regs[4], 31, 23));
      expect_eq("elf_w_y", cmd.elf_w_y, bits(regs[4], 22, 14));
      expect_eq("elf_circle", cmd.elf_circle, bits(regs[4], 6, 6) & bits(regs[5], 5, 5));
      expect_eq("enemy_circle", cmd.enemy_circle, bits(regs[4], 5, 5) & bits(regs[5], 6, 6));
      // elf word (20)
      ex = bits(regs[5], 22, 14);
      ey = bits(regs[5], 31, 23);
      efold = bits(regs[5], 7, 7);
      eact  = bits(regs[5], 9, 9);
      exp_x = !eact ? ex : (!efold ? ex + 16 : (ex < 16 ? 0 : ex - 16));
      expect_eq("elf_x", cmd.elf_x, exp_x);
      expect_eq("elf_y", cmd.elf_y, ey);
      expect_eq("elf_img", cmd.elf_img, bits(regs[5], 11, 11));
      expect_eq("enemy_img", cmd.enemy_img, bits(regs[5], 12, 12));
      expect_eq("elf_visible", cmd.elf_visible, bits(regs[5], 5, 5));
      expect_eq("enemy_visible", cmd.enemy_visible, bits(regs[5], 6, 6));
      expect_eq("enemy_x", cmd.enemy_x, !bits(regs[5], 10, 10) ? 448 : (bits(regs[5], 8, 8) ? 464 : 432));
      // char word (24)
      expect_eq("coin", cmd.num[0], bcd(bits(regs[6], 9, 4)));
      expect_eq("level", cmd.num[1], bcd(bits(regs[6], 15, 10)));
      expect_eq("atk", cmd.num[2], bcd(bits(regs[6], 23, 16)));
      expect_eq("hp", cmd.num[3], bcd(bits(regs[6], 31, 24)));
      // pointer word (28)
      expect_eq("ptr_visible", cmd.ptr_visible, bits(regs[7], 5, 5));
      expect_eq("ptr_color", cmd.ptr_color, bits(regs[7], 13, 10));
      expect_eq("ptr_x", cmd.ptr_x, bits(regs[7], 31, 23));
      expect_eq("ptr_y", cmd.ptr_y, bits(regs[7], 22, 14));
    end
    // latency: a change is not visible before the clock edge
    @(negedge clk);
    regs[6] = 32'h0000_03F0;
    @(posedge clk);
    @(negedge clk);
    regs[6] = 32'h0000_0000;
    #1 expect_eq("no change before edge", (cmd.num[0] == 12'(bcd(0))) ? 0 : 1, 1);
    @(posedge clk); #1;
    expect_eq("change after edge", cmd.num[0], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
