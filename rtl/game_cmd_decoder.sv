// game_cmd_decoder: turns the eight register words into the commands the
// renderer and the sound source act on.
//
// The register words are unpacked through the register structs of mc_pkg and
// converted into what the drawing layers need directly: slot image numbers
// checked against the five stored images, blood percentages turned into bar
// lengths in pixels, the attack lunge of the elf and the enemy folded into their
// screen position, the four character values (coin, level, attack, hit points)
// converted to three decimal digits, and the sound fields gathered into a sound
// command. The result is registered, so commands change one clock after the
// register words do.
//
// The field names come from the published register map. How a field becomes a
// picture (bar length per percent step, a lunge of ACTION_DX pixels toward the
// opponent, the fixed enemy position, flame height in tiles) is this design's
// own choice. The boss attack address and the pointer move fields are carried in
// the register map but are not drawn.
//
// Interface: clk, reset; regs_i (register file); cmd_o, snd_o (registered).
module game_cmd_decoder
  import mc_pkg::*;
(
  input  logic          clk,
  input  logic          reset,
  input  logic [DW-1:0] regs_i [NREGS],
  output draw_cmd_t     cmd_o,
  output sound_cmd_t    snd_o
);

  boss_reg_t    boss;
  sound_reg_t   sound;
  bg_reg_t      bg;
  slots_reg_t   slots;
  weapon_reg_t  weap;
  elf_reg_t     elf;
  char_reg_t    chr;
  pointer_reg_t ptr;

  assign boss  = boss_reg_t'(regs_i[REG_BOSS]);
  assign sound = sound_reg_t'(regs_i[REG_SOUND]);
  assign bg    = bg_reg_t'(regs_i[REG_BG]);
  assign slots = slots_reg_t'(regs_i[REG_SLOTS]);
  assign weap  = weapon_reg_t'(regs_i[REG_WEAPON]);
  assign elf   = elf_reg_t'(regs_i[REG_ELF]);
  assign chr   = char_reg_t'(regs_i[REG_CHAR]);
  assign ptr   = pointer_reg_t'(regs_i[REG_POINTER]);

  // Maximum flame height: from the floor row up to the top wall row.
  localparam logic [3:0] MAX_FIRE_TILES = 4'((V_ACTIVE - 2 * TILE_H) / TILE_H);

  draw_cmd_t  c;
  sound_cmd_t s;

  always_comb begin
    c = '0;
    // background
    c.wall_en    = bg.wall_en;
    c.fire_en    = bg.fire_en;
    c.fire_tiles = (bg.fire_size > MAX_FIRE_TILES) ? MAX_FIRE_TILES : bg.fire_size;
    // slots
    c.slots_visible = slots.slots_visible;
    c.slot_img      = {slots.slot2, slots.slot1, slots.slot0};
    c.slot_ok       = {slots.slot2 < 3'(SLOT_N), slots.slot1 < 3'(SLOT_N), slots.slot0 < 3'(SLOT_N)};
    // boss
    c.boss_en      = boss.boss_en;
    c.boss_img     = boss.pattern[1:0];
    c.boss_bar_en  = boss.boss_en && boss.blood_en;
    c.boss_bar_len = {1'b0, boss.blood, 4'b0000};          // 16 px per step
    // elf: faces right, mirrored when folded; lunges forward when acting
    c.elf_visible = elf.elf_visible;
    c.elf_img     = elf.elf_pattern;
    c.elf_fold    = elf.elf_fold;
    c.elf_y       = elf.elf_y;
    if (!elf.elf_action)
      c.elf_x = {1'b0, elf.elf_x};
    else if (!elf.elf_fold)
      c.elf_x = {1'b0, elf.elf_x} + 10'(ACTION_DX);
    else
      c.elf_x = (elf.elf_x < 9'(ACTION_DX)) ? 10'd0 : {1'b0, elf.elf_x} - 10'(ACTION_DX);
    // enemy: fixed place, faces left, mirrored when folded
    c.enemy_visible = elf.enemy_visible;
    c.enemy_img     = elf.enemy_pattern[0];
    c.enemy_fold    = elf.enemy_fold;
    c.enemy_y       = 9'(ENEMY_Y0);
    if (!elf.enemy_action)
      c.enemy_x = 10'(ENEMY_X0);
    else if (!elf.enemy_fold)
      c.enemy_x = 10'(ENEMY_X0 - ACTION_DX);
    else
      c.enemy_x = 10'(ENEMY_X0 + ACTION_DX);
    // blood bars, 8 px per step
    c.elf_bar_en    = bg.elf_blood_en && elf.elf_visible;
    c.elf_bar_len   = {1'b0, bg.elf_blood, 3'b000};
    c.enemy_bar_en  = bg.enemy_blood_en && elf.enemy_visible;
    c.enemy_bar_len = {1'b0, bg.enemy_blood, 3'b000};
    // protective circles
    c.elf_circle   = weap.elf_defend && elf.elf_visible;
    c.enemy_circle = weap.enemy_defend && elf.enemy_visible;
    // weapons
    c.elf_w_en      = weap.elf_attack;
    c.elf_w_type    = weap.w_type;
    c.elf_w_color   = weap.w_pattern;
    c.elf_w_x       = weap.w_x;
    c.elf_w_y       = weap.w_y;
    c.enemy_w_en    = slots.ew_en;
    c.enemy_w_shape = slots.ew_pattern;
    c.enemy_w_x     = slots.ew_x;
    c.enemy_w_y     = slots.ew_y;
    // text and numbers
    c.words  = bg.sentences;
    c.num[0] = to_bcd3({4'b0, chr.coin});
    c.num[1] = to_bcd3({4'b0, chr.level});
    c.num[2] = to_bcd3({2'b0, chr.atk});
    c.num[3] = to_bcd3({2'b0, chr.hp});
    // pointer
    c.ptr_visible = ptr.ptr_visible;
    c.ptr_color   = ptr.ptr_pattern;
    c.ptr_x       = ptr.ptr_x;
    c.ptr_y       = ptr.ptr_y;

    s.tone_en     = sound.tone_en;
    s.rom_en      = sound.rom_en;
    s.half_period = sound.half_period;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      cmd_o <= '0;
      snd_o <= '0;
    end else begin
      cmd_o <= c;
      snd_o <= s;
    end
  end

endmodule
