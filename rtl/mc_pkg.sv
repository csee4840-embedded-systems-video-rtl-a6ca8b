// mc_pkg: types and constants shared by the Monster Casino display and sound
// peripheral.
//
// The peripheral is controlled by eight 32-bit registers written by software
// over an Avalon-MM bus. This package holds the register map (word offsets and
// bit fields), the decoded command structs the register words are turned into,
// the picture ROM geometry and the screen layout.
//
// Register map: the eight registers, their order and the names of their fields
// follow the published register tables. The bit positions are read from those
// tables, fields packed from the most significant bit down in the order printed;
// where a field's width is not legible it is chosen to hold the values the rest
// of the description requires (five slot images need three bits, and so on).
// The screen layout (where the fixed elements sit) is this design's own choice.
package mc_pkg;

  // ---------------------------------------------------------------- bus
  localparam int unsigned NREGS   = 8;
  localparam int unsigned AW      = 3;     // word address width
  localparam int unsigned DW      = 32;

  typedef enum logic [AW-1:0] {
    REG_BOSS    = 3'd0,   // byte offset 00
    REG_SOUND   = 3'd1,   // 04
    REG_BG      = 3'd2,   // 08
    REG_SLOTS   = 3'd3,   // 12
    REG_WEAPON  = 3'd4,   // 16
    REG_ELF     = 3'd5,   // 20
    REG_CHAR    = 3'd6,   // 24
    REG_POINTER = 3'd7    // 28
  } reg_addr_e;

  typedef logic [DW-1:0] reg_file_t [NREGS];

  // ------------------------------------------------------- register words
  typedef struct packed {
    logic [19:0] attack_addr;     // [31:12]
    logic [3:0]  blood;           // [11:8]
    logic [3:0]  pattern;         // [7:4]
    logic        blood_en;        // [3]
    logic        boss_en;         // [2]
    logic [1:0]  rsvd;            // [1:0]
  } boss_reg_t;

  typedef struct packed {
    logic [11:0] rsvd;            // [31:20]
    logic        rom_en;          // [19]
    logic        tone_en;         // [18]
    logic [17:0] half_period;     // [17:0] tone half period in clock cycles
  } sound_reg_t;

  typedef struct packed {
    logic [13:0] sentences;       // [31:18]
    logic [3:0]  fire_size;       // [17:14]
    logic [3:0]  elf_blood;       // [13:10]
    logic [3:0]  enemy_blood;     // [9:6]
    logic        fire_en;         // [5]
    logic        elf_blood_en;    // [4]
    logic        enemy_blood_en;  // [3]
    logic        wall_en;         // [2]
    logic [1:0]  rsvd;            // [1:0]
  } bg_reg_t;

  typedef struct packed {
    logic [8:0]  ew_x;            // [31:23] enemy weapon X
    logic [8:0]  ew_y;            // [22:14] enemy weapon Y
    logic        ew_pattern;      // [13]
    logic        ew_en;           // [12]
    logic [2:0]  slot2;           // [11:9]
    logic [2:0]  slot1;           // [8:6]
    logic [2:0]  slot0;           // [5:3]
    logic        slots_visible;   // [2]
    logic [1:0]  rsvd;            // [1:0]
  } slots_reg_t;

  typedef struct packed {
    logic [8:0]  w_x;             // [31:23] elf weapon X
    logic [8:0]  w_y;             // [22:14] elf weapon Y
    logic [3:0]  w_pattern;       // [13:10]
    logic [2:0]  w_type;          // [9:7]
    logic        elf_defend;      // [6]
    logic        enemy_defend;    // [5]
    logic        elf_attack;      // [4]
    logic [3:0]  rsvd;            // [3:0]
  } weapon_reg_t;

  typedef struct packed {
    logic [8:0]  elf_y;           // [31:23]
    logic [8:0]  elf_x;           // [22:14]
    logic [1:0]  enemy_pattern;   // [13:12]
    logic        elf_pattern;     // [11]
    logic        enemy_action;    // [10]
    logic        elf_action;      // [9]
    logic        enemy_fold;      // [8]
    logic        elf_fold;        // [7]
    logic        enemy_visible;   // [6]
    logic        elf_visible;     // [5]
    logic [4:0]  rsvd;            // [4:0]
  } elf_reg_t;

  typedef struct packed {
    logic [7:0]  hp;              // [31:24]
    logic [7:0]  atk;             // [23:16]
    logic [5:0]  level;           // [15:10]
    logic [5:0]  coin;            // [9:4]
    logic [3:0]  rsvd;            // [3:0]
  } char_reg_t;

  typedef struct packed {
    logic [8:0]  ptr_x;           // [31:23]
    logic [8:0]  ptr_y;           // [22:14]
    logic [3:0]  ptr_pattern;     // [13:10]
    logic [3:0]  ptr_move;        // [9:6]
    logic        ptr_visible;     // [5]
    logic [4:0]  rsvd;            // [4:0]
  } pointer_reg_t;

  // ------------------------------------------------------- picture ROMs
  // Geometry of the picture ROMs (image width, height, number of images).
  localparam int unsigned SLOT_W = 100, SLOT_H = 128, SLOT_N = 5;
  localparam int unsigned BOSS_W = 96,  BOSS_H = 128, BOSS_N = 4;
  localparam int unsigned ELF_W  = 64,  ELF_H  = 64,  ELF_N  = 2;
  localparam int unsigned TILE_W = 32,  TILE_H = 32,  TILE_N = 7;
  localparam int unsigned FONT_W = 5,   FONT_H = 8,   FONT_N = 53;
  localparam int unsigned DIG_W  = 16,  DIG_H  = 16,  DIG_N  = 10;

  // Background tile numbers inside the background ROM.
  localparam int unsigned TILE_WALL0   = 0;
  localparam int unsigned TILE_WALL1   = 1;
  localparam int unsigned TILE_FLOOR0  = 2;
  localparam int unsigned TILE_FLOOR1  = 3;
  localparam int unsigned TILE_FLAME_L = 4;
  localparam int unsigned TILE_FLAME_R = 5;
  localparam int unsigned TILE_REWARD  = 6;

  // Palette index 0 is the transparent colour of every picture.
  localparam logic [7:0] TRANSPARENT = 8'd0;

  // ------------------------------------------------------- screen layout
  localparam int unsigned H_ACTIVE = 640, V_ACTIVE = 480;
  localparam int unsigned SLOT_X0  = 170, SLOT_Y0 = 176;   // slot i at SLOT_X0+100*i
  localparam int unsigned BOSS_X0  = 272, BOSS_Y0 = 120;
  localparam int unsigned ENEMY_X0 = 448, ENEMY_Y0 = 280;
  localparam int unsigned TEXT_X0  = 40,  TEXT_Y0 = 40;
  localparam int unsigned BOSSBAR_Y0 = 56;
  localparam int unsigned NUM_X0   = 552;                  // first digit column
  localparam int unsigned LABEL_X0 = 520;
  localparam int unsigned NUM_Y0   = 40, NUM_DY = 40;      // COIN, LV, ATK, HP rows
  localparam int unsigned ACTION_DX = 16;                  // lunge of an attacking sprite
  localparam int unsigned CIRCLE_R_OUT = 40, CIRCLE_R_IN = 36;

  // ------------------------------------------------------- decoded commands
  typedef struct packed {
    // background
    logic        wall_en;
    logic        fire_en;
    logic [3:0]  fire_tiles;        // flame height in tiles
    // slots
    logic        slots_visible;
    logic [2:0][2:0] slot_img;   // image of slot 2, 1, 0
    logic [2:0]  slot_ok;           // image number exists
    // boss
    logic        boss_en;
    logic [1:0]  boss_img;
    logic        boss_bar_en;
    logic [8:0]  boss_bar_len;      // pixels
    // elf and enemy
    logic        elf_visible, enemy_visible;
    logic        elf_img, enemy_img;
    logic        elf_fold, enemy_fold;
    logic [9:0]  elf_x, enemy_x;    // left edge, after the attack lunge
    logic [8:0]  elf_y, enemy_y;
    logic        elf_bar_en, enemy_bar_en;
    logic [7:0]  elf_bar_len, enemy_bar_len;
    logic        elf_circle, enemy_circle;
    // weapons
    logic        elf_w_en;
    logic [2:0]  elf_w_type;
    logic [3:0]  elf_w_color;
    logic [8:0]  elf_w_x, elf_w_y;
    logic        enemy_w_en;
    logic        enemy_w_shape;
    logic [8:0]  enemy_w_x, enemy_w_y;
    // text and numbers
    logic [13:0] words;             // one enable per menu word
    logic [3:0][11:0] num;        // HP, ATK, LV, COIN (index 3..0) as three BCD digits
    // pointer
    logic        ptr_visible;
    logic [3:0]  ptr_color;
    logic [8:0]  ptr_x, ptr_y;
  } draw_cmd_t;

  typedef struct packed {
    logic        tone_en;
    logic        rom_en;
    logic [17:0] half_period;
  } sound_cmd_t;

  // Three-digit BCD of a value below 1000.
  function automatic logic [11:0] to_bcd3(input logic [9:0] v);
    logic [9:0] h, t, o;
    h = v / 10'd100;
    t = (v % 10'd100) / 10'd10;
    o = v % 10'd10;
    return {h[3:0], t[3:0], o[3:0]};
  endfunction

  // A 16-colour fixed RGB set used by the hard-coded graphics.
  function automatic logic [23:0] fixed_color(input logic [3:0] c);
    case (c)
      4'd0:  return 24'hFFFFFF;
      4'd1:  return 24'hFF2020;
      4'd2:  return 24'h20FF20;
      4'd3:  return 24'h2040FF;
      4'd4:  return 24'hFFFF20;
      4'd5:  return 24'h20FFFF;
      4'd6:  return 24'hFF20FF;
      4'd7:  return 24'hFF8000;
      4'd8:  return 24'h8000FF;
      4'd9:  return 24'h00FF80;
      4'd10: return 24'h808080;
      4'd11: return 24'hFFC0C0;
      4'd12: return 24'hC0FFC0;
      4'd13: return 24'hC0C0FF;
      4'd14: return 24'h804000;
      default: return 24'h404040;
    endcase
  endfunction

endpackage
