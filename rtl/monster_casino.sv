// monster_casino: the game's display and sound peripheral.
//
// Software on the processor runs the game and writes eight 32-bit registers
// over Avalon-MM; the hardware turns them into the VGA picture and the sound.
//   avalon_regs       the eight registers (bus interface)
//   game_cmd_decoder  register words -> drawing and sound commands
//   vga_timing        640x480 counters and syncs (pixel = two clocks)
//   ppu               picture generator: ROM pictures, hard-coded graphics,
//                     colour table
//   audio_gen         8 kHz, 16-bit sample source (tone + stored music)
// The audio codec interface, its clock generator, the processor, USB and
// Ethernet are outside: the audio samples leave on two Avalon-ST channels and
// the VGA signals go straight to the board's video DAC.
//
// Timing: a register write reaches the commands two clocks later (register,
// then decoder register); the commands are sampled by the picture generator
// every clock, so a change shows from the next pixel drawn. The VGA colour,
// syncs and blank leave the picture generator four clocks (two pixels) after
// the counters, all aligned with each other. VGA_SYNC_n (sync on green) is
// held high.
//
// Interface: clk (50 MHz), reset (synchronous, active high); Avalon-MM write
// port chipselect, write, address (word), writedata; VGA_*; audio
// left/right data, valid, ready; sample_tick.
module monster_casino
  import mc_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SAMPLE_HZ = 8_000
) (
  input  logic               clk,
  input  logic               reset,
  // Avalon-MM slave (write only)
  input  logic               chipselect,
  input  logic               write,
  input  logic [AW-1:0]      address,
  input  logic [DW-1:0]      writedata,
  // VGA
  output logic [7:0]         VGA_R,
  output logic [7:0]         VGA_G,
  output logic [7:0]         VGA_B,
  output logic               VGA_CLK,
  output logic               VGA_HS,
  output logic               VGA_VS,
  output logic               VGA_BLANK_n,
  output logic               VGA_SYNC_n,
  // audio, Avalon-ST towards the codec interface
  output logic signed [15:0] left_data,
  output logic               left_valid,
  input  logic               left_ready,
  output logic signed [15:0] right_data,
  output logic               right_valid,
  input  logic               right_ready,
  output logic               sample_tick
);

  logic [DW-1:0] regs [NREGS];
  draw_cmd_t     cmd;
  sound_cmd_t    snd;

  avalon_regs u_regs (
    .clk, .reset, .chipselect, .write, .address, .writedata, .regs_o(regs));

  game_cmd_decoder u_dec (.clk, .reset, .regs_i(regs), .cmd_o(cmd), .snd_o(snd));

  logic       active, hs_n, vs_n, vclk;
  logic [9:0] hcount, vcount;

  vga_timing u_tim (
    .clk, .reset, .pix_en(), .hcount, .vcount, .active,
    .hsync_n(hs_n), .vsync_n(vs_n), .vga_clk(vclk));

  ppu u_ppu (
    .clk, .cmd, .x(hcount), .y(vcount), .de(active), .hsync_n(hs_n), .vsync_n(vs_n),
    .r(VGA_R), .g(VGA_G), .b(VGA_B),
    .hsync_n_o(VGA_HS), .vsync_n_o(VGA_VS), .blank_n_o(VGA_BLANK_n));

  // The colour path is an even number of clocks long, so the pixel clock
  // keeps its phase relative to the colour.
  assign VGA_CLK    = vclk;
  assign VGA_SYNC_n = 1'b1;

  audio_gen #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_aud (
    .clk, .reset, .snd_i(snd),
    .left_data, .left_valid, .left_ready,
    .right_data, .right_valid, .right_ready,
    .tick(sample_tick));

endmodule
