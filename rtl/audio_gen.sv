// audio_gen: sound source of the peripheral. It produces one signed 16-bit
// sample per 8 kHz sample period and hands it to the audio codec interface on
// two Avalon-ST channels (left and right carry the same sample).
//
// A free-running counter divides the system clock down to the sample rate
// (CLK_HZ / SAMPLE_HZ clocks per sample). Two sources are mixed:
//   - a tone made by frequency division: a second counter toggles a square
//     wave every half_period clocks, so the tone's frequency is
//     CLK_HZ / (2*half_period); software plays a melody by rewriting the
//     period in the sound register;
//   - stored music: music_rom is read at one sample per period and loops.
// Each is added when enabled and the sum saturates to 16 bits.
//
// Handshake: on each sample tick a channel whose previous sample has been
// taken (valid low) loads the new sample and raises valid; valid and data then
// hold until ready is seen high on a clock edge. A channel still holding its
// previous sample at a tick keeps it and the new sample is dropped.
//
// From the description: 8 kHz, 16-bit samples, a rate-dividing counter, tones
// by frequency division, stored samples of at most 8192 bytes, control from
// the sound register. This design's choices: the sound register fields
// (half period, tone enable, music enable), the square wave's amplitude
// TONE_AMP, mixing by saturating addition, looping playback and the drop rule.
//
// Interface: clk, reset, snd_i (decoded sound command); left/right_data,
// left/right_valid, left/right_ready; tick (one clock per sample period).
module audio_gen
  import mc_pkg::*;
#(
  parameter int unsigned       CLK_HZ    = 50_000_000,
  parameter int unsigned       SAMPLE_HZ = 8_000,
  parameter logic signed [15:0] TONE_AMP = 16'sd4096,
  parameter int unsigned       ROM_BYTES = 8192
) (
  input  logic               clk,
  input  logic               reset,
  input  sound_cmd_t         snd_i,
  output logic signed [15:0] left_data,
  output logic               left_valid,
  input  logic               left_ready,
  output logic signed [15:0] right_data,
  output logic               right_valid,
  input  logic               right_ready,
  output logic               tick
);

  localparam int unsigned DIV    = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned DW_DIV = $clog2(DIV);
  localparam int unsigned DEPTH  = ROM_BYTES / 2;
  localparam int unsigned RAW    = $clog2(DEPTH);

  // ---- sample-rate divider
  logic [DW_DIV-1:0] div_cnt;
  always_ff @(posedge clk) begin
    if (reset) div_cnt <= '0;
    else       div_cnt <= (div_cnt == DW_DIV'(DIV - 1)) ? '0 : div_cnt + 1'b1;
  end
  assign tick = (div_cnt == DW_DIV'(DIV - 1));

  // ---- tone by frequency division
  logic [17:0] tone_cnt;
  logic        square;
  always_ff @(posedge clk) begin
    if (reset || !snd_i.tone_en || snd_i.half_period == '0) begin
      tone_cnt <= '0;
      square   <= 1'b0;
    end else if (tone_cnt >= snd_i.half_period - 18'd1) begin
      tone_cnt <= '0;
      square   <= ~square;
    end else begin
      tone_cnt <= tone_cnt + 18'd1;
    end
  end

  // ---- stored music
  logic [RAW-1:0]     rom_addr;
  logic signed [15:0] rom_q;

  music_rom #(.BYTES(ROM_BYTES)) u_rom (.clk(clk), .addr(rom_addr), .q(rom_q));

  always_ff @(posedge clk) begin
    if (reset || !snd_i.rom_en) rom_addr <= '0;
    else if (tick)              rom_addr <= rom_addr + 1'b1;   // wraps: playback loops
  end

  // ---- mixer
  logic signed [17:0] sum;
  logic signed [15:0] sample;
  always_comb begin
    sum = '0;
    if (snd_i.tone_en && snd_i.half_period != '0)
      sum = square ? 18'(TONE_AMP) : -18'(TONE_AMP);
    if (snd_i.rom_en)
      sum = sum + 18'(rom_q);
    if (sum > 18'sd32767)       sample = 16'sh7FFF;
    else if (sum < -18'sd32768) sample = 16'sh8000;
    else                        sample = sum[15:0];
  end

  // ---- Avalon-ST sources
  always_ff @(posedge clk) begin
    if (reset) begin
      left_valid  <= 1'b0;
      right_valid <= 1'b0;
      left_data   <= '0;
      right_data  <= '0;
    end else begin
      if (left_valid && left_ready)   left_valid  <= 1'b0;
      if (right_valid && right_ready) right_valid <= 1'b0;
      if (tick && (!left_valid || left_ready)) begin
        left_data  <= sample;
        left_valid <= 1'b1;
      end
      if (tick && (!right_valid || right_ready)) begin
        right_data  <= sample;
        right_valid <= 1'b1;
      end
    end
  end

  // A sample offered on a channel stays unchanged until it is taken.
  a_left_hold: assert property (@(posedge clk) disable iff (reset)
    left_valid && !left_ready |=> left_valid && $stable(left_data));
  a_right_hold: assert property (@(posedge clk) disable iff (reset)
    right_valid && !right_ready |=> right_valid && $stable(right_data));

endmodule
