// audio_gen_tb: checks the sound source at its default 50 MHz / 8 kHz setting.
//   - sample period: 6250 clocks between samples
//   - silence when both sources are off
//   - a 500 Hz tone (half period 50000 clocks): every sample is +/-4096 and
//     the sign changes 20 times in 160 samples (10 periods)
//   - stored music: samples follow the triangle test tone from its start
//   - both together: the sum of the two
//   - handshake: a channel whose ready is held low keeps its sample and valid
//     (the other channel keeps running), and takes a new sample after ready
module audio_gen_tb;
  import mc_pkg::*;

  logic clk = 0, reset = 1;
  sound_cmd_t snd;
  logic signed [15:0] ldata, rdata;
  logic lvalid, rvalid, lready, rready, tick;
  int checks = 0, failures = 0;

  audio_gen dut (.clk, .reset, .snd_i(snd),
    .left_data(ldata), .left_valid(lvalid), .left_ready(lready),
    .right_data(rdata), .right_valid(rvalid), .right_ready(rready), .tick);

  always #5 clk = ~clk;

  // samples accepted on each channel
  int lq [$];
  int rq [$];
  always @(posedge clk) begin
    if (!reset && lvalid && lready) lq.push_back(int'(ldata));
    if (!reset && rvalid && rready) rq.push_back(int'(rdata));
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int tri_wave(int i);
    int p;
    p = i % 32;
    return (p < 16) ? -8192 + 1024 * p : 8192 - 1024 * (p - 16);
  endfunction

  task automatic get_samples(int n, output int s [$]);
    lq.delete();
    while (lq.size() < n) @(posedge clk);
    s = lq;
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s [$];
    longint t0, t1;
    snd = '0;
    lready = 1; rready = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // sample period
    @(posedge tick); t0 = $time;
    @(posedge tick); t1 = $time;
    expect_eq("clocks per sample", (t1 - t0) / 10, 6250);

    // silence
    get_samples(4, s);
    foreach (s[i]) expect_eq("silence", s[i], 0);

    // 500 Hz tone
    @(negedge clk) snd.tone_en = 1; snd.half_period = 18'd50000;
    get_samples(2, s);                   // let the new setting settle
    get_samples(161, s);
    begin
      int flips;
      flips = 0;
      foreach (s[i]) begin
        checks++;
        if (s[i] != 4096 && s[i] != -4096) begin failures++; $display("FAIL tone sample %0d", s[i]); end
        if (i > 0 && s[i] != s[i-1]) flips++;
      end
      checks++;
      if (flips < 19 || flips > 21) begin failures++; $display("FAIL tone flips %0d", flips); end
    end

    // stored music alone, from its start
    @(negedge clk) snd = '0;
    get_samples(2, s);
    @(negedge clk) snd.rom_en = 1;
    get_samples(70, s);
    foreach (s[i]) expect_eq("music", s[i], tri_wave(i));

    // both: music plus tone
    @(negedge clk) snd.tone_en = 1; snd.half_period = 18'd50000;
    get_samples(64, s);
    begin
      int hi, lo;
      hi = 0; lo = 0;
      foreach (s[i]) begin
        // each sample is a triangle value (a multiple of 1024 within
        // +/-8192) plus or minus the tone amplitude
        logic up_ok, dn_ok;
        up_ok = (s[i] - 4096) >= -8192 && (s[i] - 4096) <= 8192 && ((s[i] - 4096) % 1024) == 0;
        dn_ok = (s[i] + 4096) >= -8192 && (s[i] + 4096) <= 8192 && ((s[i] + 4096) % 1024) == 0;
        if (s[i] > 8192) hi++;
        if (s[i] < -8192) lo++;
        checks++;
        if (!up_ok && !dn_ok) begin failures++; $display("FAIL mixed sample %0d", s[i]); end
      end
      // the sum leaves the range of either source alone
      expect_eq("mix reaches above music-only peak", hi > 0, 1);
      expect_eq("mix reaches below music-only trough", lo > 0, 1);
    end

    // handshake: left stalls for 5 sample periods
    @(negedge clk) snd = '0;
    get_samples(2, s);
    @(negedge clk) snd.rom_en = 1;
    @(posedge lvalid);
    @(negedge clk) lready = 0;
    rq.delete();
    begin
      logic signed [15:0] held;
      held = ldata;
      repeat (5 * 6250) begin
        @(posedge clk); #1;
        checks++;
        if (!lvalid || ldata != held) begin failures++; $display("FAIL left did not hold"); break; end
      end
      expect_eq("right kept running", rq.size() >= 4, 1);
      @(negedge clk) lready = 1;
      lq.delete();
      @(posedge clk); #1;
      expect_eq("held sample taken", lq.size(), 1);
      expect_eq("held sample value", lq[0], held);
      get_samples(2, s);
      expect_eq("new samples after stall", s.size(), 2);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
