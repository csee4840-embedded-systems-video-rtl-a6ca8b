// music_rom_tb: checks that the sample ROM holds 4096 16-bit samples (8192
// bytes) of the 250 Hz triangle test tone, rising by 1024 per sample from
// -8192 to +8192 over 16 samples and falling back over the next 16, and the
// one-clock read latency.
module music_rom_tb;
  logic clk = 0;
  logic [11:0] addr = '0;
  logic signed [15:0] q;
  int checks = 0, failures = 0;

  music_rom dut (.clk, .addr, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    expv = -8192;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk) addr = 12'(i);
      @(posedge clk) #1;
      checks++;
      if (int'(q) != expv) begin
        failures++;
        $display("FAIL sample %0d = %0d expected %0d", i, q, expv);
      end
      // walk the triangle: up for 16 steps, down for 16
      if ((i % 32) < 16) expv += 1024; else expv -= 1024;
    end
    @(negedge clk) addr = 12'd16;
    #1 begin checks++; if (q != -16'sd7168) begin failures++; $display("FAIL changed before edge"); end end
    @(posedge clk) #1;
    checks++; if (q != 16'sd8192) begin failures++; $display("FAIL peak %0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
