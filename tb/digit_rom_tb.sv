// digit_rom_tb: checks the 16x16 seven-segment digits: which segments each
// digit lights (probed at one pixel inside each segment), the number of lit
// pixels of every digit, unlit
// background pixels and the one-clock read latency.
// A horizontal segment is 8x2 = 16 pixels, a vertical one 2x6 = 12 pixels.
module digit_rom_tb;
  logic clk = 0;
  logic [11:0] addr = '0;
  logic q;
  int checks = 0, failures = 0;

  digit_rom dut (.clk, .addr, .q);

  always #5 clk = ~clk;

  task automatic read(int d, int x, int y, output logic v);
    @(negedge clk) addr = 12'((d * 16 + y) * 16 + x);
    @(posedge clk) #1 v = q;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // lit segments a..g per digit, as on a seven-segment display
    string segs [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    // probe pixel inside each segment a..g
    int px [7] = '{7, 12, 13, 8, 2, 3, 6};
    int py [7] = '{1, 4, 10, 14, 10, 5, 8};
    logic v;
    for (int d = 0; d < 10; d++) begin
      int lit, expect_lit, nh, nv;
      for (int s = 0; s < 7; s++) begin
        logic on;
        on = 1'b0;
        for (int k = 0; k < segs[d].len(); k++) if (segs[d][k] == byte'("a" + s)) on = 1'b1;
        read(d, px[s], py[s], v);
        checks++;
        if (v != on) begin failures++; $display("FAIL digit %0d segment %0d = %0d", d, s, v); end
      end
      lit = 0;
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
        read(d, x, y, v);
        lit += int'(v);
      end
      nh = 0; nv = 0;
      for (int k = 0; k < segs[d].len(); k++)
        if (segs[d][k] == "a" || segs[d][k] == "d" || segs[d][k] == "g") nh++; else nv++;
      expect_lit = 16 * nh + 12 * nv;
      checks++;
      if (lit != expect_lit) begin failures++; $display("FAIL digit %0d lit %0d expected %0d", d, lit, expect_lit); end
      read(d, 0, 0, v);  checks++; if (v) begin failures++; $display("FAIL corner lit"); end
      read(d, 7, 4, v);  checks++; if (v) begin failures++; $display("FAIL hole lit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
