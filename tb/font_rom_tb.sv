// font_rom_tb: checks glyph pictures in the 5x8 font ROM against bitmaps
// drawn here as text ('#' = lit), the address layout g*40 + row*5 + col, the
// blank glyphs and the one-clock read latency.
module font_rom_tb;
  logic clk = 0;
  logic [11:0] addr = '0;
  logic q;
  int checks = 0, failures = 0;

  font_rom dut (.clk, .addr, .q);

  always #5 clk = ~clk;

  task automatic check_glyph(int g, string rows [8]);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 5; c++) begin
        @(negedge clk) addr = 12'(g * 40 + r * 5 + c);
        @(posedge clk) #1;
        checks++;
        if (q != (rows[r][c] == "#")) begin
          failures++;
          $display("FAIL glyph %0d row %0d col %0d = %0d", g, r, c, q);
        end
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
    string a_rows [8] = '{"..#..", ".#.#.", "#...#", "#...#", "#####", "#...#", "#...#", "....."};
    string l_rows [8] = '{"#....", "#....", "#....", "#....", "#....", "#....", "#####", "....."};
    string t_rows [8] = '{"#####", "#.#.#", "..#..", "..#..", "..#..", "..#..", "..#..", "....."};
    string one    [8] = '{"..#..", ".##..", "..#..", "..#..", "..#..", "..#..", ".###.", "....."};
    string blank  [8] = '{".....", ".....", ".....", ".....", ".....", ".....", ".....", "....."};
    check_glyph(1, a_rows);    // A
    check_glyph(12, l_rows);   // L
    check_glyph(20, t_rows);   // T
    check_glyph(28, one);      // 1
    check_glyph(0, blank);     // space
    check_glyph(52, blank);    // last, unused
    // latency
    @(negedge clk) addr = 12'(40 + 20);   // A, row 4, col 0: lit
    @(posedge clk) #1;
    @(negedge clk) addr = 12'(0);
    #1 begin checks++; if (q != 1'b1) begin failures++; $display("FAIL changed before edge"); end end
    @(posedge clk) #1;
    checks++; if (q != 1'b0) begin failures++; $display("FAIL no change after edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
