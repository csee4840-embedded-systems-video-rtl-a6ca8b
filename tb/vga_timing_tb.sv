// vga_timing_tb: checks the 640x480 VGA timing over one whole frame plus a
// few lines: pixel enable on every other clock, 800 pixels per line, 525 lines
// per frame, 640x480 visible pixels, sync pulse widths (96 pixels, 2 lines)
// and their positions after the front porches (16 pixels, 10 lines).
module vga_timing_tb;
  logic clk = 0, reset = 1;
  logic pix_en, active, hsync_n, vsync_n, vga_clk;
  logic [9:0] hcount, vcount;
  int checks = 0, failures = 0;

  vga_timing dut (.clk, .reset, .pix_en, .hcount, .vcount, .active, .hsync_n, .vsync_n, .vga_clk);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint clocks, pixels, act, hs_low, vs_low_pix, prev_pe;
    longint line_start, hs_fall_h, lines;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    // one frame from the reset point: 800*525 pixels
    clocks = 0; pixels = 0; act = 0; hs_low = 0; vs_low_pix = 0; prev_pe = 0;
    hs_fall_h = -1; lines = 0;
    while (pixels < 800 * 525) begin
      @(posedge clk);
      #1;
      clocks++;
      if (pix_en) begin
        // value of the counters during this pixel-enabled clock
        pixels++;
        if (active) act++;
        if (!hsync_n) hs_low++;
        if (!vsync_n) vs_low_pix++;
        if (!hsync_n && hcount == 10'd656 && vcount == 10'd0) hs_fall_h = hcount;
        if (hcount == 10'd799) lines++;
        if (active != (hcount < 640 && vcount < 480)) begin
          failures++; $display("FAIL active at %0d,%0d", hcount, vcount);
        end
        if (!hsync_n != (hcount >= 656 && hcount < 752)) begin
          failures++; $display("FAIL hsync at %0d", hcount);
        end
        if (!vsync_n != (vcount >= 490 && vcount < 492)) begin
          failures++; $display("FAIL vsync at %0d", vcount);
        end
        checks += 3;
      end
      checks++;
      if (pix_en == prev_pe) begin
        failures++; $display("FAIL pix_en does not alternate");
      end
      prev_pe = pix_en;
    end
    // the first clock after reset is already a pixel clock
    expect_eq("clocks per frame", clocks, 2 * 800 * 525 - 1);
    expect_eq("visible pixels", act, 640 * 480);
    expect_eq("hsync low pixels per frame", hs_low, 96 * 525);
    expect_eq("vsync low pixels", vs_low_pix, 2 * 800);
    expect_eq("lines per frame", lines, 525);
    expect_eq("hsync starts after front porch", hs_fall_h, 656);
    // the counters wrap back to the origin at the next pixel clock
    @(posedge clk);
    #1;
    expect_eq("wrap h", hcount, 0);
    expect_eq("wrap v", vcount, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
