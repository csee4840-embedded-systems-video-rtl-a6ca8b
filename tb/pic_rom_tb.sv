// pic_rom_tb: checks the picture ROM's contents, address layout and read
// latency for a transparent-background picture (elf size, 2 x 64x64) and an
// opaque tile set (7 x 32x32), and a small ROM loaded from a hex file
// (tb/pic_rom_small.hex, 2 x 4x2, byte 16*i + 4*y + x + 3). Expected bytes are worked out here from the
// image number and pixel position recovered from the address.
module pic_rom_tb;
  logic clk = 0;
  int checks = 0, failures = 0;

  logic [12:0] ea_a, ea_b;
  logic [7:0]  eq_a, eq_b;
  logic [12:0] ta;
  logic [7:0]  tq, tq_b;

  pic_rom #(.W(64), .H(64), .N(2), .SEED(8'h40)) u_elf (
    .clk, .addr_a(ea_a), .q_a(eq_a), .addr_b(ea_b), .q_b(eq_b));
  pic_rom #(.W(32), .H(32), .N(7), .OPAQUE(1'b1), .SEED(8'h60)) u_tile (
    .clk, .addr_a(ta), .q_a(tq), .addr_b(13'd0), .q_b(tq_b));

  logic [3:0] fa_a, fa_b;
  logic [7:0] fq_a, fq_b;
  pic_rom #(.W(4), .H(2), .N(2), .INIT_FILE("tb/pic_rom_small.hex")) u_file (
    .clk, .addr_a(fa_a), .q_a(fq_a), .addr_b(fa_b), .q_b(fq_b));

  always #5 clk = ~clk;

  function automatic int exp_sprite(int a, int w, int h, int seed);
    int i, x, y, cx, cy, v;
    i = a / (w * h);
    y = (a / w) % h;
    x = a % w;
    if (x == 0 || y == 0 || x == w - 1 || y == h - 1) return 255;
    cx = 2 * x + 1 - w;
    cy = 2 * y + 1 - h;
    if (longint'(cx) * cx * h * h + longint'(cy) * cy * w * w > longint'(w) * w * h * h) return 0;
    v = (seed + 16 * i + y / 16 + ((2 * x >= w) ? 8 : 0)) % 256;
    return (v == 0) ? 1 : v;
  endfunction

  function automatic int exp_tile(int a, int seed);
    int i, x, y, v;
    i = a / 1024;
    y = (a / 32) % 32;
    x = a % 32;
    v = (seed + 16 * i + (((x >> 3) ^ (y >> 3)) & 1) * 8) % 256;
    return (v == 0) ? 1 : v;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    int a, b, t;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a = (n < 8192) ? (n * 37) % 8192 : 0;
      b = $urandom % 8192;
      t = $urandom % (7 * 1024);
      ea_a = 13'(a); ea_b = 13'(b); ta = 13'(t);
      @(posedge clk);
      #1;
      expect_eq("elf port a", eq_a, exp_sprite(a, 64, 64, 64));
      expect_eq("elf port b", eq_b, exp_sprite(b, 64, 64, 64));
      expect_eq("tile", tq, exp_tile(t, 96));
    end
    // file-loaded ROM: every address through both ports
    for (int n = 0; n < 16; n++) begin
      @(negedge clk); fa_a = 4'(n); fa_b = 4'(15 - n);
      @(posedge clk); #1;
      expect_eq("file port a", fq_a, 16 * (n / 8) + (n % 8) + 3);
      expect_eq("file port b", fq_b, 16 * ((15 - n) / 8) + ((15 - n) % 8) + 3);
    end
    // centre of image 1 is opaque, corner beside the frame is transparent
    @(negedge clk); ea_a = 13'(4096 + 32 * 64 + 32); ea_b = 13'(4096 + 64 + 1);
    @(posedge clk); #1;
    expect_eq("centre opaque", eq_a, 8'h40 + 16 + 2 + 8);
    expect_eq("corner transparent", eq_b, 0);
    // latency: the output changes only at the clock edge
    @(negedge clk); ea_a = 13'(0);
    #1 expect_eq("no change before edge", eq_a, 8'h40 + 16 + 2 + 8);
    @(posedge clk); #1 expect_eq("frame pixel", eq_a, 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
