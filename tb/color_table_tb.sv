// color_table_tb: checks all 256 colour-table entries against the 3-3-2
// expansion (each channel's bits repeated to eight bits: a 3-bit value v gives
// v*73/2 rounded down, a 2-bit value v gives v*85) and the one-clock latency.
module color_table_tb;
  logic clk = 0;
  logic [7:0] idx = '0;
  logic [23:0] rgb;
  int checks = 0, failures = 0;

  color_table dut (.clk, .idx, .rgb);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      int r3, g3, b2, er, eg, eb;
      @(negedge clk) idx = 8'(i);
      @(posedge clk) #1;
      r3 = (i >> 5) & 7; g3 = (i >> 2) & 7; b2 = i & 3;
      er = (r3 * 73) / 2; eg = (g3 * 73) / 2; eb = b2 * 85;
      checks++;
      if (rgb != {8'(er), 8'(eg), 8'(eb)}) begin
        failures++;
        $display("FAIL index %0d: %h expected %02h%02h%02h", i, rgb, er, eg, eb);
      end
    end
    @(negedge clk) idx = 8'h00;
    #1 begin checks++; if (rgb != 24'hFFFFFF) begin failures++; $display("FAIL changed before edge"); end end
    @(posedge clk) #1;
    checks++; if (rgb != 24'h000000) begin failures++; $display("FAIL black"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
