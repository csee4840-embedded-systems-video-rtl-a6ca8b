// avalon_regs_tb: checks the game register file.
// Writes random words to random registers, with and without chipselect and
// write, and compares every register with a reference copy one clock later.
// Also checks that reset clears all eight registers.
module avalon_regs_tb;
  import mc_pkg::*;

  logic clk = 0, reset = 1, chipselect = 0, write = 0;
  logic [2:0]  address = '0;
  logic [31:0] writedata = '0;
  logic [31:0] regs [8];
  logic [31:0] model [8];
  int checks = 0, failures = 0;

  avalon_regs dut (.clk, .reset, .chipselect, .write, .address, .writedata, .regs_o(regs));

  always #5 clk = ~clk;

  task automatic check_all(string what);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (regs[i] !== model[i]) begin
        failures++;
        $display("FAIL %s reg %0d = %h, expected %h", what, i, regs[i], model[i]);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 check_all("after reset");
    reset = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      chipselect = ($urandom % 4) != 0;
      write      = ($urandom % 4) != 0;
      address    = 3'($urandom);
      writedata  = $urandom;
      @(posedge clk);
      if (chipselect && write) model[address] = writedata;
      #1 check_all("write");
    end
    // reset again after the registers hold data
    @(negedge clk) reset = 1; chipselect = 0;
    @(posedge clk);
    for (int i = 0; i < 8; i++) model[i] = '0;
    #1 check_all("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
