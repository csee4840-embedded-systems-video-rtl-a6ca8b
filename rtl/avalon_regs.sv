// avalon_regs: the eight 32-bit game registers, written by software over an
// Avalon-MM slave port.
//
// Software running on the processor drives the whole display and the sound by
// writing these registers; the hardware never writes them. A write happens on
// the rising clock edge when chipselect and write are both high: writedata
// goes to the register selected by the word address. A synchronous reset clears
// all eight. The registers are write-only, as in the published bus interface;
// there is no read port. The new value is visible on regs_o one clock after the
// write cycle.
//
// Interface: clk, reset (synchronous, active high), chipselect, write,
// address (word address 0..7, i.e. byte offsets 00..28), writedata;
// regs_o is the whole register file.
module avalon_regs
  import mc_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 chipselect,
  input  logic                 write,
  input  logic [$clog2(N)-1:0] address,
  input  logic [DW-1:0]        writedata,
  output logic [DW-1:0]        regs_o [N]
);

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < int'(N); i++) regs_o[i] <= '0;
    end else if (chipselect && write) begin
      regs_o[address] <= writedata;
    end
  end

endmodule
