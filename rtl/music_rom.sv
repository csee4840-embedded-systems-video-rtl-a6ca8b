// music_rom: ROM of 16-bit audio samples played at the 8 kHz sample rate.
//
// The stored sound is limited to 8192 bytes, that is 4096 signed 16-bit
// samples, as in the original system. The read is registered: the sample for
// the address sampled on a clock edge appears after that edge (latency one
// clock).
//
// The recorded music itself is not part of this RTL. When INIT_FILE names a
// hex file (one 16-bit word per line) it is loaded; otherwise the ROM holds a
// computed test tone: a triangle wave with a period of 32 samples (250 Hz at
// 8 kHz) swinging between -8192 and +8192:
//   p = i mod 32;  s(i) = 1024*p - 8192 for p < 16,  1024*(32-p) - 8192 otherwise.
module music_rom #(
  parameter int unsigned BYTES     = 8192,
  parameter string       INIT_FILE = "",
  localparam int unsigned DEPTH    = BYTES / 2,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic [AW-1:0]      addr,
  output logic signed [15:0] q
);

  logic signed [15:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int i = 0; i < int'(DEPTH); i++) begin
        int p;
        p = i % 32;
        mem[i] = 16'((p < 16) ? 1024 * p - 8192 : 1024 * (32 - p) - 8192);
      end
    end
  end

  always_ff @(posedge clk) q <= mem[addr];

endmodule
