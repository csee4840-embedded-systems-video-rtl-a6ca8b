// vga_timing: pixel counters and sync pulses for the VGA monitor.
//
// The system clock runs at twice the pixel rate; pix_en is high on every other
// clock and the counters advance on those clocks only, so one pixel lasts two
// clocks. hcount runs 0..H_TOTAL-1 along a line and vcount 0..V_TOTAL-1 down
// the frame; the visible picture is hcount < H_ACTIVE and vcount < V_ACTIVE.
// Sync pulses are active low. vga_clk is the pixel clock sent to the DAC: it is
// high during the second clock of each pixel.
//
// The description only says that the picture is shown on a VGA monitor; the
// default timing (640x480 at 60 Hz, 25 MHz pixel clock from a 50 MHz system
// clock) is the standard VESA mode and is this design's choice.
//
// Interface: clk, reset; pix_en, hcount, vcount, active, hsync_n, vsync_n,
// vga_clk, all combinational from the counter registers.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic       clk,
  input  logic       reset,
  output logic       pix_en,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       active,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       vga_clk
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic phase;

  always_ff @(posedge clk) begin
    if (reset) phase <= 1'b0;
    else       phase <= ~phase;
  end

  assign pix_en  = phase;
  assign vga_clk = phase;

  always_ff @(posedge clk) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (hcount == 10'(H_TOTAL - 1)) begin
        hcount <= '0;
        vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
      end else begin
        hcount <= hcount + 10'd1;
      end
    end
  end

  assign active  = (hcount < 10'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));
  assign hsync_n = !((hcount >= 10'(H_ACTIVE + H_FP)) && (hcount < 10'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync_n = !((vcount >= 10'(V_ACTIVE + V_FP)) && (vcount < 10'(V_ACTIVE + V_FP + V_SYNC)));

endmodule
