// vga_sync: the VGA controller's beam timing for 640 x 480 at 60 Hz.
// Two counters, one per pixel clock for the column and one per line for
// the row, trace the beam over 800 x 525 positions (visible area, front
// porch, sync pulse, back porch). hsync_n and vsync_n are the sync strobes
// (active low), video_on is high in the 640 x 480 visible area, and x, y
// are the current column and row. With the 25 MHz pixel clock a frame takes
// 420,000 clocks, about 60 frames a second. The outputs are decoded
// from the two counter registers and name the pixel of the current clock.
// The 640 x 480 format and 60 Hz rate come from the computer's description;
// porch and sync widths are the usual values for this format.
module vga_sync #(
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33
) (
  input  logic       clk,
  input  logic       reset,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       video_on,
  output logic [9:0] x,
  output logic [9:0] y
);
  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;

  logic [9:0] hc, vc;

  always_ff @(posedge clk) begin
    if (reset) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == 10'(H_TOTAL - 1)) begin
      hc <= '0;
      vc <= (vc == 10'(V_TOTAL - 1)) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  assign x        = hc;
  assign y        = vc;
  assign video_on = (hc < 10'(H_VISIBLE)) && (vc < 10'(V_VISIBLE));
  assign hsync_n  = !((hc >= 10'(H_VISIBLE + H_FRONT)) && (hc < 10'(H_VISIBLE + H_FRONT + H_SYNC)));
  assign vsync_n  = !((vc >= 10'(V_VISIBLE + V_FRONT)) && (vc < 10'(V_VISIBLE + V_FRONT + V_SYNC)));
endmodule
