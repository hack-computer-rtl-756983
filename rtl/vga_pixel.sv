// vga_pixel: turns the beam position into a colour from the screen memory.
// The 512 x 256 Hack screen occupies the top-left corner of the 640 x 480
// frame. For a pixel (x, y) inside it, the word at screen address
// y*32 + x/16 is read and bit x%16 of it is the pixel: 1 is drawn blue and
// 0 white. Pixels outside the 512 x 256 zone, and the blanking interval,
// are black.
// Timing: a two-stage pipeline on the pixel clock. Stage 1 registers the
// position while the screen memory (one clock of read latency) fetches the
// word; stage 2 registers the colour and the delayed sync and blank signals,
// so every output appears two clocks after the position that produced it.
// Colours, the black border and the bit lookup follow the computer's
// description; the corner placement and the bit order (bit 0 leftmost, the
// Hack convention) are this design's reading.
module vga_pixel #(
  parameter int unsigned COLOR_BITS = 10
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic [9:0]            x,
  input  logic [9:0]            y,
  input  logic                  video_on,
  input  logic                  hsync_n_in,
  input  logic                  vsync_n_in,
  output logic [12:0]           scr_addr,
  input  logic [15:0]           scr_data,
  output logic                  hsync_n,
  output logic                  vsync_n,
  output logic                  blank_n,
  output logic [COLOR_BITS-1:0] r,
  output logic [COLOR_BITS-1:0] g,
  output logic [COLOR_BITS-1:0] b
);
  logic       in_area;
  logic [3:0] bit_s1;
  logic       area_s1, on_s1, hs_s1, vs_s1;
  logic       pix;

  assign in_area  = (x < 10'd512) && (y < 10'd256);
  assign scr_addr = {y[7:0], x[8:4]};

  always_ff @(posedge clk) begin
    if (reset) begin
      bit_s1  <= '0;
      area_s1 <= 1'b0;
      on_s1   <= 1'b0;
      hs_s1   <= 1'b1;
      vs_s1   <= 1'b1;
    end else begin
      bit_s1  <= x[3:0];
      area_s1 <= in_area && video_on;
      on_s1   <= video_on;
      hs_s1   <= hsync_n_in;
      vs_s1   <= vsync_n_in;
    end
  end

  assign pix = scr_data[bit_s1];

  always_ff @(posedge clk) begin
    if (reset) begin
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
      blank_n <= 1'b0;
      r <= '0;
      g <= '0;
      b <= '0;
    end else begin
      hsync_n <= hs_s1;
      vsync_n <= vs_s1;
      blank_n <= on_s1;
      if (!area_s1) begin          // border or blanking: black
        r <= '0;
        g <= '0;
        b <= '0;
      end else if (pix) begin      // pixel set: blue
        r <= '0;
        g <= '0;
        b <= '1;
      end else begin               // pixel clear: white
        r <= '1;
        g <= '1;
        b <= '1;
      end
    end
  end
endmodule
