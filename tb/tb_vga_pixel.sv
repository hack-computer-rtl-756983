// tb_vga_pixel: sweeps one 800 x 525 frame of beam positions through the
// pixel generator, with a random 512 x 256 image in a testbench screen
// memory of one clock read latency. Every output pixel, two clocks after
// its position, must be blue for a set bit, white for a clear bit, black
// outside the 512 x 256 zone and during blanking; sync and blank must be
// delayed by the same two clocks.
module tb_vga_pixel;
  logic        clk = 0, reset;
  logic [9:0]  x, y;
  logic        video_on, hs_in, vs_in;
  logic [12:0] scr_addr;
  logic [15:0] scr_data;
  logic        hsync_n, vsync_n, blank_n;
  logic [9:0]  r, g, b;
  logic [15:0] image [8192];
  int checks = 0, failures = 0;
  int n_blue = 0, n_white = 0, n_black = 0;

  vga_pixel #(.COLOR_BITS(10)) dut (
    .clk(clk), .reset(reset), .x(x), .y(y), .video_on(video_on),
    .hsync_n_in(hs_in), .vsync_n_in(vs_in), .scr_addr(scr_addr), .scr_data(scr_data),
    .hsync_n(hsync_n), .vsync_n(vsync_n), .blank_n(blank_n), .r(r), .g(g), .b(b));

  always #20 clk = !clk;

  always_ff @(posedge clk) scr_data <= image[scr_addr];

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic [29:0] rgb;
    logic hs, vs, bl;
  } out_t;

  function automatic out_t expect_out(int cx, int cy);
    out_t e;
    logic on = (cx < 640 && cy < 480);
    e.hs = !(cx >= 656 && cx < 752);
    e.vs = !(cy >= 490 && cy < 492);
    e.bl = on;
    if (!on || cx >= 512 || cy >= 256) e.rgb = '0;                      // black
    else if (image[cy * 32 + cx / 16][cx % 16]) e.rgb = {20'd0, 10'h3FF}; // blue
    else e.rgb = {30{1'b1}};                                             // white
    return e;
  endfunction

  initial begin
    out_t q [$];
    foreach (image[i]) image[i] = 16'($urandom);
    reset = 1; x = 0; y = 0; video_on = 0; hs_in = 1; vs_in = 1;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    for (int cy = 0; cy < 525; cy++) begin
      for (int cx = 0; cx < 800; cx++) begin
        out_t e;
        x = 10'(cx);
        y = 10'(cy);
        video_on = (cx < 640 && cy < 480);
        hs_in = !(cx >= 656 && cx < 752);
        vs_in = !(cy >= 490 && cy < 492);
        q.push_back(expect_out(cx, cy));
        @(posedge clk);
        #1;
        if (q.size() == 2) begin
          e = q.pop_front();
          checks++;
          if ({r, g, b} !== e.rgb || hsync_n !== e.hs || vsync_n !== e.vs || blank_n !== e.bl) begin
            failures++;
            if (failures < 10) $display("FAIL near x=%0d y=%0d rgb=%h exp=%h", cx, cy, {r, g, b}, e.rgb);
          end
          if (e.rgb == {20'd0, 10'h3FF}) n_blue++;
          else if (e.rgb == '0) n_black++;
          else n_white++;
        end
      end
    end
    checks++;
    if (n_blue == 0 || n_white == 0 || n_black == 0) failures++;
    $display("pixels: blue %0d white %0d black %0d", n_blue, n_white, n_black);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
