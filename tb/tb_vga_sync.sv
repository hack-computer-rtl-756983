// tb_vga_sync: runs the 640x480 timing generator for two full frames and
// measures it from its outputs: 800 clocks per line with a 96-clock
// horizontal sync starting 16 clocks after the visible area, 525 lines per
// frame with a 2-line vertical sync, 640x480 visible pixels per frame,
// a frame every 420,000 pixel clocks (59.5 Hz at 25 MHz), and x, y
// following the beam.
module tb_vga_sync;
  logic       clk = 0, reset;
  logic       hsync_n, vsync_n, video_on;
  logic [9:0] x, y;
  int checks = 0, failures = 0;

  vga_sync dut (.clk(clk), .reset(reset), .hsync_n(hsync_n), .vsync_n(vsync_n),
                .video_on(video_on), .x(x), .y(y));

  always #20 clk = !clk;   // 25 MHz

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    int col, row, bad_pos, on_count, hs_low, vs_low_clocks, hs_edges;
    int t_vs [$];
    reset = 1;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    col = 0; row = 0; bad_pos = 0; on_count = 0; hs_low = 0; vs_low_clocks = 0; hs_edges = 0;
    for (int t = 0; t < 2 * 420000; t++) begin
      logic hs_prev, vs_prev;
      hs_prev = hsync_n;
      vs_prev = vsync_n;
      if (x != 10'(col) || y != 10'(row)) bad_pos++;
      if (video_on != (col < 640 && row < 480)) bad_pos++;
      if (hsync_n != !(col >= 656 && col < 752)) bad_pos++;
      if (vsync_n != !(row >= 490 && row < 492)) bad_pos++;
      if (video_on) on_count++;
      if (!hsync_n) hs_low++;
      if (!vsync_n) vs_low_clocks++;
      @(posedge clk);
      #1;
      if (hs_prev && !hsync_n) hs_edges++;
      if (vs_prev && !vsync_n) t_vs.push_back(t);
      col = (col == 799) ? 0 : col + 1;
      if (col == 0) row = (row == 524) ? 0 : row + 1;
    end
    expect_eq("position/sync mismatches", bad_pos, 0);
    expect_eq("visible pixels in two frames", on_count, 2 * 640 * 480);
    expect_eq("hsync low clocks", hs_low, 2 * 525 * 96);
    expect_eq("vsync low clocks", vs_low_clocks, 2 * 2 * 800);
    expect_eq("hsync pulses", hs_edges, 2 * 525);
    expect_eq("vsync pulses", t_vs.size(), 2);
    if (t_vs.size() == 2) expect_eq("frame period", t_vs[1] - t_vs[0], 420000);
    $display("frame rate at 25 MHz: %0d mHz", 25000000000 / 420000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
