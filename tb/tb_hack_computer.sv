// tb_hack_computer: end-to-end test of the whole computer at its default
// size, running the screen test program: it walks a pointer kept in RAM[16]
// over screen words 20480..24575 (the lower half of the 512 x 256 screen),
// writing -1 (16 set pixels) to each while no key is down and 0 while one
// is, then starts over. The program sits in the SRAM model; keys are typed
// by a PS/2 keyboard model; the screen is judged only from the VGA outputs.
// Checks:
//  - a pass over the 4096 words takes 4 + 4096*20 + 6 = 81,930 clocks with
//    no key and 4 + 4096*18 + 6 = 73,738 with a key (one instruction per
//    clock, the jump back to 0 ends the pass);
//  - a whole VGA frame after a keyless pass shows rows 0-127 of the zone
//    white, rows 128-255 blue, the rest black, and blanking outside 640x480;
//  - with 'A' held (make code 1C) the keyboard word is non-zero and a frame
//    shows the whole zone white; after the break code the blue half returns;
//  - the frame period is 420,000 pixel clocks.
// Each mechanism (taken jumps, keyless pass, keyed pass, key press and
// release, blue, white and black pixels, frame) is counted and must occur.
module tb_hack_computer;
  import hack_asm_pkg::*;

  logic        clk_50 = 0, reset;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq;
  logic        sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  logic        ps2_clk, ps2_dat;
  logic        vga_clk, vga_hs, vga_vs, vga_blank_n;
  logic [9:0]  vga_r, vga_g, vga_b;
  logic [14:0] pc;
  int checks = 0, failures = 0;

  hack_computer dut (
    .clk_50(clk_50), .reset(reset),
    .sram_addr(sram_addr), .sram_dq(sram_dq), .sram_ce_n(sram_ce_n), .sram_oe_n(sram_oe_n),
    .sram_we_n(sram_we_n), .sram_ub_n(sram_ub_n), .sram_lb_n(sram_lb_n),
    .ps2_clk(ps2_clk), .ps2_dat(ps2_dat),
    .vga_clk(vga_clk), .vga_hs(vga_hs), .vga_vs(vga_vs), .vga_blank_n(vga_blank_n),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b), .pc(pc));

  sram_model #(.T_AA(10)) u_sram (
    .addr(sram_addr), .dq(sram_dq), .ce_n(sram_ce_n), .oe_n(sram_oe_n),
    .we_n(sram_we_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n));

  always #10 clk_50 = !clk_50;   // 50 MHz

  initial begin
    #400ms;
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

  // ---------------- program: the screen test ----------------
  task automatic load_program();
    logic [15:0] p [28];
    p[0]  = asm_a(20480);           p[1]  = asm_c("D", "A", "");
    p[2]  = asm_a(16);              p[3]  = asm_c("M", "D", "");
    p[4]  = asm_a(16);              p[5]  = asm_c("D", "M", "");
    p[6]  = asm_a(24575);           p[7]  = asm_c("D", "A-D", "");
    p[8]  = asm_a(0);               p[9]  = asm_c("", "D", "JLT");
    p[10] = asm_a(24576);           p[11] = asm_c("D", "M", "");
    p[12] = asm_a(20);              p[13] = asm_c("", "D", "JNE");
    p[14] = asm_a(16);              p[15] = asm_c("D", "M", "");
    p[16] = asm_c("A", "D", "");    p[17] = asm_c("M", "-1", "");
    p[18] = asm_a(24);              p[19] = asm_c("", "0", "JMP");
    p[20] = asm_a(16);              p[21] = asm_c("D", "M", "");
    p[22] = asm_c("A", "D", "");    p[23] = asm_c("M", "0", "");
    p[24] = asm_a(16);              p[25] = asm_c("M", "M+1", "");
    p[26] = asm_a(4);               p[27] = asm_c("", "0", "JMP");
    foreach (u_sram.mem[i]) u_sram.mem[i] = asm_a(0);
    foreach (p[i]) u_sram.mem[i] = p[i];
  endtask

  // ---------------- CPU monitor: jumps and passes ----------------
  int cyc = 0, n_jumps = 0, pass_start = 0, last_pass_len = 0, n_passes = 0;
  int n_pass_nokey = 0, n_pass_key = 0;
  logic [14:0] pc_prev = 0;
  logic        run = 0;

  always @(posedge clk_50) begin
    if (reset) begin
      cyc <= 0;
      pass_start <= 0;
      run <= 1;
    end else if (run) begin
      cyc <= cyc + 1;
      if (cyc > 0 && pc != pc_prev + 15'd1) n_jumps <= n_jumps + 1;
      if (cyc > 0 && pc == 15'd0 && pc_prev == 15'd9) begin
        last_pass_len <= cyc - pass_start;
        pass_start    <= cyc;
        n_passes      <= n_passes + 1;
        if (cyc - pass_start == 81930) n_pass_nokey <= n_pass_nokey + 1;
        if (cyc - pass_start == 73738) n_pass_key   <= n_pass_key + 1;
      end
    end
    pc_prev <= pc;
  end

  // ---------------- PS/2 keyboard model ----------------
  localparam int PS2_HALF = 40000;   // ns: 12.5 kHz keyboard clock
  int n_press = 0, n_release = 0;

  task automatic ps2_send(logic [7:0] d);
    logic [10:0] f = {1'b1, ~^d, d, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_dat = f[i];
      #(PS2_HALF / 2);
      ps2_clk = 0;
      #PS2_HALF;
      ps2_clk = 1;
      #(PS2_HALF / 2);
    end
    ps2_dat = 1;
    #(2 * PS2_HALF);
  endtask

  // ---------------- VGA monitor ----------------
  // Follows the beam from the sync outputs: the first sample with vga_vs low
  // is column 0 of row 490. When check_req is set it compares one whole
  // frame, from row 0, with the image expected for the current phase.
  int col = 0, row = 0;
  bit synced = 0, check_req = 0, checking = 0, check_done = 0, expect_fill = 0;
  int frame_bad = 0, frame_px = 0, n_frames = 0, vs_last = -1, frame_period = 0, pix_cnt = 0;
  int n_blue = 0, n_white = 0, n_black = 0;
  logic vs_prev = 1;

  always @(posedge vga_clk) begin
    pix_cnt++;
    // the outputs hold arbitrary values until the VGA reset has acted
    if (vs_prev && !vga_vs && pix_cnt > 50) begin
      if (synced && (col != 0 || row != 490)) frame_bad++;
      col = 0;
      row = 490;
      synced = 1;
      if (vs_last >= 0) frame_period = pix_cnt - vs_last;
      vs_last = pix_cnt;
    end
    vs_prev = vga_vs;
    if (synced) begin
      if (check_req && !checking && col == 0 && row == 0) begin
        checking = 1;
        frame_px = 0;
      end
      if (checking) begin
        logic on;
        logic [29:0] exp_rgb, got;
        on  = (col < 640 && row < 480);
        got = {vga_r, vga_g, vga_b};
        if (!on || col >= 512 || row >= 256) exp_rgb = '0;
        else if (expect_fill && row >= 128) exp_rgb = {20'd0, 10'h3FF};
        else exp_rgb = '1;
        if (got !== exp_rgb || vga_blank_n !== on || vga_hs !== !(col >= 656 && col < 752)) begin
          if (frame_bad < 5) $display("FAIL pixel col=%0d row=%0d rgb=%h exp=%h", col, row, got, exp_rgb);
          frame_bad++;
        end
        if (got == {20'd0, 10'h3FF}) n_blue++;
        else if (got == '1) n_white++;
        else if (got == '0) n_black++;
        frame_px++;
        if (frame_px == 420000) begin
          checking = 0;
          check_req = 0;
          check_done = 1;
          n_frames++;
        end
      end
      col = (col == 799) ? 0 : col + 1;
      if (col == 0) row = (row == 524) ? 0 : row + 1;
    end
  end

  task automatic check_frame(string what, bit fill);
    expect_fill = fill;
    frame_bad = 0;
    check_done = 0;
    check_req = 1;
    wait (check_done);
    expect_eq({what, ": wrong pixels in frame"}, frame_bad, 0);
  endtask

  task automatic wait_pass(int len, string what);
    int start = n_passes;
    int tries = 0;
    // wait for a pass of the expected length, at most 4 passes
    do begin
      @(posedge clk_50);
      if (n_passes != start) begin
        start = n_passes;
        tries++;
      end
    end while (!(n_passes > 0 && last_pass_len == len && tries > 0) && tries < 4);
    expect_eq({what, ": pass length"}, last_pass_len, len);
  endtask

  initial begin
    ps2_clk = 1;
    ps2_dat = 1;
    reset = 1;
    load_program();
    repeat (10) @(posedge clk_50);
    #1 reset = 0;
    // phase 1: no key, the lower half fills with set pixels
    wait_pass(81930, "no key");
    check_frame("filled", 1);
    expect_eq("frame period in pixel clocks", frame_period, 420000);
    // phase 2: hold 'A'
    ps2_send(8'h1C);
    n_press++;
    wait_pass(73738, "key held");
    check_frame("cleared", 0);
    // phase 3: release 'A'
    ps2_send(8'hF0);
    ps2_send(8'h1C);
    n_release++;
    wait_pass(81930, "key released");
    check_frame("refilled", 1);
    $display("jumps %0d, passes %0d (no key %0d, key %0d), presses %0d, releases %0d",
             n_jumps, n_passes, n_pass_nokey, n_pass_key, n_press, n_release);
    $display("frames %0d, pixels blue %0d white %0d black %0d", n_frames, n_blue, n_white, n_black);
    checks++; if (n_jumps == 0) failures++;
    checks++; if (n_pass_nokey == 0) failures++;
    checks++; if (n_pass_key == 0) failures++;
    checks++; if (n_press == 0 || n_release == 0) failures++;
    checks++; if (n_blue == 0 || n_white == 0 || n_black == 0) failures++;
    checks++; if (n_frames < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
