// hack_computer: the complete Hack computer for an FPGA board.
// A 16-bit Harvard machine. The CPU fetches one instruction per clock from
// a 32K-word program memory and reads or writes a separate 32K-word data
// space. Here the program memory is an external asynchronous SRAM, loaded
// beforehand and addressed directly by the PC; the SRAM is kept in read
// mode (chip and output enabled, both bytes enabled, write disabled). The
// data space (data_memory) holds a 16K RAM, an 8K-word screen memory shown
// on a VGA monitor, and a keyboard word fed from a PS/2 keyboard.
// Clocks: clk_50 runs the CPU, the data memory's CPU port and the keyboard
// path. A PLL derives the 25 MHz pixel clock, which runs the VGA controller
// and the screen memory's second port; the VGA side is held in reset, via a
// two-flop synchroniser, while reset is high or the PLL is not locked.
// The VGA outputs trail the beam counters by two pixel clocks, and the
// synchronisation signals are delayed to match.
// The partitioning, memory map, clocks and the SRAM program store follow
// the computer's description; reset handling and port names are this
// design's own.
module hack_computer (
  input  logic        clk_50,
  input  logic        reset,
  // program memory (external SRAM)
  output logic [17:0] sram_addr,
  input  logic [15:0] sram_dq,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic        sram_we_n,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  // PS/2 keyboard
  input  logic        ps2_clk,
  input  logic        ps2_dat,
  // VGA DAC
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  // debug
  output logic [14:0] pc
);
  // ---------------- CPU and program memory ----------------
  logic [15:0] instruction, inM, outM;
  logic        writeM;
  logic [14:0] addressM;

  assign sram_addr   = {3'b000, pc};
  assign sram_ce_n   = 1'b0;
  assign sram_oe_n   = 1'b0;
  assign sram_we_n   = 1'b1;
  assign sram_ub_n   = 1'b0;
  assign sram_lb_n   = 1'b0;
  assign instruction = sram_dq;

  hack_cpu u_cpu (
    .clk        (clk_50),
    .reset      (reset),
    .instruction(instruction),
    .inM        (inM),
    .outM       (outM),
    .writeM     (writeM),
    .addressM   (addressM),
    .pc         (pc)
  );

  // ---------------- keyboard path ----------------
  logic [7:0]  ps2_code;
  logic        ps2_valid, ps2_err;
  logic [15:0] key;
  logic        key_we;

  ps2_rx u_ps2 (
    .clk    (clk_50),
    .reset  (reset),
    .ps2_clk(ps2_clk),
    .ps2_dat(ps2_dat),
    .code   (ps2_code),
    .valid  (ps2_valid),
    .err    (ps2_err)     // bad frames are dropped; the flag is unused
  );

  ps2_keymap u_keymap (
    .clk   (clk_50),
    .reset (reset),
    .code  (ps2_code),
    .valid (ps2_valid),
    .key   (key),
    .key_we(key_we)
  );

  // ---------------- VGA clock and reset ----------------
  logic       pix_clk, pll_locked;
  logic [1:0] vga_rst_sync;
  logic       vga_reset;

  vga_pll u_pll (
    .inclk0(clk_50),
    .areset(reset),
    .c0    (pix_clk),
    .locked(pll_locked)
  );

  // the PLL's areset is the board reset, so !pll_locked covers both
  always_ff @(posedge pix_clk) begin
    vga_rst_sync <= {vga_rst_sync[0], !pll_locked};
  end
  assign vga_reset = vga_rst_sync[1];
  assign vga_clk   = pix_clk;

  // ---------------- data memory ----------------
  logic [12:0] scr_addr_b;
  logic [15:0] scr_data_b;

  data_memory u_dmem (
    .clk     (clk_50),
    .reset   (reset),
    .address (addressM),
    .in      (outM),
    .load    (writeM),
    .out     (inM),
    .vga_clk (pix_clk),
    .vga_addr(scr_addr_b),
    .vga_data(scr_data_b),
    .kbd_we  (key_we),
    .kbd_data(key)
  );

  // ---------------- VGA controller ----------------
  logic       hs0, vs0, von;
  logic [9:0] bx, by;

  vga_sync u_sync (
    .clk     (pix_clk),
    .reset   (vga_reset),
    .hsync_n (hs0),
    .vsync_n (vs0),
    .video_on(von),
    .x       (bx),
    .y       (by)
  );

  vga_pixel #(.COLOR_BITS(10)) u_pix (
    .clk       (pix_clk),
    .reset     (vga_reset),
    .x         (bx),
    .y         (by),
    .video_on  (von),
    .hsync_n_in(hs0),
    .vsync_n_in(vs0),
    .scr_addr  (scr_addr_b),
    .scr_data  (scr_data_b),
    .hsync_n   (vga_hs),
    .vsync_n   (vga_vs),
    .blank_n   (vga_blank_n),
    .r         (vga_r),
    .g         (vga_g),
    .b         (vga_b)
  );
endmodule
