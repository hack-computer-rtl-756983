// tb_vga_pll: the PLL model must hold locked low while areset is high,
// raise it after 16 input clocks, and then give one output period per two
// input clocks (25 MHz from 50 MHz).
module tb_vga_pll;
  logic inclk0 = 0, areset, c0, locked;
  int checks = 0, failures = 0;

  vga_pll #(.LOCK_CYCLES(16)) dut (.inclk0(inclk0), .areset(areset), .c0(c0), .locked(locked));

  always #10 inclk0 = !inclk0;

  initial begin
    #1000000;
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
    int lock_at = -1, rises = 0;
    areset = 1;
    repeat (4) @(posedge inclk0);
    #1 expect_eq("locked in reset", int'(locked), 0);
    areset = 0;
    for (int n = 1; n <= 200; n++) begin
      logic c_prev;
      c_prev = c0;
      @(posedge inclk0);
      #1;
      if (locked && lock_at < 0) lock_at = n;
      if (!c_prev && c0 && n > 40) rises++;
    end
    expect_eq("input clocks to lock", lock_at, 17);
    expect_eq("output periods in 160 input clocks", rises, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
