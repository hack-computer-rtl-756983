// tb_data_memory: random CPU traffic over the whole 15-bit address space
// against a reference model of the memory map. Writes below 24576 must land
// in RAM or screen; writes at 24576 and above must change nothing; every
// read must return the RAM, screen or keyboard word that the map assigns to
// the address. The keyboard word is changed through its own write port,
// and the VGA port must see what the CPU wrote into the screen memory.
module tb_data_memory;
  logic        clk = 0, vga_clk = 0, reset, load, kbd_we;
  logic [14:0] address;
  logic [15:0] in, out, kbd_data, vga_data;
  logic [12:0] vga_addr;
  logic [15:0] model [24576];
  logic [15:0] kbd_model;
  int checks = 0, failures = 0;
  int n_ram = 0, n_scr = 0, n_kbd = 0;

  data_memory dut (
    .clk(clk), .reset(reset), .address(address), .in(in), .load(load), .out(out),
    .vga_clk(vga_clk), .vga_addr(vga_addr), .vga_data(vga_data),
    .kbd_we(kbd_we), .kbd_data(kbd_data));

  always #10 clk = !clk;
  always #20 vga_clk = !vga_clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] expect_rd(logic [14:0] a);
    return (a >= 15'd24576) ? kbd_model : model[a];
  endfunction

  initial begin
    foreach (model[i]) model[i] = '0;
    kbd_model = '0;
    reset = 1; load = 0; kbd_we = 0; address = 0; in = 0; kbd_data = 0; vga_addr = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int n = 0; n < 30000; n++) begin
      logic [14:0] a;
      case ($urandom_range(0, 3))
        0:       a = 15'($urandom_range(0, 16383));
        1:       a = 15'($urandom_range(16384, 24575));
        2:       a = 15'($urandom_range(24576, 32767));
        default: a = 15'($urandom_range(16380, 16390));  // around the RAM/screen border
      endcase
      address  = a;
      load     = $urandom_range(0, 1) == 1;
      in       = 16'($urandom);
      kbd_we   = $urandom_range(0, 7) == 0;
      kbd_data = 16'($urandom_range(0, 152));
      @(negedge clk);
      #1;
      checks++;
      if (out !== expect_rd(a)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d got=%h exp=%h", a, out, expect_rd(a));
      end
      if (a < 15'd16384) n_ram++; else if (a < 15'd24576) n_scr++; else n_kbd++;
      @(posedge clk);
      if (load && a < 15'd24576) model[a] = in;
      if (kbd_we) kbd_model = kbd_data;
      #1 load = 0; kbd_we = 0;
    end
    // the VGA port reads the screen words the CPU left behind
    for (int n = 0; n < 2000; n++) begin
      logic [12:0] v;
      @(posedge vga_clk);
      #1 v = 13'($urandom);
      vga_addr = v;
      @(posedge vga_clk);
      #1;
      checks++;
      if (vga_data !== model[16384 + int'(v)]) begin
        failures++;
        if (failures < 10) $display("FAIL vga addr=%0d got=%h", v, vga_data);
      end
    end
    checks++;
    if (n_ram == 0 || n_scr == 0 || n_kbd == 0) failures++;
    $display("accesses: ram %0d screen %0d keyboard %0d", n_ram, n_scr, n_kbd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
