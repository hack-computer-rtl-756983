// tb_screen_ram: the CPU port (clk_a, 20 ns) writes and reads random words
// while the VGA port (clk_b, 40 ns, unrelated phase) reads random addresses;
// both are compared with a reference array. Port B must deliver the word
// one clk_b edge after its address is presented.
module tb_screen_ram;
  logic        clk_a = 0, clk_b = 0, we_a;
  logic [12:0] addr_a, addr_b;
  logic [15:0] wdata_a, rdata_a, rdata_b;
  logic [15:0] model [8192];
  int checks = 0, failures = 0;
  bit done_a = 0;

  screen_ram #(.DEPTH(8192), .WIDTH(16)) dut (
    .clk_a(clk_a), .we_a(we_a), .addr_a(addr_a), .wdata_a(wdata_a), .rdata_a(rdata_a),
    .clk_b(clk_b), .addr_b(addr_b), .rdata_b(rdata_b));

  always #10 clk_a = !clk_a;
  initial begin
    #7;
    forever #20 clk_b = !clk_b;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string port, logic [12:0] a, logic [15:0] got);
    checks++;
    if (got !== model[a]) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%0d got=%h exp=%h", port, a, got, model[a]);
    end
  endtask

  // CPU port: fills the memory, then random read/write traffic on low addresses
  initial begin
    foreach (model[i]) model[i] = '0;
    we_a = 0; addr_a = 0; wdata_a = 0;
    @(posedge clk_a);
    for (int n = 0; n < 8192 + 10000; n++) begin
      #1;
      addr_a  = (n < 8192) ? 13'(n) : 13'($urandom_range(0, 255));
      we_a    = (n < 8192) ? 1'b1 : ($urandom_range(0, 1) == 1);
      wdata_a = 16'($urandom);
      @(negedge clk_a);
      #1 check("A", addr_a, rdata_a);
      @(posedge clk_a);
      if (we_a) model[addr_a] = wdata_a;
    end
    done_a = 1;
  end

  // VGA port: reads addresses 256 and up, which the CPU stops writing after the fill
  initial begin
    addr_b = 0;
    wait (done_a == 0);
    repeat (5000) @(posedge clk_b);
    for (int n = 0; n < 5000; n++) begin
      logic [12:0] a;
      @(posedge clk_b);
      #1 a = 13'($urandom_range(256, 8191));
      addr_b = a;
      @(posedge clk_b);
      #1 check("B", a, rdata_b);
    end
    wait (done_a == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
