// tb_ram16k: random writes and reads against a reference array. The address
// is set after a rising edge as the CPU does; the read word must be valid
// after the falling edge of the same cycle and must already show a write
// made by the previous rising edge.
module tb_ram16k;
  logic        clk = 0, we;
  logic [13:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [16384];
  int checks = 0, failures = 0;

  ram16k #(.DEPTH(16384), .WIDTH(16)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = !clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    we = 0; addr = 0; wdata = 0;
    @(posedge clk);
    for (int n = 0; n < 20000; n++) begin
      #1;
      addr  = (n % 3 == 0) ? 14'($urandom_range(0, 31)) : 14'($urandom);
      we    = $urandom_range(0, 1) == 1;
      wdata = 16'($urandom);
      @(negedge clk);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d got=%h exp=%h", addr, rdata, model[addr]);
      end
      @(posedge clk);
      if (we) model[addr] = wdata;
    end
    // write then read the same word in the next cycle (read-modify-write)
    #1 addr = 14'd16383; we = 1; wdata = 16'hBEEF;
    @(posedge clk);
    #1 we = 0;
    @(negedge clk);
    #1;
    checks++;
    if (rdata !== 16'hBEEF) begin
      failures++;
      $display("FAIL top word got=%h", rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
