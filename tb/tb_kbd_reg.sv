// tb_kbd_reg: the keyboard word clears on reset, takes a key code on a
// write, keeps it without one, and the CPU read after the falling edge
// shows the value written at the previous rising edge.
module tb_kbd_reg;
  logic        clk = 0, reset, we;
  logic [15:0] wdata, rdata, model;
  int checks = 0, failures = 0;

  kbd_reg dut (.clk(clk), .reset(reset), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; we = 1; wdata = 16'h1234;
    @(posedge clk);
    model = '0;
    #1 reset = 0; we = 0;
    repeat (1000) begin
      @(negedge clk);
      #1;
      checks++;
      if (rdata !== model) begin
        failures++;
        $display("FAIL got=%h exp=%h", rdata, model);
      end
      we    = $urandom_range(0, 3) == 0;
      wdata = 16'($urandom_range(0, 152));
      @(posedge clk);
      if (we) model = wdata;
      #1 we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
