// tb_hack_pc: checks reset to 0, increment, jump load, hold when neither,
// the reset > load > inc priority and the wrap from 32767 to 0, against a
// reference counter kept in the testbench.
module tb_hack_pc;
  logic        clk = 0, reset, load, inc;
  logic [14:0] d, q, model;
  int checks = 0, failures = 0;

  hack_pc #(.WIDTH(15)) dut (.clk(clk), .reset(reset), .load(load), .inc(inc), .d(d), .q(q));

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic r, logic l, logic i, logic [14:0] dv);
    reset = r; load = l; inc = i; d = dv;
    @(posedge clk);
    if (r) model = '0;
    else if (l) model = dv;
    else if (i) model = model + 1'b1;
    #1;
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL r=%b l=%b i=%b d=%0d q=%0d exp=%0d", r, l, i, dv, q, model);
    end
  endtask

  initial begin
    model = '0;
    step(1, 0, 1, 0);
    repeat (5) step(0, 0, 1, 0);
    step(0, 1, 1, 15'd1234);
    step(0, 0, 0, 0);
    step(1, 1, 1, 15'd99);            // reset wins over load
    step(0, 1, 1, 15'd32766);
    repeat (3) step(0, 0, 1, 0);      // wraps through 32767 to 0
    repeat (2000) step($urandom_range(0, 20) == 0, $urandom_range(0, 3) == 0,
                       $urandom_range(0, 4) != 0, 15'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
