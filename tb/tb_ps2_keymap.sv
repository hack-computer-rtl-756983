// tb_ps2_keymap: feeds scan-code sequences as the receiver would deliver
// them and checks the Hack key word: letters, digits, Enter, Backspace, F12
// and extended arrow keys on make; 0 on the break of the held key; a break
// of another key leaves the held key alone; unmapped keys and repeated
// make codes change nothing; key_we pulses exactly when the word changes.
module tb_ps2_keymap;
  logic        clk = 0, reset, valid;
  logic [7:0]  code;
  logic [15:0] key;
  logic        key_we;
  int checks = 0, failures = 0, we_count = 0, we_expect = 0;
  logic [15:0] held;

  ps2_keymap dut (.clk(clk), .reset(reset), .code(code), .valid(valid), .key(key), .key_we(key_we));

  always #10 clk = !clk;
  always @(posedge clk) if (key_we && !reset) we_count++;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] c);
    #1 code = c; valid = 1;
    @(posedge clk);
    #1 valid = 0;
    repeat (3) @(posedge clk);
  endtask

  // send a sequence, then check the key word
  task automatic seq(string what, logic [7:0] c0, logic [7:0] c1, logic [7:0] c2, int n, int exp);
    send(c0);
    if (n > 1) send(c1);
    if (n > 2) send(c2);
    if (16'(exp) != held) we_expect++;
    held = 16'(exp);
    checks++;
    if (key !== 16'(exp)) begin
      failures++;
      $display("FAIL %s key=%0d exp=%0d", what, key, exp);
    end
  endtask

  initial begin
    reset = 1; valid = 0; code = 0; held = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    seq("A make",       8'h1C, 0, 0, 1, 65);
    seq("A repeat",     8'h1C, 0, 0, 1, 65);
    seq("A break",      8'hF0, 8'h1C, 0, 2, 0);
    seq("Z make",       8'h1A, 0, 0, 1, 90);
    seq("7 make",       8'h3D, 0, 0, 1, 55);    // replaces Z
    seq("Z break",      8'hF0, 8'h1A, 0, 2, 55); // not the held key
    seq("7 break",      8'hF0, 8'h3D, 0, 2, 0);
    seq("Alt ignored",  8'h11, 0, 0, 1, 0);
    seq("space",        8'h29, 0, 0, 1, 32);
    seq("space break",  8'hF0, 8'h29, 0, 2, 0);
    seq("Enter",        8'h5A, 0, 0, 1, 128);
    seq("Backspace",    8'h66, 0, 0, 1, 129);
    seq("Esc",          8'h76, 0, 0, 1, 140);
    seq("F12",          8'h07, 0, 0, 1, 152);
    seq("F12 break",    8'hF0, 8'h07, 0, 2, 0);
    seq("up arrow",     8'hE0, 8'h75, 0, 2, 131);
    seq("left arrow",   8'hE0, 8'h6B, 0, 2, 130);
    seq("left break",   8'hE0, 8'hF0, 8'h6B, 3, 0);
    seq("delete",       8'hE0, 8'h71, 0, 2, 139);
    seq("delete break", 8'hE0, 8'hF0, 8'h71, 3, 0);
    seq("comma",        8'h41, 0, 0, 1, 44);
    checks++;
    if (we_count != we_expect) begin
      failures++;
      $display("FAIL key_we pulses %0d exp %0d", we_count, we_expect);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
