// tb_ps2_rx: a keyboard model sends PS/2 frames (start, 8 data bits LSB
// first, odd parity, stop) at about 12.5 kHz relative to a 50 MHz system
// clock. Random bytes must arrive on code with one valid pulse each; a frame
// with a wrong parity bit must raise err and no valid; a frame cut off
// after four bits must be dropped by the time-out so that the next good
// frame is still received.
module tb_ps2_rx;
  logic       clk = 0, reset, ps2_clk, ps2_dat;
  logic [7:0] code;
  logic       valid, err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] got [$];

  localparam int HALF = 40000;   // ns, half a PS/2 clock period

  ps2_rx #(.TIMEOUT(50000)) dut (.clk(clk), .reset(reset), .ps2_clk(ps2_clk), .ps2_dat(ps2_dat),
                                 .code(code), .valid(valid), .err(err));

  always #10 clk = !clk;

  always @(posedge clk) begin
    if (valid) begin
      n_valid++;
      got.push_back(code);
    end
    if (err) n_err++;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bits(logic [10:0] frame, int nbits);
    for (int i = 0; i < nbits; i++) begin
      ps2_dat = frame[i];
      #(HALF / 2);
      ps2_clk = 0;
      #HALF;
      ps2_clk = 1;
      #(HALF / 2);
    end
    ps2_dat = 1;
    #(4 * HALF);
  endtask

  function automatic logic [10:0] frame_of(logic [7:0] d, logic bad_parity);
    return {1'b1, ~^d ^ bad_parity, d, 1'b0};
  endfunction

  task automatic expect_eq(string what, int got_v, int exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got_v, exp);
    end
  endtask

  initial begin
    logic [7:0] sent [$];
    ps2_clk = 1; ps2_dat = 1; reset = 1;
    #200 reset = 0;
    #1000;
    repeat (40) begin
      logic [7:0] d = 8'($urandom);
      sent.push_back(d);
      send_bits(frame_of(d, 0), 11);
    end
    send_bits(frame_of(8'h1C, 1), 11);           // parity error
    send_bits(frame_of(8'h55, 0), 4);            // truncated frame
    #2000000;                                    // longer than the time-out
    sent.push_back(8'hF0);
    send_bits(frame_of(8'hF0, 0), 11);
    #100000;
    expect_eq("bytes received", got.size(), sent.size());
    expect_eq("parity errors", n_err, 1);
    for (int i = 0; i < sent.size() && i < got.size(); i++)
      expect_eq($sformatf("byte %0d", i), int'(got[i]), int'(sent[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
