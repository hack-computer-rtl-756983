// kbd_reg: the one-word keyboard memory (address 24576).
// A simple dual-port location: the keyboard side writes the Hack code of
// the key held down (0 when none) on a rising edge with we, and the CPU
// reads it. The CPU read is registered on the falling edge like the other
// data memories, so the word is valid in the second half of the cycle.
// Function from the computer's description; timing is this design's choice.
module kbd_reg (
  input  logic        clk,
  input  logic        reset,
  input  logic        we,
  input  logic [15:0] wdata,
  output logic [15:0] rdata
);
  logic [15:0] key;

  always_ff @(posedge clk) begin
    if (reset)   key <= '0;
    else if (we) key <= wdata;
  end

  always_ff @(negedge clk) begin
    rdata <= key;
  end
endmodule
