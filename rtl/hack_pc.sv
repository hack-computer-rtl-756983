// hack_pc: the Hack program counter.
// On each rising clock edge the counter goes to 0 on reset, otherwise loads
// d (the A register) when load is high (a taken jump), otherwise adds one
// when inc is high. Reset has priority over load, load over inc. The
// counter addresses the 32K-word program memory, so it is 15 bits wide; it
// wraps from 32767 to 0. Behaviour as the computer's description gives it;
// the priority order is this design's choice.
module hack_pc #(
  parameter int unsigned WIDTH = 15
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load,
  input  logic             inc,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (reset)     q <= '0;
    else if (load) q <= d;
    else if (inc)  q <= q + 1'b1;
  end
endmodule
