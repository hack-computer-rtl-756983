// hack_alu: the Hack arithmetic/logic unit.
// Six control inputs act in sequence on the two operands: zx zeroes x, nx
// inverts x, zy zeroes y, ny inverts y, f chooses x+y (1) or x&y (0), and no
// inverts the result. Of the 64 combinations, 18 give the distinct Hack
// operations (0, 1, -1, D, A, !D, -D, D+1, A-1, D+A, D-A, A-D, D&A, D|A ...),
// the others repeating them through De Morgan's laws. zr flags a zero result
// and ng a negative one (bit WIDTH-1); the control unit uses them for jumps.
// Purely combinational. The six controls and the operation they perform come
// from the computer's description; the flag outputs are the standard Hack ones.
module hack_alu #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [5:0]       ctrl,   // {zx, nx, zy, ny, f, no}
  output logic [WIDTH-1:0] out,
  output logic             zr,
  output logic             ng
);
  logic zx, nx, zy, ny, f, no;
  logic [WIDTH-1:0] xa, ya, r;

  assign {zx, nx, zy, ny, f, no} = ctrl;

  always_comb begin
    xa = zx ? '0 : x;
    if (nx) xa = ~xa;
    ya = zy ? '0 : y;
    if (ny) ya = ~ya;
    r  = f ? (xa + ya) : (xa & ya);
    out = no ? ~r : r;
  end

  assign zr = (out == '0);
  assign ng = out[WIDTH-1];
endmodule
