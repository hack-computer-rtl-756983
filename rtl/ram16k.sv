// ram16k: the 16K x 16 data RAM for program variables (addresses 0-16383).
// A single-port memory used only by the CPU. The address is held for the
// whole CPU cycle, so the word is read on the falling clock edge (rdata is
// valid for the second half of the cycle, in time for the ALU) and written
// on the rising edge that ends the cycle. That lets a single-cycle CPU do a
// read-modify-write such as M=M+1 through one address. The size and single
// port follow the computer's description; the split between read and write
// edges is this design's choice. Contents start at zero.
module ram16k #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_ff @(negedge clk) begin
    rdata <= mem[addr];
  end
endmodule
