// screen_ram: the 8K x 16 screen memory (addresses 16384-24575).
// A true dual-port memory. Port A belongs to the CPU: it reads on the
// falling edge of clk_a and writes on the rising edge, as the other data
// memories do. Port B belongs to the VGA controller, which reads it
// continuously on the pixel clock clk_b with one cycle of latency; the VGA
// side never writes. Each word holds 16 pixels of a 512 x 256 monochrome
// image, 32 words per row. Size and dual-port use follow the computer's
// description; the port timing is this design's choice. Contents start at 0.
module screen_ram #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk_a,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             clk_b,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= wdata_a;
  end

  always_ff @(negedge clk_a) begin
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk_b) begin
    rdata_b <= mem[addr_b];
  end
endmodule
