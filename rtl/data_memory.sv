// data_memory: the Hack data memory with its memory-mapped I/O.
// Addresses 0-16383 reach the 16K RAM, 16384-24575 the 8K screen memory and
// 24576 the keyboard word. The chip-select decoder looks at address bits 14
// and 13 only, so every address from 24576 up reads the keyboard. A write
// (load high) goes to the RAM or the screen on the rising clock edge; the
// keyboard word cannot be written by the CPU. Reads are taken on the falling
// edge and out is valid in the second half of the cycle, selected by the
// chip select of the address held during the cycle.
// The screen memory's second port and the keyboard's write port are brought
// out for the VGA controller and the keyboard path.
// Memory map and decoder follow the computer's description; the read timing
// is this design's choice.
module data_memory (
  input  logic        clk,
  input  logic        reset,
  // CPU port
  input  logic [14:0] address,
  input  logic [15:0] in,
  input  logic        load,
  output logic [15:0] out,
  // VGA read port of the screen memory (pixel clock domain)
  input  logic        vga_clk,
  input  logic [12:0] vga_addr,
  output logic [15:0] vga_data,
  // keyboard write port
  input  logic        kbd_we,
  input  logic [15:0] kbd_data
);
  logic        cs_ram, cs_scr, cs_kbd;
  logic [15:0] ram_q, scr_q, kbd_q;

  dmem_decoder u_dec (
    .addr_hi(address[14:13]),
    .cs_ram (cs_ram),
    .cs_scr (cs_scr),
    .cs_kbd (cs_kbd)
  );

  ram16k #(.DEPTH(16384), .WIDTH(16)) u_ram (
    .clk  (clk),
    .we   (load && cs_ram),
    .addr (address[13:0]),
    .wdata(in),
    .rdata(ram_q)
  );

  screen_ram #(.DEPTH(8192), .WIDTH(16)) u_scr (
    .clk_a  (clk),
    .we_a   (load && cs_scr),
    .addr_a (address[12:0]),
    .wdata_a(in),
    .rdata_a(scr_q),
    .clk_b  (vga_clk),
    .addr_b (vga_addr),
    .rdata_b(vga_data)
  );

  kbd_reg u_kbd (
    .clk  (clk),
    .reset(reset),
    .we   (kbd_we),
    .wdata(kbd_data),
    .rdata(kbd_q)
  );

  always_comb begin
    unique case (1'b1)
      cs_ram:  out = ram_q;
      cs_scr:  out = scr_q;
      cs_kbd:  out = kbd_q;
      default: out = ram_q;
    endcase
  end
endmodule
