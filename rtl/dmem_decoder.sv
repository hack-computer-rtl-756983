// dmem_decoder: chip-select decoder for the data memory.
// Two 1-to-2 demultiplexers: the first, steered by addressM[14] with its
// input tied high, selects the RAM (bit 14 = 0) or passes the enable on; the
// second, steered by addressM[13], selects the screen (bit 13 = 0) or the
// keyboard (bit 13 = 1). Exactly one select is high at any time.
// Combinational. The structure and signal names follow the decoder's
// schematic; which demultiplexer output is which follows the memory map.
module dmem_decoder (
  input  logic [1:0] addr_hi,   // addressM[14:13]
  output logic       cs_ram,    // CS_RAM16
  output logic       cs_scr,    // CS_SCR
  output logic       cs_kbd     // CS_KBD
);
  logic en_io;

  // first demux: F = 1, Se = addressM[14]
  assign cs_ram = !addr_hi[1];
  assign en_io  =  addr_hi[1];
  // second demux: F = en_io, Se = addressM[13]
  assign cs_scr = en_io && !addr_hi[0];
  assign cs_kbd = en_io &&  addr_hi[0];

  // exactly one memory is selected for every address
  always_comb begin
    assert (32'(cs_ram) + 32'(cs_scr) + 32'(cs_kbd) == 1)
      else $error("dmem_decoder: not exactly one chip select");
  end
endmodule
