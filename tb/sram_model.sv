// sram_model: behavioural model of the board's asynchronous 256K x 16 SRAM
// used as program memory, read side only. While the chip and output are
// enabled and write is disabled, dq shows the addressed word, each byte
// gated by its byte enable, T_AA ns after the address changes (10 ns
// access time). Otherwise dq reads 0 (the real chip floats it). The
// testbench fills mem directly before reset is released, standing in for
// the program loader.
module sram_model #(
  parameter int T_AA = 10
) (
  input  logic [17:0] addr,
  output logic [15:0] dq,
  input  logic        ce_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        ub_n,
  input  logic        lb_n
);
  logic [15:0] mem [262144];
  logic [15:0] word;

  always_comb begin
    word = '0;
    if (!ce_n && !oe_n && we_n) begin
      if (!ub_n) word[15:8] = mem[addr][15:8];
      if (!lb_n) word[7:0]  = mem[addr][7:0];
    end
  end

  assign #(T_AA) dq = word;
endmodule
