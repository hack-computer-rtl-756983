// hack_cpu: the Hack central processing unit.
// One instruction per clock. The datapath holds the A register, the D
// register and the program counter. D is always the ALU's first operand; a
// 16-bit multiplexer picks the second from A or from inM (the data memory
// word at address A). A second multiplexer feeds A from the instruction
// (A-instruction literal) or from the ALU output. The control unit decodes
// the instruction into these selects, the register and memory write enables,
// the ALU controls and the jump decision.
// Interface: addressM is the A register as it stands during the cycle;
// inM must be the memory word at addressM before the rising edge that ends
// the cycle; outM and writeM are valid in the same cycle and the memory
// writes on that rising edge. pc addresses the program memory and
// instruction must be the word at pc in the same cycle.
// The structure follows the computer's block diagram; clearing A and D on
// reset is this design's choice.
module hack_cpu
  import hack_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] instruction,
  input  logic [15:0] inM,
  output logic [15:0] outM,
  output logic        writeM,
  output logic [14:0] addressM,
  output logic [14:0] pc
);
  cpu_ctrl_t   ctl;
  logic [15:0] a_reg, d_reg, y, alu_out;
  logic        zr, ng;

  hack_control u_ctrl (
    .instruction(instruction),
    .zr         (zr),
    .ng         (ng),
    .ctl        (ctl)
  );

  assign y = ctl.y_sel_m ? inM : a_reg;

  hack_alu #(.WIDTH(16)) u_alu (
    .x   (d_reg),
    .y   (y),
    .ctrl(ctl.alu_ctrl),
    .out (alu_out),
    .zr  (zr),
    .ng  (ng)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      a_reg <= '0;
      d_reg <= '0;
    end else begin
      if (ctl.load_a) a_reg <= ctl.a_sel_alu ? alu_out : instruction;
      if (ctl.load_d) d_reg <= alu_out;
    end
  end

  hack_pc #(.WIDTH(15)) u_pc (
    .clk  (clk),
    .reset(reset),
    .load (ctl.jump),
    .inc  (1'b1),
    .d    (a_reg[14:0]),
    .q    (pc)
  );

  assign outM     = alu_out;
  assign writeM   = ctl.write_m && !reset;
  assign addressM = a_reg[14:0];

  // one instruction per clock: the PC moves on by one unless a jump is taken
  property p_pc_step;
    @(posedge clk) disable iff (reset) !ctl.jump |=> pc == $past(pc) + 15'd1;
  endproperty
  assert property (p_pc_step) else $error("hack_cpu: PC did not advance");

  property p_pc_jump;
    @(posedge clk) disable iff (reset) ctl.jump |=> pc == $past(a_reg[14:0]);
  endproperty
  assert property (p_pc_jump) else $error("hack_cpu: jump did not load A");
endmodule
