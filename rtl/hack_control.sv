// hack_control: the Hack CPU control unit (instruction decoder).
// Combinational. An A-instruction (bit 15 = 0) loads its 15-bit literal into
// A and does nothing else. A C-instruction (bits 15:13 = 111) selects the
// ALU's second operand with bit 12 (A or M), passes bits 11:6 to the ALU,
// writes A, D and/or memory according to bits 5:3, and jumps when the ALU
// result matches the condition in bits 2:0 (j1 = less than zero, j2 = zero,
// j3 = greater than zero, judged from the ALU flags zr and ng). The document
// names the unit and its role; the field layout is the standard Hack one.
module hack_control
  import hack_pkg::*;
(
  input  logic [15:0] instruction,
  input  logic        zr,
  input  logic        ng,
  output cpu_ctrl_t   ctl
);
  c_instr_t ci;
  logic     pos;

  assign ci  = c_instr_t'(instruction);
  assign pos = !zr && !ng;

  always_comb begin
    ctl.a_sel_alu = ci.is_c;
    ctl.load_a    = !ci.is_c || ci.dest_a;
    ctl.load_d    = ci.is_c && ci.dest_d;
    ctl.y_sel_m   = ci.is_c && ci.a;
    ctl.alu_ctrl  = ci.comp;
    ctl.write_m   = ci.is_c && ci.dest_m;
    ctl.jump      = ci.is_c && ((ci.j_lt && ng) || (ci.j_eq && zr) || (ci.j_gt && pos));
  end
endmodule
