// hack_pkg: types and constants shared by the Hack computer modules.
// It holds the C-instruction field layout, the decoded control bundle that
// the control unit hands to the CPU datapath, the data memory map
// (RAM 0-16383, screen 16384-24575, keyboard 24576) and the Hack key codes
// that the keyboard path produces. The memory map follows the computer's
// description; the bit layout of an instruction and the key codes are the
// standard Hack ones.
package hack_pkg;

  localparam int unsigned DATA_W = 16;  // data bus and instruction width
  localparam int unsigned ADDR_W = 15;  // addressM and PC width (32K words)

  // Data memory map
  localparam logic [14:0] RAM_BASE    = 15'd0;
  localparam logic [14:0] SCREEN_BASE = 15'd16384;
  localparam logic [14:0] KBD_ADDR    = 15'd24576;

  // C-instruction: 1 1 1 a c1 c2 c3 c4 c5 c6 d1 d2 d3 j1 j2 j3
  typedef struct packed {
    logic       is_c;     // bit 15
    logic [1:0] unused;   // bits 14:13
    logic       a;        // bit 12: second ALU operand is M (1) or A (0)
    logic [5:0] comp;     // bits 11:6: zx nx zy ny f no
    logic       dest_a;   // bit 5
    logic       dest_d;   // bit 4
    logic       dest_m;   // bit 3
    logic       j_lt;     // bit 2
    logic       j_eq;     // bit 1
    logic       j_gt;     // bit 0
  } c_instr_t;

  // Control signals from the control unit to the CPU datapath
  typedef struct packed {
    logic       a_sel_alu;  // A register input: 1 = ALU output, 0 = instruction
    logic       load_a;     // write A register
    logic       load_d;     // write D register
    logic       y_sel_m;    // ALU second operand: 1 = inM, 0 = A
    logic [5:0] alu_ctrl;   // zx nx zy ny f no
    logic       write_m;    // write data memory
    logic       jump;       // load PC from A
  } cpu_ctrl_t;

  // Hack key codes for the non-printing keys (printing keys use ASCII)
  localparam logic [15:0] KEY_NEWLINE   = 16'd128;
  localparam logic [15:0] KEY_BACKSPACE = 16'd129;
  localparam logic [15:0] KEY_LEFT      = 16'd130;
  localparam logic [15:0] KEY_UP        = 16'd131;
  localparam logic [15:0] KEY_RIGHT     = 16'd132;
  localparam logic [15:0] KEY_DOWN      = 16'd133;
  localparam logic [15:0] KEY_HOME      = 16'd134;
  localparam logic [15:0] KEY_END       = 16'd135;
  localparam logic [15:0] KEY_PGUP      = 16'd136;
  localparam logic [15:0] KEY_PGDN      = 16'd137;
  localparam logic [15:0] KEY_INSERT    = 16'd138;
  localparam logic [15:0] KEY_DELETE    = 16'd139;
  localparam logic [15:0] KEY_ESC       = 16'd140;
  localparam logic [15:0] KEY_F1        = 16'd141;

endpackage
