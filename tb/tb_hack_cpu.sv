// tb_hack_cpu: runs a short Hack program on the CPU with a program memory
// and a single-cycle data memory kept in the testbench. The program sums
// 10+9+...+1 in a counted loop (D;JGT), does a read-modify-write with a
// change of A (AM=M+1), a taken D;JLT that skips a store, and ends in a
// 0;JMP self-loop. It checks the resulting memory words, that the skipped
// store never happened, and that the CPU reaches the end loop after exactly
// one clock per instruction (95 clocks).
// A second phase resets the CPU and runs 20,000 clocks of random programs
// (all 28 comp mnemonics, every destination and jump field) against an
// instruction-level reference model written from the mnemonic meanings,
// comparing pc, addressM, writeM and outM every clock.
module tb_hack_cpu;
  import hack_asm_pkg::*;
  logic        clk = 0, reset;
  logic [15:0] instruction, inM, outM;
  logic        writeM;
  logic [14:0] addressM, pc;
  logic [15:0] rom [32768];
  logic [15:0] ram [32768];
  int checks = 0, failures = 0;
  int cycles = 0, reach_end = -1, jumps = 0, writes = 0;

  hack_cpu dut (.clk(clk), .reset(reset), .instruction(instruction), .inM(inM),
                .outM(outM), .writeM(writeM), .addressM(addressM), .pc(pc));

  always #5 clk = !clk;

  assign instruction = rom[pc];
  assign inM         = ram[addressM];

  always_ff @(posedge clk) begin
    if (writeM) ram[addressM] <= outM;
  end

  logic [14:0] pc_prev;
  always @(posedge clk) begin
    pc_prev <= pc;
    if (!reset) begin
      cycles++;
      if (writeM) writes++;
      if (cycles > 1 && pc != pc_prev + 15'd1) jumps++;
      if (pc == 15'd25 && reach_end < 0) reach_end = cycles - 1;
    end
  end

  localparam string COMPS [28] = '{"0", "1", "-1", "D", "A", "M", "!D", "!A", "!M",
    "-D", "-A", "-M", "D+1", "A+1", "M+1", "D-1", "A-1", "M-1", "D+A", "D+M",
    "D-A", "D-M", "A-D", "M-D", "D&A", "D&M", "D|A", "D|M"};
  localparam string DESTS [8] = '{"", "M", "D", "MD", "A", "AM", "AD", "AMD"};
  localparam string JUMPS [8] = '{"", "JGT", "JEQ", "JGE", "JLT", "JNE", "JLE", "JMP"};

  function automatic logic [15:0] eval(string c, logic [15:0] d, logic [15:0] a, logic [15:0] mv);
    case (c)
      "0": return 0;        "1": return 1;        "-1": return 16'hFFFF;
      "D": return d;        "A": return a;        "M": return mv;
      "!D": return ~d;      "!A": return ~a;      "!M": return ~mv;
      "-D": return -d;      "-A": return -a;      "-M": return -mv;
      "D+1": return d + 1;  "A+1": return a + 1;  "M+1": return mv + 1;
      "D-1": return d - 1;  "A-1": return a - 1;  "M-1": return mv - 1;
      "D+A": return d + a;  "D+M": return d + mv;
      "D-A": return d - a;  "D-M": return d - mv;
      "A-D": return a - d;  "M-D": return mv - d;
      "D&A": return d & a;  "D&M": return d & mv;
      "D|A": return d | a;  default: return d | mv;
    endcase
  endfunction

  function automatic bit cond(string j, logic [15:0] v);
    bit neg = v[15], zero = (v == 0), pos = !neg && !zero;
    case (j)
      "JGT": return pos;    "JEQ": return zero;   "JGE": return !neg;
      "JLT": return neg;    "JNE": return !zero;  "JLE": return !pos;
      "JMP": return 1;      default: return 0;
    endcase
  endfunction

  // random programs against the reference model
  string       rc [32768];
  int          rd [32768], rj [32768];
  bit          isa [32768];
  logic [15:0] memr [32768];

  task automatic random_phase(int n_cycles);
    logic [15:0] ar, dr, v;
    logic [14:0] pcr, target;
    logic        wr, jmp;
    int          dd, bad;
    bad = 0;
    foreach (ram[i]) begin
      ram[i]  = 16'($urandom);
      memr[i] = ram[i];
    end
    foreach (rom[i]) begin
      isa[i] = $urandom_range(0, 2) == 0;
      rc[i]  = COMPS[$urandom_range(0, 27)];
      rd[i]  = $urandom_range(0, 7);
      rj[i]  = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 7) : 0;
      rom[i] = isa[i] ? asm_a($urandom_range(0, 32767)) : asm_c(DESTS[rd[i]], rc[i], JUMPS[rj[i]]);
    end
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    ar = 0; dr = 0; pcr = 0;
    for (int n = 0; n < n_cycles; n++) begin
      #1;
      v  = eval(rc[pcr], dr, ar, memr[ar[14:0]]);
      wr = !isa[pcr] && (rd[pcr] % 2 == 1);
      checks++;
      if (pc !== pcr || addressM !== ar[14:0] || writeM !== wr || (wr && outM !== v)) begin
        failures++;
        if (bad++ < 5) $display("FAIL random: pc=%0d exp %0d A=%0d exp %0d writeM=%b exp %b outM=%h exp %h",
                                pc, pcr, addressM, ar[14:0], writeM, wr, outM, v);
      end
      @(posedge clk);
      if (isa[pcr]) begin
        ar  = rom[pcr];
        pcr = pcr + 1'b1;
      end else begin
        target = ar[14:0];
        jmp    = cond(JUMPS[rj[pcr]], v);
        dd     = rd[pcr];
        if (wr) memr[ar[14:0]] = v;
        if (dd >= 4) ar = v;
        if (dd % 4 >= 2) dr = v;
        pcr = jmp ? target : pcr + 1'b1;
      end
    end
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ram[i]) ram[i] = '0;
    foreach (rom[i]) rom[i] = asm_c("", "0", "JMP");
    rom[0]  = asm_a(10);             rom[1]  = asm_c("D", "A", "");
    rom[2]  = asm_a(2);              rom[3]  = asm_c("M", "D", "");
    rom[4]  = asm_a(1);              rom[5]  = asm_c("M", "0", "");
    rom[6]  = asm_a(2);              rom[7]  = asm_c("D", "M", "");     // loop
    rom[8]  = asm_a(1);              rom[9]  = asm_c("M", "D+M", "");
    rom[10] = asm_a(2);              rom[11] = asm_c("MD", "M-1", "");
    rom[12] = asm_a(6);              rom[13] = asm_c("", "D", "JGT");
    rom[14] = asm_a(100);            rom[15] = asm_c("AM", "M+1", "");
    rom[16] = asm_c("D", "A", "");   rom[17] = asm_a(200);
    rom[18] = asm_c("M", "D", "");   rom[19] = asm_a(5);
    rom[20] = asm_c("D", "-A", "");  rom[21] = asm_a(25);
    rom[22] = asm_c("", "D", "JLT"); rom[23] = asm_a(300);
    rom[24] = asm_c("M", "-1", "");
    rom[25] = asm_a(25);             rom[26] = asm_c("", "0", "JMP");
    reset = 1;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    expect_eq("pc after reset", int'(pc), 0);
    repeat (200) @(posedge clk);
    #1;
    expect_eq("sum RAM[1]", int'(ram[1]), 55);
    expect_eq("counter RAM[2]", int'(ram[2]), 0);
    expect_eq("RAM[100]", int'(ram[100]), 1);
    expect_eq("RAM[200]", int'(ram[200]), 1);
    expect_eq("skipped RAM[300]", int'(ram[300]), 0);
    expect_eq("clocks to end loop", reach_end, 95);
    expect_eq("memory writes", writes, 2 + 20 + 2);
    checks++;
    if (jumps < 10) begin
      failures++;
      $display("FAIL too few jumps %0d", jumps);
    end
    random_phase(20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
