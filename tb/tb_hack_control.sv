// tb_hack_control: checks the instruction decoder. A-instructions must load
// A from the instruction and nothing else; C-instructions must route the
// a-bit, ALU controls and destination bits, and take a jump exactly when
// the condition (JGT, JEQ, JGE, JLT, JNE, JLE, JMP) holds for a result that
// is zero, negative or positive.
module tb_hack_control;
  import hack_pkg::*;
  logic [15:0] instruction;
  logic        zr, ng;
  cpu_ctrl_t   ctl;
  int checks = 0, failures = 0;

  hack_control dut (.instruction(instruction), .zr(zr), .ng(ng), .ctl(ctl));

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%b zr=%b ng=%b got=%h exp=%h", what, instruction, zr, ng, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // A-instructions
    repeat (200) begin
      instruction = {1'b0, 15'($urandom)};
      {zr, ng} = 2'($urandom_range(0, 2));
      #1;
      expect_eq("A load_a", 16'(ctl.load_a), 1);
      expect_eq("A sel", 16'(ctl.a_sel_alu), 0);
      expect_eq("A load_d", 16'(ctl.load_d), 0);
      expect_eq("A writeM", 16'(ctl.write_m), 0);
      expect_eq("A jump", 16'(ctl.jump), 0);
    end
    // C-instructions: every jump code against each result class
    for (int jc = 0; jc < 8; jc++) begin
      for (int cls = 0; cls < 3; cls++) begin        // 0 zero, 1 negative, 2 positive
        repeat (20) begin
          logic jexp;
          logic [5:0] comp = 6'($urandom);
          logic [2:0] dest = 3'($urandom);
          logic       abit = 1'($urandom);
          instruction = {3'b111, abit, comp, dest, 3'(jc)};
          zr = (cls == 0);
          ng = (cls == 1);
          case (jc)
            0: jexp = 0;
            1: jexp = (cls == 2);              // JGT
            2: jexp = (cls == 0);              // JEQ
            3: jexp = (cls != 1);              // JGE
            4: jexp = (cls == 1);              // JLT
            5: jexp = (cls != 0);              // JNE
            6: jexp = (cls != 2);              // JLE
            default: jexp = 1;                 // JMP
          endcase
          #1;
          expect_eq("C jump", 16'(ctl.jump), 16'(jexp));
          expect_eq("C alu", 16'(ctl.alu_ctrl), 16'(comp));
          expect_eq("C ysel", 16'(ctl.y_sel_m), 16'(abit));
          expect_eq("C load_a", 16'(ctl.load_a), 16'(dest[2]));
          expect_eq("C load_d", 16'(ctl.load_d), 16'(dest[1]));
          expect_eq("C writeM", 16'(ctl.write_m), 16'(dest[0]));
          expect_eq("C sel", 16'(ctl.a_sel_alu), 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
