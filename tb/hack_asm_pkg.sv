// hack_asm_pkg: a tiny Hack assembler for testbenches.
// asm_a(v) builds the A-instruction "@v"; asm_c(dest, comp, jump) builds a
// C-instruction from its mnemonic fields, e.g. asm_c("AM", "M+1", "") for
// "AM=M+1" or asm_c("", "D", "JLT") for "D;JLT". The comp table is the
// Hack one: bit 12 chooses M over A, bits 11:6 are the ALU controls.
package hack_asm_pkg;

  function automatic logic [15:0] asm_a(int unsigned v);
    return {1'b0, v[14:0]};
  endfunction

  function automatic logic [6:0] comp_bits(string c);
    case (c)
      "0":   return 7'b0101010;  "1":   return 7'b0111111;  "-1":  return 7'b0111010;
      "D":   return 7'b0001100;  "A":   return 7'b0110000;  "M":   return 7'b1110000;
      "!D":  return 7'b0001101;  "!A":  return 7'b0110001;  "!M":  return 7'b1110001;
      "-D":  return 7'b0001111;  "-A":  return 7'b0110011;  "-M":  return 7'b1110011;
      "D+1": return 7'b0011111;  "A+1": return 7'b0110111;  "M+1": return 7'b1110111;
      "D-1": return 7'b0001110;  "A-1": return 7'b0110010;  "M-1": return 7'b1110010;
      "D+A": return 7'b0000010;  "D+M": return 7'b1000010;
      "D-A": return 7'b0010011;  "D-M": return 7'b1010011;
      "A-D": return 7'b0000111;  "M-D": return 7'b1000111;
      "D&A": return 7'b0000000;  "D&M": return 7'b1000000;
      "D|A": return 7'b0010101;  "D|M": return 7'b1010101;
      default: begin
        $display("asm: unknown comp %s", c);
        return 7'b0101010;
      end
    endcase
  endfunction

  function automatic logic [2:0] dest_bits(string d);
    logic [2:0] r = 3'b000;
    for (int i = 0; i < d.len(); i++) begin
      if (d[i] == "A") r[2] = 1'b1;
      if (d[i] == "D") r[1] = 1'b1;
      if (d[i] == "M") r[0] = 1'b1;
    end
    return r;
  endfunction

  function automatic logic [2:0] jump_bits(string j);
    case (j)
      "JGT": return 3'b001;  "JEQ": return 3'b010;  "JGE": return 3'b011;
      "JLT": return 3'b100;  "JNE": return 3'b101;  "JLE": return 3'b110;
      "JMP": return 3'b111;  default: return 3'b000;
    endcase
  endfunction

  function automatic logic [15:0] asm_c(string dest, string comp, string jump);
    return {3'b111, comp_bits(comp), dest_bits(dest), jump_bits(jump)};
  endfunction

endpackage
