// tb_hack_alu: checks the 18 Hack ALU operations against their arithmetic
// meaning (0, 1, -1, D, A, !D, !A, -D, -A, D+1, A+1, D-1, A-1, D+A, D-A,
// A-D, D&A, D|A) on edge-case and random operands, plus the zr and ng flags.
module tb_hack_alu;
  logic [15:0] x, y, out;
  logic [5:0]  ctrl;
  logic        zr, ng;
  int checks = 0, failures = 0;

  hack_alu #(.WIDTH(16)) dut (.x(x), .y(y), .ctrl(ctrl), .out(out), .zr(zr), .ng(ng));

  localparam logic [5:0] OPS [18] = '{6'b101010, 6'b111111, 6'b111010, 6'b001100,
    6'b110000, 6'b001101, 6'b110001, 6'b001111, 6'b110011, 6'b011111, 6'b110111,
    6'b001110, 6'b110010, 6'b000010, 6'b010011, 6'b000111, 6'b000000, 6'b010101};

  function automatic logic [15:0] expect_op(int k, logic [15:0] d, logic [15:0] a);
    case (k)
      0: return 16'd0;       1: return 16'd1;       2: return 16'hFFFF;
      3: return d;           4: return a;           5: return ~d;
      6: return ~a;          7: return -d;          8: return -a;
      9: return d + 1;       10: return a + 1;      11: return d - 1;
      12: return a - 1;      13: return d + a;      14: return d - a;
      15: return a - d;      16: return d & a;      default: return d | a;
    endcase
  endfunction

  task automatic check(int k);
    logic [15:0] e;
    ctrl = OPS[k];
    #1;
    e = expect_op(k, x, y);
    checks++;
    if (out !== e || zr !== (e == 0) || ng !== e[15]) begin
      failures++;
      $display("FAIL op %0d x=%h y=%h out=%h exp=%h zr=%b ng=%b", k, x, y, out, e, zr, ng);
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
    logic [15:0] edge_v [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h1234};
    foreach (edge_v[i]) foreach (edge_v[j]) begin
      x = edge_v[i];
      y = edge_v[j];
      for (int k = 0; k < 18; k++) check(k);
    end
    repeat (300) begin
      x = 16'($urandom);
      y = 16'($urandom);
      for (int k = 0; k < 18; k++) check(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
