// ps2_keymap: converts PS/2 scan codes into the Hack keyboard code.
// A PS/2 keyboard (scan code set 2) sends a make code when a key goes down,
// F0 followed by the same code when it comes up, and an E0 prefix before
// the codes of the extended keys (arrows, Home, End, ...). The Hack computer
// instead expects one word holding the code of the key held down, or 0.
// This block tracks the two prefixes and, for each complete code, looks the
// key up: letters give upper-case ASCII (there is no Shift handling), digits,
// space and punctuation their ASCII codes, and the other keys the Hack codes
// 128 (Enter) to 152 (F12). A make code of a mapped key replaces the held
// key; the break code of the key held clears it to 0; unmapped keys are
// ignored. key_we pulses for one clock whenever key changes, so the new
// value can be written into the keyboard memory word.
// That key codes are translated comes from the computer's description;
// which keys are covered is this design's choice.
module ps2_keymap
  import hack_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [7:0]  code,
  input  logic        valid,
  output logic [15:0] key,
  output logic        key_we
);
  logic        brk, ext;
  logic [15:0] mapped;

  function automatic logic [15:0] lookup(input logic e, input logic [7:0] c);
    logic [7:0] a;
    if (e) begin
      unique case (c)
        8'h6B:   return KEY_LEFT;
        8'h75:   return KEY_UP;
        8'h74:   return KEY_RIGHT;
        8'h72:   return KEY_DOWN;
        8'h6C:   return KEY_HOME;
        8'h69:   return KEY_END;
        8'h7D:   return KEY_PGUP;
        8'h7A:   return KEY_PGDN;
        8'h70:   return KEY_INSERT;
        8'h71:   return KEY_DELETE;
        8'h5A:   return KEY_NEWLINE;   // keypad Enter
        default: return 16'd0;
      endcase
    end
    unique case (c)
      8'h1C: a = "A";  8'h32: a = "B";  8'h21: a = "C";  8'h23: a = "D";
      8'h24: a = "E";  8'h2B: a = "F";  8'h34: a = "G";  8'h33: a = "H";
      8'h43: a = "I";  8'h3B: a = "J";  8'h42: a = "K";  8'h4B: a = "L";
      8'h3A: a = "M";  8'h31: a = "N";  8'h44: a = "O";  8'h4D: a = "P";
      8'h15: a = "Q";  8'h2D: a = "R";  8'h1B: a = "S";  8'h2C: a = "T";
      8'h3C: a = "U";  8'h2A: a = "V";  8'h1D: a = "W";  8'h22: a = "X";
      8'h35: a = "Y";  8'h1A: a = "Z";
      8'h45: a = "0";  8'h16: a = "1";  8'h1E: a = "2";  8'h26: a = "3";
      8'h25: a = "4";  8'h2E: a = "5";  8'h36: a = "6";  8'h3D: a = "7";
      8'h3E: a = "8";  8'h46: a = "9";
      8'h29: a = " ";  8'h4E: a = "-";  8'h55: a = "=";  8'h54: a = "[";
      8'h5B: a = "]";  8'h5D: a = "\\"; 8'h4C: a = ";";  8'h52: a = "'";
      8'h41: a = ",";  8'h49: a = ".";  8'h4A: a = "/";  8'h0E: a = "`";
      default: a = 8'd0;
    endcase
    if (a != 8'd0) return {8'd0, a};
    unique case (c)
      8'h5A:   return KEY_NEWLINE;
      8'h66:   return KEY_BACKSPACE;
      8'h76:   return KEY_ESC;
      8'h05:   return KEY_F1;           // F1
      8'h06:   return KEY_F1 + 16'd1;   // F2
      8'h04:   return KEY_F1 + 16'd2;   // F3
      8'h0C:   return KEY_F1 + 16'd3;   // F4
      8'h03:   return KEY_F1 + 16'd4;   // F5
      8'h0B:   return KEY_F1 + 16'd5;   // F6
      8'h83:   return KEY_F1 + 16'd6;   // F7
      8'h0A:   return KEY_F1 + 16'd7;   // F8
      8'h01:   return KEY_F1 + 16'd8;   // F9
      8'h09:   return KEY_F1 + 16'd9;   // F10
      8'h78:   return KEY_F1 + 16'd10;  // F11
      8'h07:   return KEY_F1 + 16'd11;  // F12
      default: return 16'd0;
    endcase
  endfunction

  assign mapped = lookup(ext, code);

  always_ff @(posedge clk) begin
    key_we <= 1'b0;
    if (reset) begin
      brk <= 1'b0;
      ext <= 1'b0;
      key <= '0;
    end else if (valid) begin
      if (code == 8'hE0) begin
        ext <= 1'b1;
      end else if (code == 8'hF0) begin
        brk <= 1'b1;
      end else begin
        brk <= 1'b0;
        ext <= 1'b0;
        if (brk) begin
          if (mapped == key && key != '0) begin
            key    <= '0;
            key_we <= 1'b1;
          end
        end else if (mapped != '0 && mapped != key) begin
          key    <= mapped;
          key_we <= 1'b1;
        end
      end
    end
  end
endmodule
