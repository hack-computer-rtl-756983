// tb_dmem_decoder: every 15-bit address must select exactly the device the
// memory map gives it: RAM below 16384, screen from 16384 to 24575, keyboard
// from 24576 up.
module tb_dmem_decoder;
  logic [14:0] address;
  logic        cs_ram, cs_scr, cs_kbd;
  int checks = 0, failures = 0;

  dmem_decoder dut (.addr_hi(address[14:13]), .cs_ram(cs_ram), .cs_scr(cs_scr), .cs_kbd(cs_kbd));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32768; a++) begin
      logic er, es, ek;
      address = 15'(a);
      er = (a <= 16383);
      es = (a >= 16384 && a <= 24575);
      ek = (a >= 24576);
      #1;
      checks++;
      if ({cs_ram, cs_scr, cs_kbd} !== {er, es, ek}) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d got=%b%b%b", a, cs_ram, cs_scr, cs_kbd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
