// vga_pll: behavioural model of the PLL that makes the VGA pixel clock.
// On the board this is the FPGA vendor's PLL block, which derives the
// 25 MHz pixel clock from the 50 MHz board clock; it is not logic of this
// design. The model reproduces its ports and its effect: c0 toggles on every
// rising edge of inclk0 (half the input frequency), and locked rises after
// LOCK_CYCLES input clocks once areset is released. areset stops c0 and
// clears locked. A real PLL also deskews c0 against inclk0, which the model
// does not attempt.
module vga_pll #(
  parameter int unsigned LOCK_CYCLES = 16
) (
  input  logic inclk0,
  input  logic areset,
  output logic c0,
  output logic locked
);
  logic [7:0] lock_cnt;

  always_ff @(posedge inclk0) begin
    if (areset) begin
      c0       <= 1'b0;
      lock_cnt <= '0;
      locked   <= 1'b0;
    end else begin
      c0 <= !c0;
      if (lock_cnt == 8'(LOCK_CYCLES)) locked <= 1'b1;
      else                             lock_cnt <= lock_cnt + 1'b1;
    end
  end
endmodule
