// ps2_rx: receiver for the PS/2 keyboard interface.
// The keyboard drives both lines: on each falling edge of ps2_clk one bit
// of an 11-bit frame is valid on ps2_dat - a start bit (0), eight data bits
// least significant first, an odd parity bit and a stop bit (1). Both lines
// pass through two synchronising flip-flops into the system clock domain; a
// falling edge of the synchronised clock shifts in one bit. After the
// eleventh bit the frame is checked: a good frame raises valid for one
// clock with the byte on code, a bad one raises err instead. If the clock
// line stays quiet for TIMEOUT system clocks in the middle of a frame the
// partial frame is dropped, so the receiver always re-aligns to frame starts.
// Receive only: the host never sends commands to the keyboard.
// That a controller receives the keyboard's codes comes from the computer's
// description; the frame check and time-out are this design's choices.
module ps2_rx #(
  parameter int unsigned TIMEOUT = 50000   // 1 ms at 50 MHz
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       ps2_clk,
  input  logic       ps2_dat,
  output logic [7:0] code,
  output logic       valid,
  output logic       err
);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [2:0]    clk_sync;
  logic [1:0]    dat_sync;
  logic          fall;
  logic [10:0]   shreg;     // frame, bit 0 = start bit once complete
  logic [3:0]    nbits;
  logic [TW-1:0] idle;

  assign fall = clk_sync[2] && !clk_sync[1];

  always_ff @(posedge clk) begin
    if (reset) begin
      clk_sync <= '1;
      dat_sync <= '1;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk};
      dat_sync <= {dat_sync[0], ps2_dat};
    end
  end

  always_ff @(posedge clk) begin
    valid <= 1'b0;
    err   <= 1'b0;
    if (reset) begin
      shreg <= '0;
      nbits <= '0;
      idle  <= '0;
      code  <= '0;
    end else if (fall) begin
      idle  <= '0;
      shreg <= {dat_sync[1], shreg[10:1]};
      if (nbits == 4'd10) begin
        nbits <= '0;
        // complete frame: {stop, parity, data[7:0], start}
        if (!shreg[1] && dat_sync[1] && ^{shreg[10:2]}) begin
          code  <= shreg[9:2];
          valid <= 1'b1;
        end else begin
          err <= 1'b1;
        end
      end else begin
        nbits <= nbits + 1'b1;
      end
    end else if (nbits != 0) begin
      if (idle == TW'(TIMEOUT)) begin
        nbits <= '0;
        idle  <= '0;
      end else begin
        idle <= idle + 1'b1;
      end
    end
  end

  // a frame ends either good or bad, never both
  assert property (@(posedge clk) !(valid && err)) else $error("ps2_rx: valid and err together");
endmodule
