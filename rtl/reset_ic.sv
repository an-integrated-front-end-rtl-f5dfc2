// reset_ic: reset supervisor that stretches the FPGA's PROG pulse.
//
// While trig is high, and for HOLD_CYCLES clocks of its oscillator after
// trig falls, prog_n (the FPGA's active-low PROG) is held low; a new trig
// restarts the hold. The default, 6,000,000 cycles of a 60 MHz clock, is the
// 100 ms minimum hold of the part on the board. The supervisor is a bought
// part; this clocked counter is the simplest logic with its behaviour.
module reset_ic #(
  parameter int HOLD_CYCLES = 6_000_000
) (
  input  logic clk,
  input  logic trig,
  output logic prog_n
);
  localparam int HW = $clog2(HOLD_CYCLES + 1);
  logic [HW-1:0] cnt = HW'(HOLD_CYCLES);  // power-up holds PROG too

  always_ff @(posedge clk)
    if (trig)             cnt <= HW'(HOLD_CYCLES);
    else if (cnt != '0)   cnt <= cnt - 1'b1;

  assign prog_n = !(trig || cnt != '0);
endmodule
