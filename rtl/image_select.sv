// image_select: board logic that chooses the configuration PROM and starts
// a reconfiguration of the FPGA.
//
// prog_req = RST or RELOAD drives the reset IC that holds the FPGA's PROG
// line. A transparent D latch picks the PROM: its enable is LE from the FPGA
// or RST, its input is the FPGA's SEL (pulled low on the board) forced low
// while RST is high. Q = 0 selects PROM 0 (the stable image), Q = 1 selects
// PROM 1 (the uploaded image). The sequence is: SEL high, then an LE pulse
// latches PROM 1; a later RELOAD makes the FPGA load from PROM 1; RST always
// returns to PROM 0. This mirrors the board schematic, including its
// level-sensitive latch, which is why a latch is inferred here on purpose.
module image_select (
  input  logic rst,       // board reset / power cycle
  input  logic reload,    // RELOAD from the FPGA
  input  logic le,        // LE from the FPGA
  input  logic sel,       // SEL from the FPGA
  output logic prog_req,  // to the reset IC
  output logic prom_sel   // latch Q: 0 = PROM 0, 1 = PROM 1
);
  logic d, g;
  assign prog_req = rst | reload;
  assign g        = le | rst;
  assign d        = sel & ~rst;

  always_latch
    if (g) prom_sel = d;
endmodule
