// fex_const_ram: channel-dependent feature-extraction constants.
//
// One 24-bit entry {gain[15:0], pedestal[7:0]} per channel for NADB boards of
// NCHIP chips of NCH channels, addressed as {adb, chip, channel}. The host
// loads an entry with wr_en and reads it back on rdata (registered, one clock
// later) to verify the load. Each of the NADB feature-extraction engines has
// its own combinational read port. Gain is unsigned 8.8 fixed point. The
// set of constants per channel is this design's choice; only that there are
// channel constants, loaded and verified before the engines start, is given.
module fex_const_ram #(
  parameter int NADB  = 3,
  parameter int NCHIP = 2,
  parameter int NCH   = 8,
  localparam int NENT = NADB * NCHIP * NCH,
  localparam int AW   = $clog2(NENT)
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [AW-1:0]        addr,
  input  logic [23:0]          wdata,
  output logic [23:0]          rdata,
  input  logic [NADB-1:0][AW-1:0] eng_addr,
  output logic [NADB-1:0][23:0]   eng_const
);
  logic [23:0] mem [NENT];

  always_ff @(posedge clk) begin
    if (wr_en && int'(addr) < NENT) mem[addr] <= wdata;
    rdata <= (int'(addr) < NENT) ? mem[addr] : '0;
  end

  always_comb
    for (int a = 0; a < NADB; a++)
      eng_const[a] = (int'(eng_addr[a]) < NENT) ? mem[eng_addr[a]] : '0;
endmodule
