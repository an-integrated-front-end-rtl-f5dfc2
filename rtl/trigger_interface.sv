// trigger_interface: serialises the ELEFANT trigger bytes onto the 1-bit
// 60 MHz link to the trigger I/O module.
//
// Between frames the trigger bytes of all NCHIPS chips are OR-accumulated,
// so a hit seen in any sample is reported once. Every PERIOD clocks the
// accumulated bytes are loaded into a shift register and sent, one bit per
// clock (60 MHz): a start bit '1', then chip 0's byte, chip 1's byte, ...
// each most significant bit first; the line idles at '0'. PERIOD must be at
// least 1 + 8*NCHIPS. Multiplexing the chips' trigger data onto a 1-bit
// 60 MHz link follows the readout design; the frame format, the OR
// accumulation and PERIOD are this design's choices.
module trigger_interface #(
  parameter int NCHIPS = 6,
  parameter int PERIOD = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NCHIPS-1:0][7:0] trig_bytes_i,
  output logic                   link_o,
  output logic                   frame_o      // pulses when a frame starts
);
  localparam int FLEN = 1 + 8 * NCHIPS;
  localparam int PW   = $clog2(PERIOD);

  logic [NCHIPS-1:0][7:0] acc;
  logic [FLEN-1:0]        sr;
  logic [PW-1:0]          cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc <= '0; sr <= '0; cnt <= '0; link_o <= 1'b0; frame_o <= 1'b0;
    end else begin
      frame_o <= 1'b0;
      link_o  <= sr[FLEN-1];
      sr      <= sr << 1;
      if (cnt == PW'(PERIOD - 1)) begin
        cnt     <= '0;
        sr      <= {1'b1, acc | trig_bytes_i};
        acc     <= '0;
        frame_o <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        acc <= acc | trig_bytes_i;
      end
    end

  initial assert (PERIOD >= FLEN) else $error("PERIOD too short for the frame");
endmodule
