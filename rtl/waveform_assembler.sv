// waveform_assembler: packs waveform bytes into 16-bit words Wf[15:0].
//
// Two consecutive bytes form one word, the first in bits 15:8 (byte order is
// this design's choice). `first` restarts the pairing at the start of a
// channel. wr_en pulses one clock after the second byte of a pair arrives.
module waveform_assembler (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        first,
  input  logic [7:0]  in_data,
  output logic        wr_en,
  output logic [15:0] wr_data
);
  logic       odd;
  logic [7:0] hi;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      odd     <= 1'b0;
      hi      <= '0;
      wr_en   <= 1'b0;
      wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (in_valid) begin
        if (first || !odd) begin
          hi  <= in_data;
          odd <= 1'b1;
        end else begin
          odd     <= 1'b0;
          wr_en   <= 1'b1;
          wr_data <= {hi, in_data};
        end
      end
    end
endmodule
