// half_sampler: halves a waveform by keeping one sample of each pair.
//
// Samples of one channel arrive one per in_valid; `first` marks sample 0 and
// restarts the pairing. For each pair (2k, 2k+1) the TDC word is kept if the
// pair holds one, otherwise the second FADC byte; 32 bytes become 16. If both
// samples of a pair are TDC words the first is kept (this design's choice).
// out_valid pulses one clock after the second sample of a pair arrives.
module half_sampler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       first,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data
);
  logic       odd;     // next sample is the second of its pair
  logic [7:0] held;    // first sample of the current pair

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      odd       <= 1'b0;
      held      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (first || !odd) begin
          held <= in_data;
          odd  <= 1'b1;
        end else begin
          odd       <= 1'b0;
          out_valid <= 1'b1;
          out_data  <= held[7] ? held : in_data;  // TDC word wins, else 2nd
        end
      end
    end
endmodule
