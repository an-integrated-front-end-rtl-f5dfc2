// config_check: single-event-upset check of the FPGA configuration.
//
// Two bit streams arrive together under bit_valid: the configuration read
// back from the FPGA's configuration memory (rb_bit) and the original
// configuration from the PROM (prom_bit). Every FRAME_BITS bits form one
// frame. Within a frame the streams are compared bit for bit and each is
// run through a CRC-16-CCITT (x^16+x^12+x^5+1, preset 0xFFFF). At the end
// of the frame a difference in either test counts one upset: seu_count
// (readable) increments and seu_flag, the status bit carried in the event
// data, is set until seu_clr. frames counts checked frames. The read-back
// sequencing that produces the two streams is outside this block. The bit
// comparison, CRC check, counter and status bit follow the readout design;
// the CRC polynomial and the framing are this design's choices.
module config_check #(
  parameter int FRAME_BITS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_valid,
  input  logic        rb_bit,
  input  logic        prom_bit,
  input  logic        seu_clr,
  output logic [15:0] seu_count,
  output logic [15:0] frames,
  output logic        seu_flag,
  output logic        bit_mismatch,   // a frame had differing bits
  output logic        crc_mismatch    // a frame had differing CRCs
);
  localparam int FW = $clog2(FRAME_BITS);

  function automatic logic [15:0] crc_step(logic [15:0] c, logic b);
    logic fb;
    fb = c[15] ^ b;
    return {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
  endfunction

  logic [FW-1:0] pos;
  logic [15:0]   crc_rb, crc_pr;
  logic          diff;

  logic [15:0] n_rb, n_pr;
  logic        n_diff, last;
  assign n_rb   = crc_step(crc_rb, rb_bit);
  assign n_pr   = crc_step(crc_pr, prom_bit);
  assign n_diff = diff | (rb_bit ^ prom_bit);
  assign last   = bit_valid && (pos == FW'(FRAME_BITS - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pos <= '0; crc_rb <= 16'hFFFF; crc_pr <= 16'hFFFF; diff <= 1'b0;
      seu_count <= '0; frames <= '0; seu_flag <= 1'b0;
      bit_mismatch <= 1'b0; crc_mismatch <= 1'b0;
    end else begin
      if (seu_clr) begin
        seu_count <= '0;
        seu_flag  <= 1'b0;
      end
      if (bit_valid) begin
        if (last) begin
          pos    <= '0;
          crc_rb <= 16'hFFFF;
          crc_pr <= 16'hFFFF;
          diff   <= 1'b0;
          frames <= frames + 1'b1;
          bit_mismatch <= n_diff;
          crc_mismatch <= (n_rb != n_pr);
          if (n_diff || n_rb != n_pr) begin
            seu_count <= seu_count + 1'b1;
            seu_flag  <= 1'b1;
          end
        end else begin
          pos    <= pos + 1'b1;
          crc_rb <= n_rb;
          crc_pr <= n_pr;
          diff   <= n_diff;
        end
      end
    end
endmodule
