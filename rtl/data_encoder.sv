// data_encoder: frames output words for the 2-bit, 30 MHz (60 Mb/s) link.
//
// Each accepted 16-bit word becomes one frame, sent most significant bit
// first, two bits per out_en strobe on dibit_o:
//   raw mode (enc_en = 0):  '10' + the 16 data bits              (18 bits)
//   coded mode (enc_en = 1): '11' + code(high byte) + code(low byte), plus
//                            one '0' if needed to make the length even
//   padding word:            '00'                                 (2 bits)
// Codes come from the Encoding Table RAM: 256 entries {len-1[3:0],
// code[15:0]}, the code right-aligned, loaded and read back through tbl_*.
// Loading a prefix-free (Huffman) code makes the coded frames decodable;
// the table contents are up to the host. When the bit queue runs dry the link
// also carries '00', so the receiver sees padding. A word is accepted
// (word_ready high) while the 64-bit queue has room for the longest frame.
// Byte-wise Huffman coding with a table RAM and a distinguishable padding
// pattern follow the readout design; the frame layout is this design's own.
module data_encoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enc_en,
  input  logic [15:0] word_i,
  input  logic        pad_i,
  input  logic        word_valid_i,
  output logic        word_ready_o,
  input  logic        out_en,
  output logic [1:0]  dibit_o,
  // Encoding Table RAM
  input  logic        tbl_we,
  input  logic [7:0]  tbl_addr,
  input  logic [19:0] tbl_wd,
  output logic [19:0] tbl_rd
);
  logic [19:0] table_ram [256];
  always_ff @(posedge clk) begin
    if (tbl_we) table_ram[tbl_addr] <= tbl_wd;
    tbl_rd <= table_ram[tbl_addr];
  end

  logic [63:0] q;      // queued bits, left-aligned
  logic [6:0]  qn;     // number of queued bits (always even)

  // build the frame, right-aligned in fr with length flen
  logic [19:0] th, tl;
  logic [4:0]  lh, ll;
  logic [34:0] fr;
  logic [5:0]  flen;
  always_comb begin
    th = table_ram[word_i[15:8]];
    tl = table_ram[word_i[7:0]];
    lh = 5'(th[19:16]) + 5'd1;
    ll = 5'(tl[19:16]) + 5'd1;
    if (pad_i) begin
      fr   = '0;
      flen = 6'd2;
    end else if (!enc_en) begin
      fr   = 35'({2'b10, word_i});
      flen = 6'd18;
    end else begin
      // '11' . code_hi . code_lo, then align to even length
      fr   = ((35'(2'b11) << lh) | 35'(th[15:0] & 16'((17'd1 << lh) - 1'b1)));
      fr   = (fr << ll) | 35'(tl[15:0] & 16'((17'd1 << ll) - 1'b1));
      flen = 6'd2 + 6'(lh) + 6'(ll);
      if (flen[0]) begin
        fr   = fr << 1;
        flen = flen + 6'd1;
      end
    end
  end

  assign word_ready_o = (qn <= 7'd28);

  logic        pop, push;
  logic [63:0] qa, frl;
  logic [6:0]  na;
  assign pop  = out_en && (qn != '0);
  assign push = word_valid_i && word_ready_o;
  always_comb begin
    qa  = pop ? (q << 2) : q;
    na  = pop ? (qn - 7'd2) : qn;
    frl = {fr, 29'b0} << (7'd35 - 7'(flen));   // frame left-aligned
    if (push) qa = qa | (frl >> na);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q <= '0; qn <= '0; dibit_o <= 2'b00;
    end else begin
      if (out_en) dibit_o <= (qn != '0) ? q[63:62] : 2'b00;
      q  <= qa;
      qn <= push ? na + 7'(flen) : na;
    end
endmodule
