// elefant_chip: digital back end of the 8-channel ELEFANT digitizer.
//
// Every sample strobe (15 MHz) each channel's byte is chosen by the input
// multiplexer: the TDC word when the discriminator fired, else the FADC byte.
// The eight bytes are written as one row of the circular latency buffer
// LB_SRAM (LB_DEPTH rows, 12 us at 15 MHz). A trigger copies the NSAMP rows
// that start LATENCY samples back into a free RO_SRAM event buffer (one row
// per clock) and stores a 24-bit SRAM2 word {hit mask, ancillary data}; the
// hit mask marks the enabled channels that had a TDC word in the window.
// rd_start_i reads the oldest stored event out through the output data
// select, one byte per bus strobe with dv_o high for one clock: the three
// SRAM2 bytes {hit mask, anc[15:8], anc[7:0]}, then channel 0 samples 0..31,
// channel 1, ... channel 7. dout_o is zero when dv_o is low so several chips
// can share one bus through an OR. trig_byte_o gives, each sample, the
// channels whose sample is a TDC word.
//
// Follows the chip's block diagram: FADC/TDC mux, LB_SRAM, four RO_SRAM event
// buffers, SRAM2 with 24-bit ancillary words, output select A-D and the
// trigger byte taken from the mux output. This design's own choices: the
// sample encoding (bit 7 = TDC word, fine time in bits 6:0, FADC clipped to
// 0..127), the trigger latency, the byte order on the bus, the rd_start/dv
// handshake, and dropping a trigger (overflow_o) when all buffers are full or
// a copy is still running. trig_ready_o tells the readout board whether a
// trigger would be stored, so it can keep all chips of a system in step.
module elefant_chip
  import dch_pkg::*;
#(
  parameter int NCH_P    = NCH,
  parameter int NSAMP_P  = NSAMP,
  parameter int LB_DEPTH = 180,
  parameter int NEVBUF_P = NEVBUF,
  parameter int LATENCY  = 160
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 samp_en,
  input  logic                 bus_en,
  input  logic [NCH_P-1:0][7:0] fadc_i,
  input  logic [NCH_P-1:0]      tdc_hit_i,
  input  logic [NCH_P-1:0][6:0] tdc_i,
  input  logic                 trig_i,
  input  logic [15:0]          anc_i,
  input  logic [7:0]           ch_en_i,
  output logic [NCH_P-1:0]     trig_byte_o,
  output logic                 ev_pending_o,
  input  logic                 rd_start_i,
  output logic [7:0]           dout_o,
  output logic                 dv_o,
  output logic                 overflow_o,
  output logic                 trig_ready_o   // a trigger now would be stored
);
  localparam int LBW  = $clog2(LB_DEPTH);
  localparam int SW   = $clog2(NSAMP_P);
  localparam int BW   = (NEVBUF_P > 1) ? $clog2(NEVBUF_P) : 1;
  localparam int NBYTES = 3 + NCH_P * NSAMP_P;
  localparam int IW   = $clog2(NBYTES + 1);

  // ---------------- input mux and latency buffer ----------------
  logic [NCH_P-1:0][7:0] mux_row;
  always_comb begin
    for (int c = 0; c < NCH_P; c++)
      mux_row[c] = tdc_hit_i[c] ? {1'b1, tdc_i[c]}
                                : ((fadc_i[c] > 8'(FADC_MAX)) ? 8'(FADC_MAX) : fadc_i[c]);
  end

  logic [NCH_P*8-1:0] lb_sram [LB_DEPTH];
  logic [LBW-1:0]     lb_wr;

  always_ff @(posedge clk) if (samp_en) lb_sram[lb_wr] <= mux_row;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      lb_wr       <= '0;
      trig_byte_o <= '0;
    end else if (samp_en) begin
      lb_wr       <= (lb_wr == LBW'(LB_DEPTH - 1)) ? '0 : lb_wr + 1'b1;
      trig_byte_o <= tdc_hit_i;
    end

  // ---------------- trigger copy into RO_SRAM ----------------
  logic [NCH_P*8-1:0] ro_sram [NEVBUF_P * NSAMP_P];
  logic [23:0]        sram2   [NEVBUF_P];

  logic           copying;
  logic [LBW-1:0] cp_rd;
  logic [SW-1:0]  cp_idx;
  logic [BW-1:0]  wbuf, rbuf;
  logic [BW:0]    count;
  logic [NCH_P-1:0] hitacc;
  logic [15:0]    anc_q;
  logic           copy_done, read_done;

  logic [NCH_P*8-1:0] lb_q;
  assign lb_q = lb_sram[cp_rd];

  logic [NCH_P-1:0] row_hits;
  always_comb
    for (int c = 0; c < NCH_P; c++) row_hits[c] = lb_q[c*8+7];

  // window start: LATENCY samples behind the write pointer
  function automatic logic [LBW-1:0] lb_back(logic [LBW-1:0] p);
    int v;
    v = int'(p) - LATENCY;
    if (v < 0) v += LB_DEPTH;
    return LBW'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (copying) ro_sram[int'(wbuf) * NSAMP_P + int'(cp_idx)] <= lb_q;
    if (copy_done) sram2[wbuf] <= {(hitacc | row_hits) & ch_en_i[NCH_P-1:0], anc_q};
  end

  assign copy_done    = copying && (cp_idx == SW'(NSAMP_P - 1));
  assign trig_ready_o = !copying && count < (BW+1)'(NEVBUF_P);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      copying    <= 1'b0;
      cp_rd      <= '0;
      cp_idx     <= '0;
      wbuf       <= '0;
      hitacc     <= '0;
      anc_q      <= '0;
      overflow_o <= 1'b0;
    end else begin
      overflow_o <= 1'b0;
      if (trig_i) begin
        if (trig_ready_o) begin
          copying <= 1'b1;
          cp_rd   <= lb_back(lb_wr);
          cp_idx  <= '0;
          hitacc  <= '0;
          anc_q   <= anc_i;
        end else begin
          overflow_o <= 1'b1;
        end
      end
      if (copying) begin
        cp_rd  <= (cp_rd == LBW'(LB_DEPTH - 1)) ? '0 : cp_rd + 1'b1;
        cp_idx <= cp_idx + 1'b1;
        hitacc <= hitacc | row_hits;
        if (copy_done) begin
          copying <= 1'b0;
          wbuf    <= (wbuf == BW'(NEVBUF_P - 1)) ? '0 : wbuf + 1'b1;
        end
      end
    end

  // ---------------- readout through the output data select ----------------
  logic          reading;
  logic [IW-1:0] ridx;
  logic [7:0]    sel_byte;
  logic [23:0]   s2_q;
  int            d_ofs;

  assign s2_q  = sram2[rbuf];
  always_comb begin
    d_ofs = int'(ridx) - 3;
    if (d_ofs < 0) d_ofs = 0;
    unique case (ridx)
      IW'(0):  sel_byte = s2_q[23:16];               // B
      IW'(1):  sel_byte = s2_q[15:8];                // C
      IW'(2):  sel_byte = s2_q[7:0];                 // D
      default: sel_byte = ro_sram[int'(rbuf) * NSAMP_P + d_ofs % NSAMP_P]
                                [(d_ofs / NSAMP_P) * 8 +: 8];  // A
    endcase
  end

  assign read_done    = reading && bus_en && (ridx == IW'(NBYTES - 1));
  assign ev_pending_o = (count != '0) && !reading;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      reading <= 1'b0;
      ridx    <= '0;
      rbuf    <= '0;
      dout_o  <= '0;
      dv_o    <= 1'b0;
    end else begin
      dv_o   <= 1'b0;
      dout_o <= '0;
      if (rd_start_i && !reading && count != '0) begin
        reading <= 1'b1;
        ridx    <= '0;
      end else if (reading && bus_en) begin
        dv_o   <= 1'b1;
        dout_o <= sel_byte;
        ridx   <= ridx + 1'b1;
        if (read_done) begin
          reading <= 1'b0;
          rbuf    <= (rbuf == BW'(NEVBUF_P - 1)) ? '0 : rbuf + 1'b1;
        end
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) count <= '0;
    else count <= count + (BW+1)'(copy_done) - (BW+1)'(read_done);

  // a read never starts on an empty buffer set
  assert property (@(posedge clk) disable iff (!rst_n) count <= (BW+1)'(NEVBUF_P));

endmodule
