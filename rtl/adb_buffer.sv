// adb_buffer: block-RAM event buffer of one ADB (amplifier/digitizer board).
//
// Holds NSLOT events, the depth of the ELEFANT readout buffers, so the ADB
// readout controller can fetch the next triggered event as soon as the
// previous one is stored, without waiting for the output multiplexer. Each
// slot has, per chip, a FEX RAM region (feature-extraction words), a
// Waveform RAM region (16-bit waveform words) and two Chip Header RAM words
// {ancillary[15:0]} and {hit mask[7:0], 8'h00}.
// Write side (readout controller, FEX engine, waveform assembler): words are
// appended to the current chip's regions of the write slot; chip_done stores
// the chip's word counts and moves on to the next chip; commit closes the
// slot. slot_free tells whether a slot is available for writing.
// Read side (data multiplexer): rd_avail while a committed slot exists;
// rd_chip/rd_sel/rd_addr address a word (rd_sel 0 header, 1 FEX, 2
// waveform), returned on rd_data one clock later; fex_cnt/wf_cnt give the
// chip's counts; release frees the read slot.
// The slot organisation and the interface are this design's own.
module adb_buffer #(
  parameter int NCHIP  = 2,
  parameter int NSLOT  = 4,
  parameter int FEXW   = 272,   // 8 channels x (status + charge + 32 TDC words)
  parameter int WFW    = 128,   // 8 channels x 32 samples / 2
  localparam int CW    = $clog2(NCHIP > 1 ? NCHIP : 2),
  localparam int SLW   = $clog2(NSLOT > 1 ? NSLOT : 2),
  localparam int FAW   = $clog2(FEXW + 1),
  localparam int WAW   = $clog2(WFW + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // write side
  output logic           slot_free,
  input  logic [CW-1:0]  wr_chip,
  input  logic           fex_we,
  input  logic [15:0]    fex_wd,
  input  logic           wf_we,
  input  logic [15:0]    wf_wd,
  input  logic           hdr_we,
  input  logic           hdr_idx,
  input  logic [15:0]    hdr_wd,
  input  logic           chip_done,
  input  logic           commit,
  // read side
  output logic           rd_avail,
  input  logic [CW-1:0]  rd_chip,
  input  logic [1:0]     rd_sel,
  input  logic [8:0]     rd_addr,
  output logic [15:0]    rd_data,
  output logic [FAW-1:0] fex_cnt,
  output logic [WAW-1:0] wf_cnt,
  input  logic           release_slot
);
  logic [15:0] fex_ram [NSLOT * NCHIP * FEXW];
  logic [15:0] wf_ram  [NSLOT * NCHIP * WFW];
  logic [15:0] hdr_ram [NSLOT * NCHIP * 2];
  logic [FAW-1:0] fex_cnt_q [NSLOT * NCHIP];
  logic [WAW-1:0] wf_cnt_q  [NSLOT * NCHIP];

  logic [SLW-1:0] wslot, rslot;
  logic [SLW:0]   used;
  logic [FAW-1:0] fptr;
  logic [WAW-1:0] wptr;

  int wbase, rbase;
  assign wbase = int'(wslot) * NCHIP + int'(wr_chip);
  assign rbase = int'(rslot) * NCHIP + int'(rd_chip);

  always_ff @(posedge clk) begin
    if (fex_we && int'(fptr) < FEXW) fex_ram[wbase * FEXW + int'(fptr)] <= fex_wd;
    if (wf_we && int'(wptr) < WFW)   wf_ram[wbase * WFW + int'(wptr)]   <= wf_wd;
    if (hdr_we)                      hdr_ram[wbase * 2 + int'(hdr_idx)] <= hdr_wd;
    if (chip_done) begin
      fex_cnt_q[wbase] <= fptr;
      wf_cnt_q[wbase]  <= wptr;
    end
    unique case (rd_sel)
      2'd0:    rd_data <= hdr_ram[rbase * 2 + int'(rd_addr[0])];
      2'd1:    rd_data <= (int'(rd_addr) < FEXW) ? fex_ram[rbase * FEXW + int'(rd_addr)] : '0;
      default: rd_data <= (int'(rd_addr) < WFW)  ? wf_ram[rbase * WFW + int'(rd_addr)]   : '0;
    endcase
  end

  assign fex_cnt   = fex_cnt_q[rbase];
  assign wf_cnt    = wf_cnt_q[rbase];
  assign slot_free = used < (SLW+1)'(NSLOT);
  assign rd_avail  = used != '0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wslot <= '0; rslot <= '0; used <= '0; fptr <= '0; wptr <= '0;
    end else begin
      if (fex_we && int'(fptr) < FEXW) fptr <= fptr + 1'b1;
      if (wf_we && int'(wptr) < WFW)   wptr <= wptr + 1'b1;
      if (chip_done) begin
        fptr <= '0;
        wptr <= '0;
      end
      if (commit)
        wslot <= (wslot == SLW'(NSLOT - 1)) ? '0 : wslot + 1'b1;
      if (release_slot && rd_avail)
        rslot <= (rslot == SLW'(NSLOT - 1)) ? '0 : rslot + 1'b1;
      used <= used + (SLW+1)'(commit) - (SLW+1)'(release_slot && rd_avail);
    end

  assert property (@(posedge clk) disable iff (!rst_n) commit |-> slot_free);
endmodule
