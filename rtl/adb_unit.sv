// adb_unit: the per-ADB part of the ROIB readout (one "ADB buffer" of the
// feature-extraction firmware).
//
// The ADB readout controller fetches events from the board's ELEFANT chips;
// each sample byte goes both to the feature-extraction engine, whose words
// fill the FEX RAM, and to the waveform path, which packs the bytes (or, in
// half-sampling mode, the kept half of them) into 16-bit words for the
// Waveform RAM. Chip headers go to the Chip Header RAM. The buffer's read
// side is brought out for the data multiplexer. const_ch names the channel
// (within the ADB: {chip, channel}) whose constants ped/gain are presented.
// The mode is sampled per byte; change it only between events.
module adb_unit
  import dch_pkg::*;
#(
  parameter int NCHIP   = 2,
  parameter int NSLOT   = 4,
  parameter int NSAMP_P = NSAMP,
  localparam int CW     = $clog2(NCHIP > 1 ? NCHIP : 2),
  localparam int FEXW   = NCH * (2 + NSAMP_P),
  localparam int WFW    = NCH * NSAMP_P / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  rd_mode_e         mode,
  // ELEFANT bus
  input  logic [NCHIP-1:0] ev_pending_i,
  output logic [NCHIP-1:0] rd_start_o,
  input  logic [7:0]       din_i,
  input  logic             dv_i,
  // constants
  output logic [CW+2:0]    const_ch,
  input  logic [7:0]       ped,
  input  logic [15:0]      gain,
  input  logic [7:0]       drift,
  input  logic [7:0]       sat_corr,
  // buffer read side
  output logic             rd_avail,
  input  logic [CW-1:0]    rd_chip,
  input  logic [1:0]       rd_sel,
  input  logic [8:0]       rd_addr,
  output logic [15:0]      rd_data,
  output logic [$clog2(FEXW+1)-1:0] fex_cnt,
  output logic [$clog2(WFW+1)-1:0]  wf_cnt,
  input  logic             release_slot,
  output logic             overrun,
  output logic             stalled     // an event waits for a free slot
);
  logic          slot_free, fex_idle;
  logic [CW-1:0] chip;
  logic          hdr_we, hdr_idx, s_valid, s_first, ch_first, chip_done, commit, busy;
  logic [15:0]   hdr_wd;
  logic [7:0]    s_data;
  logic [2:0]    fch;
  logic          fex_we, wf_we, hs_valid, wa_valid;
  logic [15:0]   fex_wd, wf_wd;
  logic [7:0]    hs_data, wa_data;
  logic          wa_first;

  adb_readout_ctrl #(.NCHIP(NCHIP), .NSAMP_P(NSAMP_P)) u_ctrl (
    .clk, .rst_n, .ev_pending_i, .rd_start_o, .din_i, .dv_i,
    .slot_free_i(slot_free), .fex_idle_i(fex_idle), .chip_o(chip),
    .hdr_we, .hdr_idx, .hdr_wd, .s_valid, .s_first, .ch_first, .s_data,
    .chip_done, .commit, .busy);

  fex_engine #(.NSAMP_P(NSAMP_P)) u_fex (
    .clk, .rst_n, .s_valid, .s_first, .s_data, .const_ch(fch),
    .ped, .gain, .drift, .sat_corr, .wr_en(fex_we), .wr_data(fex_wd),
    .idle(fex_idle), .overrun);

  assign const_ch = {chip, fch};

  half_sampler u_half (
    .clk, .rst_n, .in_valid(s_valid), .first(ch_first), .in_data(s_data),
    .out_valid(hs_valid), .out_data(hs_data));

  // waveform path: full waveform, or the half-sampled one (one clock later)
  always_comb begin
    if (mode == MODE_HALF) begin
      wa_valid = hs_valid;
      wa_data  = hs_data;
      wa_first = 1'b0;   // pairs of kept samples never straddle a channel
    end else begin
      wa_valid = s_valid;
      wa_data  = s_data;
      wa_first = ch_first;
    end
  end

  waveform_assembler u_wa (
    .clk, .rst_n, .in_valid(wa_valid), .first(wa_first), .in_data(wa_data),
    .wr_en(wf_we), .wr_data(wf_wd));

  adb_buffer #(.NCHIP(NCHIP), .NSLOT(NSLOT), .FEXW(FEXW), .WFW(WFW)) u_buf (
    .clk, .rst_n, .slot_free, .wr_chip(chip),
    .fex_we, .fex_wd, .wf_we, .wf_wd, .hdr_we, .hdr_idx, .hdr_wd,
    .chip_done, .commit, .rd_avail, .rd_chip, .rd_sel, .rd_addr, .rd_data,
    .fex_cnt, .wf_cnt, .release_slot);

  assign stalled = !busy && !slot_free && ev_pending_i[0];
endmodule
