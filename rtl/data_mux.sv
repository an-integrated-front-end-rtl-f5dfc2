// data_mux: output data multiplexer (the master readout controller).
//
// Drains the NADB ADB buffers one ELEFANT chip at a time, switching to the
// next ADB with data (round robin) after every chip, so a slow board does
// not hold the others up. For each chip it sends four header words
//   H0 = {4'hC, seu_flag, mode[1:0], adb[1:0], chip[1:0], 5'b0}
//   H1 = ancillary data, H2 = {hit mask, 8'h00}, H3 = number of body words
// followed by the body: the FEX words in MODE_FEX, else the waveform words.
// After the last chip of an event the ADB's slot is released. When no buffer
// holds data a padding word (pad_o high) is offered so the output link never
// stalls. Words leave through a valid/ready handshake; buffer reads take one
// clock after the address. Round-robin order and the header layout are this design's choices;
// switching after each chip and padding on underrun follow the readout
// design, as does the configuration-check status bit in the data.
module data_mux
  import dch_pkg::*;
#(
  parameter int NADB  = 3,
  parameter int NCHIP = 2,
  parameter int FAW   = 9,
  parameter int WAW   = 8,
  localparam int AW   = $clog2(NADB > 1 ? NADB : 2),
  localparam int CW   = $clog2(NCHIP > 1 ? NCHIP : 2)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  rd_mode_e                  mode,
  input  logic                      seu_flag,
  input  logic [NADB-1:0]           rd_avail,
  output logic [CW-1:0]             rd_chip,
  output logic [1:0]                rd_sel,
  output logic [8:0]                rd_addr,
  input  logic [NADB-1:0][15:0]     rd_data,
  input  logic [NADB-1:0][FAW-1:0]  fex_cnt,
  input  logic [NADB-1:0][WAW-1:0]  wf_cnt,
  output logic [NADB-1:0]           release_slot,
  output logic [15:0]               word_o,
  output logic                      pad_o,
  output logic                      word_valid_o,
  input  logic                      word_ready_i,
  output logic                      chip_switch_o   // pulses after each chip
);
  typedef enum logic [2:0] {M_PICK, M_ADDR, M_WAIT, M_DATA, M_OUT, M_REL} mst_e;
  mst_e          st;
  logic [AW-1:0] cur, last;
  logic [NADB-1:0][CW-1:0] chipptr;
  logic [9:0]    j;        // word index within the chip block
  logic [9:0]    nbody;
  rd_mode_e      cmode;

  // round-robin choice of the next ADB with data
  logic          found;
  logic [AW-1:0] pick;
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int n = 1; n <= NADB; n++) begin
      int a;
      a = (int'(last) + n) % NADB;
      if (!found && rd_avail[a]) begin
        found = 1'b1;
        pick  = AW'(a);
      end
    end
  end

  assign rd_chip = chipptr[cur];

  logic xfer;
  assign xfer = word_valid_o && word_ready_i;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= M_PICK; cur <= '0; last <= AW'(NADB - 1); chipptr <= '0; j <= '0;
      nbody <= '0; cmode <= MODE_FEX; rd_sel <= '0; rd_addr <= '0;
      release_slot <= '0; word_o <= '0; pad_o <= 1'b0; word_valid_o <= 1'b0;
      chip_switch_o <= 1'b0;
    end else begin
      release_slot  <= '0;
      chip_switch_o <= 1'b0;
      unique case (st)
        M_PICK: begin
          if (xfer) word_valid_o <= 1'b0;
          if (found && (!word_valid_o || xfer)) begin
            word_valid_o <= 1'b0;
            cur   <= pick;
            cmode <= mode;
            j     <= '0;
            st    <= M_ADDR;
          end else if (!found && (!word_valid_o || xfer)) begin
            word_o       <= '0;          // padding word
            pad_o        <= 1'b1;
            word_valid_o <= 1'b1;
          end
        end
        M_ADDR: begin
          nbody  <= (cmode == MODE_FEX) ? 10'(fex_cnt[cur]) : 10'(wf_cnt[cur]);
          rd_sel <= (j < 10'd4) ? 2'd0 : (cmode == MODE_FEX) ? 2'd1 : 2'd2;
          rd_addr <= (j == 10'd1) ? 9'd0 : (j == 10'd2) ? 9'd1 : 9'(j - 10'd4);
          st     <= M_WAIT;
        end
        M_WAIT: st <= M_DATA;   // buffer read: address registered, then data
        M_DATA: begin
          pad_o        <= 1'b0;
          word_valid_o <= 1'b1;
          unique case (j)
            10'd0:   word_o <= {HDR_TAG, seu_flag, cmode, 2'(cur), 2'(chipptr[cur]), 5'b0};
            10'd1,
            10'd2:   word_o <= rd_data[cur];
            10'd3:   word_o <= 16'(nbody);
            default: word_o <= rd_data[cur];
          endcase
          st <= M_OUT;
        end
        M_OUT: if (word_ready_i) begin
          word_valid_o <= 1'b0;
          if (j + 10'd1 >= nbody + 10'd4) begin
            last          <= cur;
            chip_switch_o <= 1'b1;
            if (int'(chipptr[cur]) == NCHIP - 1) begin
              chipptr[cur]      <= '0;
              release_slot[cur] <= 1'b1;
            end else chipptr[cur] <= chipptr[cur] + 1'b1;
            st <= M_REL;
          end else begin
            j  <= j + 1'b1;
            st <= M_ADDR;
          end
        end
        M_REL: st <= M_PICK;    // let a released slot's rd_avail settle
        default: st <= M_PICK;
      endcase
    end

  assert property (@(posedge clk) disable iff (!rst_n) word_valid_o && !word_ready_i |=> word_valid_o);
endmodule
