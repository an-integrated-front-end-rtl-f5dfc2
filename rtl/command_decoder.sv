// command_decoder: decodes Fast Control commands for the readout FPGA.
//
// A command is {cmd_op, cmd_addr, cmd_data} under cmd_valid (opcodes in
// dch_pkg::cmd_op_e). It turns commands into register settings (readout
// mode, encoder on/off, the global FEX corrections drift and saturation,
// the hit-marking channel enable), one-clock write strobes for the FEX
// constants, the encoding table and the PROM-programmer chunk RAM, a start
// pulse for the programmer, a level-1 trigger pulse, the image-switch
// controls and read-backs. CMD_IMG_SEL sets SEL from data[0] and one clock
// later raises LE for LE_CYCLES clocks, so SEL is stable before LE.
// CMD_RELOAD raises RELOAD, which stays high (the FPGA is reconfigured).
// Reads (CMD_CONST_RD, CMD_STATUS_RD, CMD_ENC_WR with addr[15]=1 reads the
// table) answer on rd_valid/rd_data two clocks later, after the addressed
// RAM's registered read. The list of command kinds follows the readout
// design; the command encoding is this design's own.
module command_decoder
  import dch_pkg::*;
#(
  parameter int LE_CYCLES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  cmd_op_e     cmd_op,
  input  logic [15:0] cmd_addr,
  input  logic [23:0] cmd_data,
  // settings
  output rd_mode_e    mode,
  output logic        enc_en,
  output logic [7:0]  drift,
  output logic [7:0]  sat_corr,
  output logic [7:0]  ch_en,
  // strobes
  output logic        l1_trig,
  output logic        const_we,
  output logic        tbl_we,
  output logic        chunk_we,
  output logic        prog_start,
  output logic        seu_clr,
  output logic [15:0] addr_o,
  output logic [23:0] data_o,
  // image switch
  output logic        sel,
  output logic        le,
  output logic        reload,
  // read-back
  input  logic [23:0] const_rd,
  input  logic [19:0] tbl_rd,
  input  logic [23:0] status_rd,
  output logic        rd_valid,
  output logic [23:0] rd_data
);
  localparam int LW = $clog2(LE_CYCLES + 1);
  logic [LW-1:0] le_cnt;
  logic          le_arm;
  logic [1:0]    rd_pipe;
  logic [1:0]    rd_kind, rd_kind_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mode <= MODE_FEX; enc_en <= 1'b0; drift <= '0; sat_corr <= '0; ch_en <= 8'hFF;
      l1_trig <= 1'b0; const_we <= 1'b0; tbl_we <= 1'b0; chunk_we <= 1'b0;
      prog_start <= 1'b0; seu_clr <= 1'b0; addr_o <= '0; data_o <= '0;
      sel <= 1'b0; le_cnt <= '0; le_arm <= 1'b0; reload <= 1'b0;
      rd_pipe <= '0; rd_kind <= '0; rd_kind_q <= '0; rd_valid <= 1'b0; rd_data <= '0;
    end else begin
      l1_trig <= 1'b0; const_we <= 1'b0; tbl_we <= 1'b0; chunk_we <= 1'b0;
      prog_start <= 1'b0; seu_clr <= 1'b0;
      rd_pipe   <= {rd_pipe[0], 1'b0};
      rd_kind_q <= rd_kind;
      rd_valid  <= rd_pipe[1];
      if (rd_pipe[1])
        unique case (rd_kind_q)
          2'd0:    rd_data <= const_rd;
          2'd1:    rd_data <= 24'(tbl_rd);
          default: rd_data <= status_rd;
        endcase
      le_arm <= 1'b0;
      if (le_arm) le_cnt <= LW'(LE_CYCLES);
      else if (le_cnt != '0) le_cnt <= le_cnt - 1'b1;
      if (cmd_valid) begin
        addr_o <= cmd_addr;
        data_o <= cmd_data;
        unique case (cmd_op)
          CMD_L1:         l1_trig <= 1'b1;
          CMD_MODE: begin
            mode   <= rd_mode_e'(cmd_data[1:0]);
            enc_en <= cmd_data[2];
          end
          CMD_GLOBAL: begin
            drift    <= cmd_data[7:0];
            sat_corr <= cmd_data[15:8];
          end
          CMD_CONST_WR:   const_we <= 1'b1;
          CMD_CONST_RD:   begin rd_pipe[0] <= 1'b1; rd_kind <= 2'd0; end
          CMD_ENC_WR:
            if (cmd_addr[15]) begin rd_pipe[0] <= 1'b1; rd_kind <= 2'd1; end
            else tbl_we <= 1'b1;
          CMD_CHUNK_WR:   chunk_we <= 1'b1;
          CMD_PROG_START: prog_start <= 1'b1;
          CMD_STATUS_RD:  begin rd_pipe[0] <= 1'b1; rd_kind <= 2'd2; end
          CMD_IMG_SEL: begin
            sel    <= cmd_data[0];
            le_arm <= 1'b1;
          end
          CMD_RELOAD:     reload <= 1'b1;
          CMD_CHEN:       ch_en <= cmd_data[7:0];
          CMD_SEU_CLR:    seu_clr <= 1'b1;
          default: ;
        endcase
      end
    end

  assign le = (le_cnt != '0);
endmodule
