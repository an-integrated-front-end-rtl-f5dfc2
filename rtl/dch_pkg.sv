// dch_pkg: types and constants shared by the drift-chamber front-end readout.
//
// Sample encoding on the 8-bit ELEFANT path (this design's choice): bit 7 set
// marks a TDC word whose bits 6:0 are the fine time; bit 7 clear is an FADC
// byte in 0..127. The sizes (8 channels per chip, 32 samples per event, four
// event buffers, three ADBs of two chips) follow the readout system described
// for the BABAR drift chamber; the word formats below are this design's own.
package dch_pkg;

  localparam int NCH      = 8;    // channels per ELEFANT chip
  localparam int NSAMP    = 32;   // samples per channel per trigger
  localparam int NEVBUF   = 4;    // RO_SRAM event buffers per chip
  localparam int FADC_MAX = 127;  // full-scale FADC value (saturated)

  // Readout modes of the ROIB data path.
  typedef enum logic [1:0] {
    MODE_FEX  = 2'd0,   // feature-extracted records
    MODE_RAW  = 2'd1,   // full 32-sample waveforms
    MODE_HALF = 2'd2    // half-sampled waveforms (16 samples)
  } rd_mode_e;

  // Chip header tag in the output stream.
  localparam logic [3:0] HDR_TAG = 4'hC;

  // FEX status word: {sat, ch[2:0], ntdc[5:0], lead[4:0], 1'b1}
  typedef struct packed {
    logic       sat;
    logic [2:0] ch;
    logic [5:0] ntdc;
    logic [4:0] lead;
    logic       one;
  } fex_status_t;

  // Fast Control command opcodes.
  typedef enum logic [3:0] {
    CMD_NOP        = 4'h0,
    CMD_L1         = 4'h1,  // level-1 trigger
    CMD_MODE       = 4'h2,  // data[1:0] readout mode, data[2] encoder on
    CMD_GLOBAL     = 4'h3,  // data[7:0] drift, data[15:8] saturation correction
    CMD_CONST_WR   = 4'h4,  // addr channel, data {gain, ped}
    CMD_CONST_RD   = 4'h5,  // read back (verify)
    CMD_ENC_WR     = 4'h6,  // addr byte value, data {len-1, code}
    CMD_CHUNK_WR   = 4'h7,  // addr word, data[15:0] chunk word
    CMD_PROG_START = 4'h8,  // run the loaded chunk
    CMD_STATUS_RD  = 4'h9,  // read status: programmer + SEU counter
    CMD_IMG_SEL    = 4'hA,  // data[0] SEL, pulse LE
    CMD_RELOAD     = 4'hB,  // assert RELOAD
    CMD_CHEN       = 4'hC,  // data[7:0] hit-marking channel enable
    CMD_SEU_CLR    = 4'hD   // clear SEU counter and flag
  } cmd_op_e;

  // 16 states of the IEEE 1149.1 TAP controller.
  typedef enum logic [3:0] {
    TAP_RESET      = 4'h0,
    TAP_IDLE       = 4'h1,
    TAP_SELECT_DR  = 4'h2,
    TAP_CAPTURE_DR = 4'h3,
    TAP_SHIFT_DR   = 4'h4,
    TAP_EXIT1_DR   = 4'h5,
    TAP_PAUSE_DR   = 4'h6,
    TAP_EXIT2_DR   = 4'h7,
    TAP_UPDATE_DR  = 4'h8,
    TAP_SELECT_IR  = 4'h9,
    TAP_CAPTURE_IR = 4'hA,
    TAP_SHIFT_IR   = 4'hB,
    TAP_EXIT1_IR   = 4'hC,
    TAP_PAUSE_IR   = 4'hD,
    TAP_EXIT2_IR   = 4'hE,
    TAP_UPDATE_IR  = 4'hF
  } tap_state_e;

  // SVF chunk opcodes (upper nibble of an opcode word).
  typedef enum logic [3:0] {
    SVF_END     = 4'h0,
    SVF_SIR     = 4'h1,
    SVF_SDR     = 4'h2,
    SVF_STATE   = 4'h3,
    SVF_RUNTEST = 4'h4
  } svf_op_e;

  // Next TAP state for a given TMS value (IEEE 1149.1 state diagram).
  function automatic tap_state_e tap_next(tap_state_e s, logic tms);
    unique case (s)
      TAP_RESET:      return tms ? TAP_RESET     : TAP_IDLE;
      TAP_IDLE:       return tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_DR:  return tms ? TAP_SELECT_IR : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   return tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   return tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   return tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  return tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_IR:  return tms ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   return tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   return tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   return tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      default:        return tms ? TAP_SELECT_DR : TAP_IDLE; // UPDATE_IR
    endcase
  endfunction

  function automatic logic tap_is_dr(tap_state_e s);
    return s inside {TAP_CAPTURE_DR, TAP_SHIFT_DR, TAP_EXIT1_DR, TAP_PAUSE_DR,
                     TAP_EXIT2_DR, TAP_UPDATE_DR};
  endfunction

  function automatic logic tap_is_ir(tap_state_e s);
    return s inside {TAP_CAPTURE_IR, TAP_SHIFT_IR, TAP_EXIT1_IR, TAP_PAUSE_IR,
                     TAP_EXIT2_IR, TAP_UPDATE_IR};
  endfunction

  // TMS value for one step from state s towards state t (s != t).
  function automatic logic tap_step_tms(tap_state_e s, tap_state_e t);
    if (t == TAP_RESET) return 1'b1;
    unique case (s)
      TAP_RESET:      return 1'b0;
      TAP_IDLE:       return 1'b1;
      TAP_SELECT_DR:  return !tap_is_dr(t);
      TAP_SELECT_IR:  return !tap_is_ir(t);
      TAP_CAPTURE_DR: return t != TAP_SHIFT_DR;
      TAP_CAPTURE_IR: return t != TAP_SHIFT_IR;
      TAP_SHIFT_DR, TAP_SHIFT_IR: return 1'b1;
      TAP_EXIT1_DR:   return t != TAP_PAUSE_DR;
      TAP_EXIT1_IR:   return t != TAP_PAUSE_IR;
      TAP_PAUSE_DR, TAP_PAUSE_IR: return 1'b1;
      TAP_EXIT2_DR:   return t != TAP_SHIFT_DR;
      TAP_EXIT2_IR:   return t != TAP_SHIFT_IR;
      default:        return t != TAP_IDLE; // UPDATE_DR / UPDATE_IR
    endcase
  endfunction

endpackage
