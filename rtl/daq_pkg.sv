// daq_pkg: types and constants shared by the monitoring-board (MB) firmware and the
// readout-controller firmware of the laser-calibration data acquisition.
//
// Word formats. Every data word on every path is 16 bits wide.
//  * Front-end frame (one per validated pulse, FE_FRAME_WORDS = 16 words): an 11-word header
//    (BOF number first, so a reader can look at it before taking the frame) followed by the
//    five pulse words: pulse info, timestamp high, timestamp low, baseline, peak. The 16-word
//    event and the five pulse words follow the text; the order of the header words is this
//    design's choice.
//  * MB event (one per subcycle): a 24-word header, 5 words per pulse per channel, and one
//    checksum word (XOR of every preceding word). The 24-word header follows the text; its
//    contents and the checksum are this design's choice.
//  * MB register reply: 3 words (marker, address, data).
//  * Controller command to an MB: 2 words ({opcode, address}, data).
// The serial links carry each word as two 8N1 characters, high byte first.
package daq_pkg;

  localparam int unsigned WORD_W          = 16;
  localparam int unsigned ADC_W           = 14;   // AD9244, 14 bit
  localparam int unsigned HV_DAC_W        = 12;   // HV programming DAC
  localparam int unsigned CAL_DAC_W       = 14;   // THS5671A calibration DAC
  localparam int unsigned NUM_CH          = 3;    // input slices per MB
  localparam int unsigned FE_FRAME_WORDS  = 16;
  localparam int unsigned FE_HDR_WORDS    = 11;
  localparam int unsigned PULSE_WORDS     = 5;
  localparam int unsigned MB_HDR_WORDS    = 24;
  localparam int unsigned NUM_SLOW        = 6;    // per channel: HV set, HV V, HV I, 3 temps

  typedef logic [WORD_W-1:0] word_t;

  // Pulse classification carried in the pulse-info word.
  typedef enum logic [1:0] {
    PT_LASER     = 2'd0,
    PT_AMERICIUM = 2'd1,
    PT_CALIB     = 2'd2,
    PT_SIM       = 2'd3
  } pulse_type_e;

  // Markers
  localparam word_t FE_MARK       = 16'hFE00;  // | channel, header word 9 of a front-end frame
  localparam logic [7:0] MB_EVT_MARK   = 8'hEB;  // {MB_EVT_MARK, 4'b0, slot}
  localparam logic [7:0] MB_REPLY_MARK = 8'h5C;  // {MB_REPLY_MARK, 4'b0, slot}
  localparam logic [7:0] CR_EVT_MARK   = 8'hCA;  // controller crate event
  localparam logic [7:0] CR_SUB_MARK   = 8'hB0;  // controller subframe (one per MB)
  localparam word_t CR_TRAILER    = 16'hCAE0;

  // Commands on the downlink, word 0 = {opcode, address}
  typedef enum logic [3:0] {
    CMD_WRITE = 4'h1,
    CMD_READ  = 4'h2
  } mb_cmd_e;

  // MB register map (12-bit address space, low addresses used)
  localparam logic [11:0] REG_HV0       = 12'h000; // +ch, HV DAC code of channel ch
  localparam logic [11:0] REG_CTRL      = 12'h004; // [0] calib run, [1] sim mode, [2] ramp start (self clearing)
  localparam logic [11:0] REG_CAL_NWAVE = 12'h005;
  localparam logic [11:0] REG_CAL_MAX   = 12'h006;
  localparam logic [11:0] REG_CAL_STEP  = 12'h007;
  localparam logic [11:0] REG_CAL_GAP   = 12'h008;
  localparam logic [11:0] REG_CONFIG    = 12'h009; // firmware configuration word (SM / LM)
  localparam logic [11:0] REG_STATUS    = 12'h010; // read only
  localparam logic [11:0] REG_SLOW0     = 12'h020; // read only, + ch*8 + index

  // Controller CPU instruction: {op[3:0], target[3:0], addr[7:0], data[15:0]}
  typedef enum logic [3:0] {
    OP_NOP      = 4'h0,
    OP_WR_INT   = 4'h1,
    OP_RD_INT   = 4'h2,
    OP_WR_MB    = 4'h3,
    OP_RD_MB    = 4'h4,
    OP_SYNC     = 4'h5,
    OP_ERR_CLR  = 4'h6
  } op_e;

  typedef struct packed {
    op_e        op;
    logic [3:0] target;   // MB slot; 4'hF = every enabled slot
    logic [7:0] addr;
    word_t      data;
  } instr_t;

  // Controller internal registers (OP_RD_INT / OP_WR_INT address)
  localparam logic [7:0] CREG_ENABLE   = 8'h00; // MB slot enable mask
  localparam logic [7:0] CREG_RUN      = 8'h01; // [0] run enable
  localparam logic [7:0] CREG_BOF      = 8'h02; // BOF count (read)
  localparam logic [7:0] CREG_ERR      = 8'h03; // [15] error latched, [11:0] BOF count at error
  localparam logic [7:0] CREG_DT_MB    = 8'h04; // MB busy dead-time counter [31:16] / [15:0] at 05
  localparam logic [7:0] CREG_DT_CTRL  = 8'h06; // controller busy, 06/07
  localparam logic [7:0] CREG_DT_TOT   = 8'h08; // total dead time, 08/09
  localparam logic [7:0] CREG_RXERR    = 8'h0A; // RX integrity error count
  localparam logic [7:0] CREG_EVTS     = 8'h0B; // crate events built
  localparam logic [7:0] CREG_MON      = 8'h40; // 0x40 + slot*... monitor window, see op_decode

  function automatic word_t mb_evt_marker(input logic [3:0] slot);
    return {MB_EVT_MARK, 4'b0, slot};
  endfunction

endpackage
