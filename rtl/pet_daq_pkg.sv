// Shared constants and types of the PET acquisition design.
//
// An event leaves a DAQ board as a packet of five 16-bit words. Bits 15..13
// of every word are a control code that tells the word's place in the
// packet; bit 12 is a programmable bit; bits 11..0 carry either the header
// (DAQ id and event marker) or one 12-bit Anger signal sample. The codes for
// header, XA, XB and YA follow the published packet layout; YB is given code
// 3'b011 here so that all five codes differ, which is also what the bus
// waveforms of the original system show.
package pet_daq_pkg;
  localparam int WORD_W    = 16;  // bus and packet word width
  localparam int PKT_WORDS = 5;   // words per event packet
  localparam int ADC_W     = 12;  // ADC resolution
  localparam int N_ADC     = 4;   // Anger signals XA, XB, YA, YB

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADC_W-1:0]  sample_t;

  // Control code in bits 15..13
  typedef enum logic [2:0] {
    CODE_HDR = 3'b100,
    CODE_XA  = 3'b000,
    CODE_XB  = 3'b001,
    CODE_YA  = 3'b010,
    CODE_YB  = 3'b011
  } word_code_e;

  // Code expected at each position of a packet
  function automatic word_code_e code_at(input logic [2:0] idx);
    case (idx)
      3'd0:    return CODE_HDR;
      3'd1:    return CODE_XA;
      3'd2:    return CODE_XB;
      3'd3:    return CODE_YA;
      default: return CODE_YB;
    endcase
  endfunction

  // Header payload: DAQ id in 11..8, event marker in 7..0
  function automatic word_t make_header(input logic [3:0] daq_id,
                                        input logic [7:0] event_id,
                                        input logic c);
    return {CODE_HDR, c, daq_id, event_id};
  endfunction

  function automatic word_t make_sample(input logic [2:0] idx,
                                        input sample_t s, input logic c);
    return {code_at(idx), c, s};
  endfunction

  // HSMC receiver command opcodes (bits 63..60 of a command word)
  typedef enum logic [3:0] {
    OP_NOP    = 4'h0,
    OP_READ   = 4'h1,
    OP_STATUS = 4'h2,
    OP_RESET  = 4'h3
  } hsmc_op_e;

  // Tags in bits 63..60 of words sent back to the processor
  localparam logic [3:0] TAG_DATA   = 4'hD;
  localparam logic [3:0] TAG_STATUS = 4'h5;

  // States of the HSMC transfer state machine
  typedef enum logic [2:0] {
    S_INIT   = 3'd1,
    S_READY  = 3'd2,
    S_RDCMD  = 3'd3,
    S_STATUS = 3'd4,
    S_RDHSMC = 3'd5,
    S_DONE   = 3'd6
  } hsmc_state_e;
endpackage
