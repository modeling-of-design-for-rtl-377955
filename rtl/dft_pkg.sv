// Types and constants shared by the DFT infrastructure bridge (DFT-IB) and the device
// under test (a 10-bit counter wrapped with scan chains and EDT compression logic).
//
// The DUT seen from the bridge has 7 input pins and 33 output pins: the counter's own
// 3 inputs and 32 outputs plus the EDT pins (scan enable, EDT channel in/out, EDT bypass,
// LPCT clock). One set of internal test data holds a 7-bit pattern for the inputs, the
// 33-bit fault-free response and a 33-bit mask; 1095 such sets make up the test.
// The pin order inside the structs, the mask polarity, the command and response codes
// and the register offsets are this design's own choices.
package dft_pkg;

  localparam int unsigned PAT_W  = 7;     // DUT input pins driven by the bridge
  localparam int unsigned RESP_W = 33;    // DUT output pins read by the bridge
  localparam int unsigned CNT_OUT_W = 32; // functional outputs of the counter

  // DUT input pins (bridge t_out). The counter's clock pin and the LPCT clock pin are
  // sampled like data: a 0->1 change between two applied patterns is one clock pulse.
  typedef struct packed {
    logic lpct_clk;   // [6] clock of the EDT logic
    logic edt_bypass; // [5] 1: scan chains concatenated, EDT logic bypassed
    logic edt_ch_in;  // [4] EDT scan channel input
    logic scan_en;    // [3] scan enable of all scan cells
    logic cnt_en;     // [2] counter count enable (functional input)
    logic cnt_rst;    // [1] counter reset (functional input, active high)
    logic cnt_clk;    // [0] counter clock (functional input)
  } dut_in_t;

  // DUT output pins (bridge t_in).
  typedef struct packed {
    logic                 edt_ch_out; // [32] EDT scan channel output
    logic [CNT_OUT_W-1:0] cnt_out;    // [31:0] counter outputs
  } dut_out_t;

  // One set of stored test data. A mask bit of 1 marks a response bit as don't-care.
  typedef struct packed {
    dut_in_t            pattern;
    logic [RESP_W-1:0]  response;
    logic [RESP_W-1:0]  mask;
  } test_set_t;

  localparam int unsigned SET_W = $bits(test_set_t); // 73

  // Command register codes (written by the CPU).
  typedef enum logic [3:0] {
    CMD_NONE      = 4'h0,
    CMD_INT_TEST  = 4'h1,  // run the whole stored test and compare
    CMD_EXT_APPLY = 4'h2,  // apply the stimuli register once and capture the response
    CMD_EXT_END   = 4'h3   // end an external test: DUT pins back to their idle values
  } cmd_e;

  // Command response codes (read by the CPU, bits [3:0] of the response register).
  typedef enum logic [3:0] {
    RSP_IDLE    = 4'h0,
    RSP_BUSY    = 4'h1,
    RSP_DONE    = 4'h2,  // external apply/end finished, response register valid
    RSP_PASS    = 4'h3,  // internal test: no mismatch in any set
    RSP_FAIL    = 4'h4,  // internal test: mismatch, failing set index in [31:16]
    RSP_BAD_CMD = 4'h5
  } rsp_e;

  // Register word offsets (byte address bits [4:2]).
  localparam logic [2:0] REG_CMD     = 3'd0; // R/W command
  localparam logic [2:0] REG_CMDRSP  = 3'd1; // R   command response
  localparam logic [2:0] REG_STIM    = 3'd2; // R/W test stimuli [6:0]
  localparam logic [2:0] REG_RESP_LO = 3'd3; // R   test response [31:0]
  localparam logic [2:0] REG_RESP_HI = 3'd4; // R   test response [32]

endpackage
