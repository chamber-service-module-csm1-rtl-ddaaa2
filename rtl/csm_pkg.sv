// csm_pkg: constants and types shared by the CSM1 FPGA logic.
//
// The chamber service module gathers the serial output of up to 18 TDC
// mezzanine cards, deserializes each stream into 32-bit words and sends them,
// time-multiplexed, as one 32-bit stream to the optical link transmitter.
// The channel count and the 32-bit word follow the module's specification;
// the empty-word and spacer encodings are this design's own choice, since the
// specification names both words but gives no bit pattern for them.
package csm_pkg;
  localparam int unsigned N_TDC   = 18;   // TDC cards served
  localparam int unsigned WORD_W  = 32;   // TDC word and link word width
  localparam int unsigned ENTRY_W = WORD_W + 1; // FIFO entry: word + parity

  // Encodings of the two words the multiplexer generates itself.
  localparam logic [WORD_W-1:0] EMPTY_WORD = 32'h0000_0000;
  localparam logic [13:0]       SPACER_TAG = 14'h3E00;

  // JTAG USER1 (control) and USER2 (status) register layouts.
  localparam int unsigned CTRL_W = N_TDC + 1;      // {mux_run, tdc_enable}
  localparam int unsigned STAT_W = 4*N_TDC + 2;    // {dcm_locked, phase, phase_locked, overflow}

  typedef struct packed {
    logic              parity;  // XOR of all bits of word
    logic [WORD_W-1:0] word;
  } fifo_entry_t;

  // Spacer word: tag in the top bits, one parity bit per TDC below.
  function automatic logic [WORD_W-1:0] spacer_word(input logic [N_TDC-1:0] par);
    return {SPACER_TAG, par};
  endfunction
endpackage
