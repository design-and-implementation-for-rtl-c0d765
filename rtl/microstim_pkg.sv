// Shared types and constants of the microstimulator.
//
// The stimulator is programmed with a four-word command sent over the
// Manchester link as UART frames. The command layout is this design's own
// choice; the channel count (8) and the 5-bit current code follow the
// stimulator chip:
//   word 0 (header)   : {1'b1, 3'b000, polarity, channel[2:0]}
//   word 1 (amplitude): {3'b000, amp[4:0]}          DAC code, 32 levels
//   word 2 (width)    : {1'b0, pw[6:0]}             pulse width, 10 us units
//   word 3 (period)   : {1'b0, per[6:0]}            pulse period, 1 ms units (0 = off)
// Bit 7 set marks a header; a header always restarts a command.
package microstim_pkg;

  localparam int unsigned CHANNELS  = 8;
  localparam int unsigned CH_BITS   = 3;
  localparam int unsigned AMP_BITS  = 5;
  localparam int unsigned PW_BITS   = 7;
  localparam int unsigned PER_BITS  = 7;
  localparam int unsigned WORD_BITS = 8;

  // A current in signed nanoamperes (analog model outputs).
  typedef logic signed [31:0] na_t;

  // Active stimulation settings.
  typedef struct packed {
    logic                polarity;  // 0: Sign (forward current), 1: Unsign (reverse)
    logic [CH_BITS-1:0]  channel;
    logic [AMP_BITS-1:0] amp;
    logic [PW_BITS-1:0]  pw;
    logic [PER_BITS-1:0] per;
  } stim_cfg_t;

  localparam stim_cfg_t CFG_OFF = '{polarity: 1'b0, channel: '0, amp: '0, pw: '0, per: '0};

  // Command word builders, used by the parser's checks and by testbenches.
  function automatic logic [WORD_BITS-1:0] hdr_word(input logic pol, input logic [CH_BITS-1:0] ch);
    return {1'b1, 3'b000, pol, ch};
  endfunction

endpackage
