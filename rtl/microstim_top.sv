// Microstimulator prototype: external controller and implant, joined by
// one wire.
//
// External part (clock ext_clk): the stimulation-pattern generator, a
// microcontroller outside this design, sends its commands as UART frames
// on tx_data_i, one bit per tx_bit_strobe_o. The Manchester encoder merges
// data and clock onto the single line med_o.
//
// Implant (clock clk, its own time base): the Manchester decoder recovers
// the bit clock and data from the line, the serial-to-parallel converter
// rebuilds the words, and the stimulation state machine turns commands
// into a channel, a current code, a polarity and a pulse train of the
// programmed width and frequency. The current stimulation module (an
// analog chip, a behavioural model here) turns these into electrode
// currents i_elec_na_o, in signed nanoamperes.
//
// The digital filter between the pulse-width and pulse-frequency
// controllers is not part of this design: its input leaves as pw_pulse_o
// and its output returns on filt_pulse_i. Tie them together to run
// without one.
//
// With the defaults and 1 MHz clocks a bit lasts 16 us, a command of four
// frames 640 us, and the pulse width and period are set in 10 us and 1 ms
// steps. The block structure follows the published prototype; rates,
// command format and sizes are this design's choice.
module microstim_top
  import microstim_pkg::*;
#(
  parameter int unsigned HALF_BIT_CYCLES = 8,
  parameter int unsigned OVERSAMPLE      = 2 * HALF_BIT_CYCLES,
  parameter int unsigned PW_UNIT_CYCLES  = 10,
  parameter int unsigned BASE_UNITS      = 100,
  parameter int          STEP_NA         = 108000
) (
  // external controller
  input  logic                ext_clk,
  input  logic                ext_rst_n,
  input  logic                tx_data_i,
  output logic                tx_bit_strobe_o,
  output logic                med_o,
  // implant
  input  logic                clk,
  input  logic                rst_n,
  output logic                locked_o,
  output logic                frame_err_o,
  output logic                cmd_ok_o,
  output logic                cmd_err_o,
  output stim_cfg_t           cfg_o,
  output logic                pw_pulse_o,
  input  logic                filt_pulse_i,
  output logic                pulse_o,
  output logic                sign_o,
  output logic                unsign_o,
  output logic [CHANNELS-1:0] chan_en_o,
  output logic [AMP_BITS-1:0] dac_code_o,
  output na_t                  i_elec_na_o [CHANNELS]
);

  logic                 rx_bit_valid, rx_bit;
  logic                 word_valid;
  logic [WORD_BITS-1:0] word;

  manchester_encoder #(.HALF_BIT_CYCLES(HALF_BIT_CYCLES)) u_enc (
    .clk         (ext_clk),
    .rst_n       (ext_rst_n),
    .data_i      (tx_data_i),
    .bit_strobe_o(tx_bit_strobe_o),
    .med_o       (med_o)
  );

  manchester_decoder #(.OVERSAMPLE(OVERSAMPLE)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .med_i      (med_o),
    .bit_valid_o(rx_bit_valid),
    .bit_o      (rx_bit),
    .locked_o   (locked_o)
  );

  serial_to_parallel #(.DATA_BITS(WORD_BITS)) u_s2p (
    .clk         (clk),
    .rst_n       (rst_n),
    .bit_valid_i (rx_bit_valid),
    .bit_i       (rx_bit),
    .locked_i    (locked_o),
    .byte_valid_o(word_valid),
    .byte_o      (word),
    .frame_err_o (frame_err_o)
  );

  stim_fsm #(
    .PW_UNIT_CYCLES(PW_UNIT_CYCLES),
    .BASE_UNITS    (BASE_UNITS)
  ) u_fsm (
    .clk         (clk),
    .rst_n       (rst_n),
    .byte_valid_i(word_valid),
    .byte_i      (word),
    .pw_pulse_o  (pw_pulse_o),
    .filt_pulse_i(filt_pulse_i),
    .pulse_o     (pulse_o),
    .sign_o      (sign_o),
    .unsign_o    (unsign_o),
    .chan_en_o   (chan_en_o),
    .dac_code_o  (dac_code_o),
    .cfg_o       (cfg_o),
    .cmd_ok_o    (cmd_ok_o),
    .cmd_err_o   (cmd_err_o)
  );

  current_stim_module #(.CHANNELS(CHANNELS), .STEP_NA(STEP_NA)) u_csm (
    .dac_code_i (dac_code_o),
    .pulse_i    (pulse_o),
    .sign_i     (sign_o),
    .unsign_i   (unsign_o),
    .chan_en_i  (chan_en_o),
    .i_elec_na_o(i_elec_na_o)
  );

endmodule
