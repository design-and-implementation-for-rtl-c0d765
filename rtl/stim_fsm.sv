// Stimulation finite state machine.
//
// Makes the stimulator reprogrammable from the received words. It has two
// jobs: choose the stimulation channel and the scale of the current, and
// generate the programmed pulse width and pulse frequency.
//
// A command parser collects the four-word command of microstim_pkg
// (header, amplitude, width, period) and loads all new settings into the
// active configuration together when the last word arrives (cmd_ok_o).
// A header word always starts a new command; a word that does not fit the
// expected position is dropped with cmd_err_o. The active configuration
// drives:
//   * the pulse generator: pulse-width controller -> digital filter ->
//     pulse-frequency controller. The digital filter is outside this
//     module: pw_pulse_o leaves for it and filt_pulse_i comes back (tie
//     them together where no filter is fitted);
//   * the control logic: channel select, DAC code, Sign/Unsign.
// The split into a pulse generator and a control logic circuit and the
// chain of three pulse blocks follow the published design; the command
// format and the sizes are this design's choice. Reset leaves stimulation
// off.
module stim_fsm
  import microstim_pkg::*;
#(
  parameter int unsigned PW_UNIT_CYCLES = 10,
  parameter int unsigned BASE_UNITS     = 100
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  byte_valid_i,
  input  logic [WORD_BITS-1:0]  byte_i,
  output logic                  pw_pulse_o,
  input  logic                  filt_pulse_i,
  output logic                  pulse_o,
  output logic                  sign_o,
  output logic                  unsign_o,
  output logic [CHANNELS-1:0]   chan_en_o,
  output logic [AMP_BITS-1:0]   dac_code_o,
  output stim_cfg_t             cfg_o,
  output logic                  cmd_ok_o,
  output logic                  cmd_err_o
);

  typedef enum logic [1:0] {P_HDR, P_AMP, P_PW, P_PER} pstate_t;

  pstate_t   pstate;
  stim_cfg_t pend;
  logic      is_hdr;
  logic      period_start;

  assign is_hdr = byte_i[WORD_BITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate    <= P_HDR;
      pend      <= CFG_OFF;
      cfg_o     <= CFG_OFF;
      cmd_ok_o  <= 1'b0;
      cmd_err_o <= 1'b0;
    end else begin
      cmd_ok_o  <= 1'b0;
      cmd_err_o <= 1'b0;
      if (byte_valid_i) begin
        if (is_hdr) begin
          // A header in the middle of a command abandons that command.
          if (pstate != P_HDR || byte_i[6:4] != 3'b000) cmd_err_o <= 1'b1;
          if (byte_i[6:4] == 3'b000) begin
            pend.polarity <= byte_i[3];
            pend.channel  <= byte_i[CH_BITS-1:0];
            pstate        <= P_AMP;
          end else begin
            pstate <= P_HDR;
          end
        end else begin
          unique case (pstate)
            P_HDR: cmd_err_o <= 1'b1;
            P_AMP: begin
              if (byte_i[6:AMP_BITS] == '0) begin
                pend.amp <= byte_i[AMP_BITS-1:0];
                pstate   <= P_PW;
              end else begin
                cmd_err_o <= 1'b1;
                pstate    <= P_HDR;
              end
            end
            P_PW: begin
              pend.pw <= byte_i[PW_BITS-1:0];
              pstate  <= P_PER;
            end
            P_PER: begin
              cfg_o     <= '{polarity: pend.polarity, channel: pend.channel, amp: pend.amp,
                             pw: pend.pw, per: byte_i[PER_BITS-1:0]};
              cmd_ok_o  <= 1'b1;
              pstate    <= P_HDR;
            end
            default: pstate <= P_HDR;
          endcase
        end
      end
    end
  end

  pulse_width_ctrl #(
    .PW_UNIT_CYCLES(PW_UNIT_CYCLES),
    .BASE_UNITS    (BASE_UNITS),
    .PW_BITS       (PW_BITS)
  ) u_pwc (
    .clk           (clk),
    .rst_n         (rst_n),
    .pw_i          (cfg_o.pw),
    .pwm_o         (pw_pulse_o),
    .period_start_o(period_start)
  );

  pulse_freq_ctrl #(
    .PER_BITS(PER_BITS)
  ) u_pfc (
    .clk           (clk),
    .rst_n         (rst_n),
    .per_i         (cfg_o.per),
    .period_start_i(period_start),
    .pulse_i       (filt_pulse_i),
    .pulse_o       (pulse_o)
  );

  control_logic u_ctl (
    .cfg_i     (cfg_o),
    .pulse_i   (pulse_o),
    .sign_o    (sign_o),
    .unsign_o  (unsign_o),
    .chan_en_o (chan_en_o),
    .dac_code_o(dac_code_o)
  );

endmodule
