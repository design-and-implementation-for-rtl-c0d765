// Pulse-width controller.
//
// Pulse-width modulator that sets the width of the stimulation pulse. A
// prescaler divides the clock into width units of PW_UNIT_CYCLES clocks;
// a unit counter runs over a base period of BASE_UNITS units. pwm_o is
// high for the first pw_i units of every base period (the whole period if
// pw_i >= BASE_UNITS, never if pw_i = 0), and period_start_o marks the
// first clock of each base period. pw_i is taken at the start of a base
// period, so a change never cuts a pulse short.
//
// With the defaults and a 1 MHz clock the unit is 10 us and the base
// period 1 ms, so pw_i = 30 gives the 300 us pulse of the reference
// stimulation. Both outputs are registered and change together.
// The published design names this block and its role; the counter
// structure and sizes are this design's choice.
module pulse_width_ctrl #(
  parameter int unsigned PW_UNIT_CYCLES = 10,
  parameter int unsigned BASE_UNITS     = 100,
  parameter int unsigned PW_BITS        = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PW_BITS-1:0] pw_i,
  output logic               pwm_o,
  output logic               period_start_o
);

  localparam int unsigned PW = (PW_UNIT_CYCLES > 1) ? $clog2(PW_UNIT_CYCLES) : 1;
  localparam int unsigned UW = (BASE_UNITS > 1) ? $clog2(BASE_UNITS) : 1;
  localparam int unsigned CW = (UW > PW_BITS) ? UW + 1 : PW_BITS + 1;

  logic [PW-1:0]      pre;
  logic [UW-1:0]      unit;
  logic [PW_BITS-1:0] pw_q;
  logic               start;
  logic [PW_BITS-1:0] pw_eff;

  assign start  = (pre == '0) && (unit == '0);
  assign pw_eff = start ? pw_i : pw_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre            <= '0;
      unit           <= '0;
      pw_q           <= '0;
      pwm_o          <= 1'b0;
      period_start_o <= 1'b0;
    end else begin
      if (pre == PW'(PW_UNIT_CYCLES - 1)) begin
        pre  <= '0;
        unit <= (unit == UW'(BASE_UNITS - 1)) ? '0 : unit + 1'b1;
      end else begin
        pre <= pre + 1'b1;
      end
      if (start) pw_q <= pw_i;
      pwm_o          <= CW'(unit) < CW'(pw_eff);
      period_start_o <= start;
    end
  end

endmodule
