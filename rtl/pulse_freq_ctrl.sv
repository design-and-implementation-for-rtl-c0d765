// Pulse-frequency controller.
//
// Sets the stimulation frequency by letting through one pulse of the
// pulse-width controller in every per_i base periods. A counter of base
// periods advances on each period_start_i; the gate is open for the base
// period in which the counter is 0. per_i = 0 stops stimulation and holds
// the counter at 0, so the first pulse after it is set comes at once.
// With a 1 ms base period, per_i = 50 gives the 20 Hz of the reference
// stimulation. pulse_o is pulse_i through the gate, registered (one clock
// of latency, width unchanged). The published design names this block and
// its role; the counter is this design's choice.
module pulse_freq_ctrl #(
  parameter int unsigned PER_BITS = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PER_BITS-1:0] per_i,
  input  logic                period_start_i,
  input  logic                pulse_i,
  output logic                pulse_o
);

  logic [PER_BITS-1:0] k;
  logic                gate_q;
  logic                gate;

  assign gate = period_start_i ? ((k == '0) && (per_i != '0)) : gate_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k       <= '0;
      gate_q  <= 1'b0;
      pulse_o <= 1'b0;
    end else begin
      if (per_i == '0) begin
        k <= '0;
      end else if (period_start_i) begin
        k <= ({1'b0, k} + 1'b1 >= {1'b0, per_i}) ? '0 : k + 1'b1;
      end
      gate_q  <= gate && (per_i != '0);
      pulse_o <= pulse_i && gate && (per_i != '0);
    end
  end

endmodule
