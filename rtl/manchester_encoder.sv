// Manchester encoder (external controller side).
//
// Combines a serial data stream and its clock into one signal, the
// Manchester-encoded data (MED), which has a transition at the centre of
// every bit. A divide-by-2 of the original clock is the bit clock; its two
// edges give the pulses clock_A (start of bit) and clock_B (half a bit
// later). An RS register obeys
//     Set   = clock_A & data | clock_B & ~data
//     Reset = clock_A & ~data | clock_B & data
// so MED carries the data in the first half of the bit and its complement
// in the second half. This structure and these equations follow the
// published encoder; here it is built fully synchronously.
//
// Interface: the "original clock" is an enable that fires every
// HALF_BIT_CYCLES clocks, so one bit lasts 2*HALF_BIT_CYCLES clocks
// (HALF_BIT_CYCLES = 1 is the plain divide-by-2 of clk). data_i is taken
// in the cycle bit_strobe_o (clock_A) is high and held internally for the
// whole bit, so the source may present the next bit right after the strobe.
// MED changes one clock after clock_A / clock_B. The default bit period,
// 16 clocks, is this design's choice; the published text gives no rate.
module manchester_encoder #(
  parameter int unsigned HALF_BIT_CYCLES = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic data_i,
  output logic bit_strobe_o,
  output logic med_o
);

  localparam int unsigned CW = (HALF_BIT_CYCLES > 1) ? $clog2(HALF_BIT_CYCLES) : 1;

  logic [CW-1:0] pre_cnt;
  logic          orig_tick;   // one "original clock" period has elapsed
  logic          div2;        // the /2 bit clock
  logic          clock_a, clock_b;
  logic          data_q;
  logic          set_n, reset_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pre_cnt <= '0;
    else if (orig_tick) pre_cnt <= '0;
    else pre_cnt <= pre_cnt + 1'b1;
  end
  assign orig_tick = (pre_cnt == CW'(HALF_BIT_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div2 <= 1'b0;
    else if (orig_tick) div2 <= ~div2;
  end

  // Edge pulses of the bit clock: clock_A on its rising, clock_B on its falling edge.
  assign clock_a = orig_tick & ~div2;
  assign clock_b = orig_tick &  div2;
  assign bit_strobe_o = clock_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_q <= 1'b0;
    else if (clock_a) data_q <= data_i;
  end

  // Two-level NAND form of Eqs. (1)-(2); clock_B uses the latched bit.
  assign set_n   = ~((clock_a & data_i) | (clock_b & ~data_q));
  assign reset_n = ~((clock_a & ~data_i) | (clock_b & data_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) med_o <= 1'b0;
    else if (!set_n) med_o <= 1'b1;
    else if (!reset_n) med_o <= 1'b0;
  end

  // The RS register is never asked to set and reset at once.
  a_no_sr_conflict: assert property (@(posedge clk) disable iff (!rst_n) !(!set_n && !reset_n));

endmodule
