// Manchester decoder (implant side).
//
// Recovers the clock from the Manchester-encoded data (MED) and samples
// the data with it. MED is taken through a two-flip-flop synchroniser,
// since the transmitter runs on its own time base. A transition detector
// feeds an internal counter running at OVERSAMPLE clocks per bit:
//   * Before lock, the counter measures the time between transitions. Only
//     two bit-centre transitions can be a whole bit apart (a bit boundary
//     is always half a bit from a centre), so a gap of at least 3/4 bit
//     marks the later transition as a bit centre and gives lock.
//   * In lock, a transition at least 3/4 bit after the last centre is the
//     next centre: the counter restarts there, which re-aligns the
//     internal clock every bit; earlier transitions are bit boundaries and
//     are ignored. No centre within 5/4 bit drops the lock.
// At each centre the recovered clock pulse (bit_valid_o) is issued and the
// reconstructed data is the MED level just before the transition, which
// is the RS-register rule Q = MED at the recovered clock of the published
// decoder applied to the first half of the bit. The lock rule and the
// thresholds are this design's choice; the published decoder only names
// its transition detector and internal clock.
//
// Timing: bit_valid_o rises 3 clocks after the centre transition reaches
// med_i (two synchroniser stages and the output register).
module manchester_decoder #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic med_i,
  output logic bit_valid_o,
  output logic bit_o,
  output logic locked_o
);

  localparam int unsigned T_EARLY = (3 * OVERSAMPLE) / 4;  // earliest centre
  localparam int unsigned T_LATE  = (5 * OVERSAMPLE) / 4;  // latest centre
  localparam int unsigned CW      = $clog2(T_LATE + 2);

  logic          med_s1, med_s2, med_prev;
  logic          edge_seen;   // at least one transition since lock was lost
  logic [CW-1:0] cnt;
  logic          transition;
  logic          centre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      med_s1   <= 1'b0;
      med_s2   <= 1'b0;
      med_prev <= 1'b0;
    end else begin
      med_s1   <= med_i;
      med_s2   <= med_s1;
      med_prev <= med_s2;
    end
  end

  assign transition = (med_s2 != med_prev);
  assign centre     = transition && (locked_o || edge_seen) && (cnt >= CW'(T_EARLY));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      edge_seen   <= 1'b0;
      locked_o    <= 1'b0;
      bit_valid_o <= 1'b0;
      bit_o       <= 1'b0;
    end else begin
      bit_valid_o <= 1'b0;
      if (centre) begin
        cnt         <= '0;
        locked_o    <= 1'b1;
        bit_valid_o <= 1'b1;
        bit_o       <= med_prev;
      end else if (transition && !locked_o) begin
        // Unlocked: start timing the gap to the next transition.
        cnt       <= '0;
        edge_seen <= 1'b1;
      end else begin
        if (cnt != '1) cnt <= cnt + 1'b1;
        if (locked_o && cnt > CW'(T_LATE)) begin
          locked_o  <= 1'b0;
          edge_seen <= 1'b0;
        end
      end
    end
  end

endmodule
