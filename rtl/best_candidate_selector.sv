// best_candidate_selector: best candidate selector and quick escape of the
// MRB Part 2 unit.
//
// init forgets the previous search. On update the unit takes the smallest
// distance among the TEUs whose TEP is valid (lowest index on a tie) and, if
// it is smaller than the best so far, stores that distance, the candidate
// codeword and its TEP indices. qe_hit tells, combinationally and already
// counting the update in progress, whether the best distance is at or below
// the quick-escape threshold qe_thr, so the controller can stop the search
// in the same clock. The minimum selection and the threshold comparison
// follow the design description; a single threshold is this design's
// reading of it.
module best_candidate_selector
  import tc_pkg::*;
#(
  parameter int unsigned N_TEU = 3,
  parameter int unsigned N     = 128,
  parameter int unsigned DW    = DIST_W,
  parameter int unsigned IW    = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          update,
  input  logic [DW-1:0] dsum    [N_TEU],
  input  logic          valid   [N_TEU],
  input  logic [N-1:0]  cand    [N_TEU],
  input  logic [IW-1:0] a       [N_TEU],
  input  logic [IW-1:0] x,
  input  logic [IW-1:0] y,
  input  logic [IW-1:0] z,
  input  logic [DW-1:0] qe_thr,
  output logic          found,
  output logic [DW-1:0] best_dist,
  output logic [N-1:0]  best_cw,
  output logic [IW-1:0] best_tep [4],
  output logic          qe_hit
);
  logic [DW-1:0] mind;
  logic          minv;
  int unsigned   mini;
  logic          better;

  always_comb begin
    mind = '1;
    minv = 1'b0;
    mini = 0;
    for (int i = 0; i < N_TEU; i++) begin
      if (valid[i] && (!minv || dsum[i] < mind)) begin
        mind = dsum[i];
        minv = 1'b1;
        mini = i;
      end
    end
    better = update && minv && (!found || mind < best_dist);
    qe_hit = better ? (mind <= qe_thr) : (found && best_dist <= qe_thr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found     <= 1'b0;
      best_dist <= '1;
      best_cw   <= '0;
      best_tep  <= '{default: '0};
    end else if (init) begin
      found     <= 1'b0;
      best_dist <= '1;
    end else if (better) begin
      found       <= 1'b1;
      best_dist   <= mind;
      best_cw     <= cand[mini];
      best_tep[0] <= a[mini];
      best_tep[1] <= x;
      best_tep[2] <= y;
      best_tep[3] <= z;
    end
  end
endmodule
