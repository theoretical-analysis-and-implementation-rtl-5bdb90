// teu: TEP evaluation unit of the MRB Part 2 unit.
//
// For its TEP [a, X, Y, Z] the unit finishes the encoding of the candidate
// codeword, cand = pre ^ G*[a], and computes its distance to the received
// word: the sum of the reliabilities |y_j| of the positions where the
// candidate bit differs from the hard decision of the received symbol (for
// antipodal signalling this orders candidates exactly as the Euclidean
// distance does). The 128-bit word is handled C bits per clock, so a TEP
// takes 128/C clocks: on each clock with en set, slice slice_idx (bits
// slice_idx*C .. slice_idx*C+C-1) is encoded, stored into cand and its
// mismatching reliabilities are added to dsum; clear restarts the sum with
// the current slice. dsum and cand are complete one clock after the last
// slice. The encoder, the mismatch accumulator and the C-bit partial
// parallelism follow the design description; contiguous slices are this
// design's choice.
module teu
  import tc_pkg::*;
#(
  parameter int unsigned N  = 128,
  parameter int unsigned C  = 8,
  parameter int unsigned DW = DIST_W
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic                  clear,
  input  logic [$clog2(N/C > 1 ? N/C : 2)-1:0] slice_idx,
  input  logic [C-1:0]          pre_slice,
  input  logic [C-1:0]          g_slice,
  input  logic [C-1:0]          rx_hard,
  input  logic [SOFT_W-2:0]     rx_mag [C],
  output logic [DW-1:0]         dsum,
  output logic [N-1:0]          cand
);
  logic [C-1:0]  cbits;
  logic [DW-1:0] add;

  always_comb begin
    cbits = pre_slice ^ g_slice;
    add   = '0;
    for (int j = 0; j < C; j++)
      if (cbits[j] ^ rx_hard[j]) add = add + DW'(rx_mag[j]);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dsum <= (clear ? '0 : dsum) + add;
      cand[slice_idx*C +: C] <= cbits;
    end
  end
endmodule
