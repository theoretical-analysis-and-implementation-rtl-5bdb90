// tep_generator: test error pattern (TEP) generator of the MRB Part 2 unit.
//
// A TEP of weight w <= order flips w of the k most reliable positions. It is
// written as four indices [a, X, Y, Z], each 0 (unused) or 1..K (row of G*),
// in the canonical form a > X > Y > Z with zeros only at the end. Cascading
// counters step through the shared part [0, X, Y, Z]: Z counts fastest over
// 0..Y-1, then Y over 0..X-1, then X over 0..K-1. For each [X, Y, Z] the
// first-order index a runs from X+1 (or from 0 when X = 0, where a = 0 is the
// first candidate codeword itself) up to K, and is handed out N_TEU at a time:
// TEU i gets a = a_base + i. advance moves to the next group of N_TEU TEPs.
// xyz_change (combinational) tells whether advance will change [X, Y, Z], so
// that the controller knows a new pre-encoding is needed. The search stops
// after max_teps TEPs: TEUs beyond the budget are marked invalid and last is
// raised on the final group. tep_count counts the TEPs issued in earlier
// groups. The cascading counters, the shared [X,Y,Z] and the per-TEU first
// index follow the design description; the canonical order is this design's.
module tep_generator #(
  parameter int unsigned N_TEU = 3,
  parameter int unsigned K     = 64,
  parameter int unsigned IW    = 7,     // index width, holds 0..K
  parameter int unsigned CW    = 20     // TEP counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          advance,
  input  logic [2:0]    order,
  input  logic [CW-1:0] max_teps,
  output logic [IW-1:0] x,
  output logic [IW-1:0] y,
  output logic [IW-1:0] z,
  output logic [IW-1:0] a       [N_TEU],
  output logic          a_valid [N_TEU],
  output logic          xyz_change,
  output logic          last,
  output logic [CW-1:0] tep_count
);
  logic [IW-1:0] a_base;
  logic [IW:0]   amax;
  logic [IW-1:0] nx, ny, nz;
  logic          has_next_xyz;
  logic [CW-1:0] nvalid;

  always_comb begin
    amax = (order >= 3'd1) ? (IW+1)'(K) : '0;
    nvalid = '0;
    for (int i = 0; i < N_TEU; i++) begin
      a[i]       = a_base + IW'(i);
      a_valid[i] = ((IW+1)'(a_base) + (IW+1)'(i) <= amax) &&
                   (tep_count + CW'(i) < max_teps);
      if (a_valid[i]) nvalid = nvalid + CW'(1);
    end
    // next shared pattern
    nx = x; ny = y; nz = z;
    has_next_xyz = 1'b1;
    if (order >= 3'd4 && y >= IW'(2) && z < y - IW'(1)) begin
      nz = z + IW'(1);
    end else if (order >= 3'd3 && x >= IW'(2) && y < x - IW'(1)) begin
      ny = y + IW'(1); nz = '0;
    end else if (order >= 3'd2 && x < IW'(K - 1)) begin
      nx = x + IW'(1); ny = '0; nz = '0;
    end else begin
      has_next_xyz = 1'b0;
    end
    xyz_change = ((IW+1)'(a_base) + (IW+1)'(N_TEU) > amax);
    last = (xyz_change && !has_next_xyz) || (tep_count + nvalid >= max_teps);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; a_base <= '0; tep_count <= '0;
    end else if (start) begin
      x <= '0; y <= '0; z <= '0; a_base <= '0; tep_count <= '0;
    end else if (advance) begin
      tep_count <= tep_count + nvalid;
      if (xyz_change) begin
        x <= nx; y <= ny; z <= nz;
        a_base <= (nx == '0) ? '0 : nx + IW'(1);
      end else begin
        a_base <= a_base + IW'(N_TEU);
      end
    end
  end
endmodule
