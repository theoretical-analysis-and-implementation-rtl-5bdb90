// tc_pkg: constants and types shared by the telecommand receiver blocks.
//
// Holds the soft-symbol format, the two LDPC code geometries, the
// quasi-cyclic parity-check table used by the NMS decoder, and the stored
// start/tail sequences used by the S-LRT frame synchronizer.
//
// Both codes (LDPC(128,64) and LDPC(512,256)) are rate 1/2 and built from
// 4x8 blocks of QxQ circulants, Q = 16 or 64. Every block row holds seven
// nonzero blocks, one of which (on the diagonal) is the sum of two
// permutations, so each block row gives 8 "edge groups" and the whole matrix
// 32. Each edge group is one memory bank in the decoder. Columns 0..3 have
// degree 5 and columns 4..7 degree 3.
//
// The block structure (counts of units, degrees, Q) follows the design
// description. The shift values are those of the CCSDS TC LDPC codes as
// recalled by this design, with the convention that permutation P^s has a one
// at (row i, column (i+s) mod Q); they must be checked against the CCSDS
// recommendation before use on a real link. The decoder is correct for any
// table of this shape.
package tc_pkg;

  // soft symbols / LLRs: 6-bit two's complement, symmetric range +-31
  localparam int unsigned SOFT_W   = 6;
  localparam int          SOFT_MAX = (1 << (SOFT_W - 1)) - 1;

  // code geometry
  localparam int unsigned NB_ROWS  = 4;              // block rows  (n-k)/Q
  localparam int unsigned NB_COLS  = 8;              // block cols  n/Q
  localparam int unsigned N_EDGE   = 32;             // edge groups (memory banks)
  localparam int unsigned ROW_DEG  = 8;              // check degree
  localparam int unsigned MAX_VDEG = 5;              // max variable degree
  localparam int unsigned Q_MAX    = 64;
  localparam int unsigned N_MAX    = NB_COLS * Q_MAX; // 512
  localparam int unsigned M_MAX    = NB_ROWS * Q_MAX; // 256

  typedef enum logic {
    CODE_128_64  = 1'b0,   // deep-space code, Q = 16
    CODE_512_256 = 1'b1    // near-earth code, Q = 64
  } code_e;

  typedef struct packed {
    logic [1:0] row;       // block row
    logic [2:0] col;       // block column
    logic [5:0] s16;       // shift for Q = 16
    logic [5:0] s64;       // shift for Q = 64
  } edge_t;

  // edge group e = 8*row + slot
  localparam edge_t EDGES [N_EDGE] = '{
    '{2'd0,3'd0,6'd0 ,6'd0 }, '{2'd0,3'd0,6'd7 ,6'd63}, '{2'd0,3'd1,6'd2 ,6'd30}, '{2'd0,3'd2,6'd14,6'd50},
    '{2'd0,3'd3,6'd6 ,6'd25}, '{2'd0,3'd5,6'd0 ,6'd43}, '{2'd0,3'd6,6'd13,6'd62}, '{2'd0,3'd7,6'd0 ,6'd0 },
    '{2'd1,3'd0,6'd6 ,6'd56}, '{2'd1,3'd1,6'd0 ,6'd0 }, '{2'd1,3'd1,6'd15,6'd61}, '{2'd1,3'd2,6'd0 ,6'd50},
    '{2'd1,3'd3,6'd1 ,6'd23}, '{2'd1,3'd4,6'd0 ,6'd0 }, '{2'd1,3'd6,6'd0 ,6'd37}, '{2'd1,3'd7,6'd7 ,6'd26},
    '{2'd2,3'd0,6'd4 ,6'd16}, '{2'd2,3'd1,6'd1 ,6'd0 }, '{2'd2,3'd2,6'd0 ,6'd0 }, '{2'd2,3'd2,6'd15,6'd55},
    '{2'd2,3'd3,6'd14,6'd27}, '{2'd2,3'd4,6'd11,6'd56}, '{2'd2,3'd5,6'd0 ,6'd0 }, '{2'd2,3'd7,6'd3 ,6'd43},
    '{2'd3,3'd0,6'd0 ,6'd35}, '{2'd3,3'd1,6'd1 ,6'd56}, '{2'd3,3'd2,6'd9 ,6'd62}, '{2'd3,3'd3,6'd0 ,6'd0 },
    '{2'd3,3'd3,6'd13,6'd11}, '{2'd3,3'd4,6'd14,6'd58}, '{2'd3,3'd5,6'd1 ,6'd3 }, '{2'd3,3'd6,6'd0 ,6'd0 }
  };

  // edge groups of each block column (first COL_DEG entries are valid)
  localparam int unsigned COL_DEG [NB_COLS] = '{5, 5, 5, 5, 3, 3, 3, 3};
  localparam int unsigned COL_EDGE [NB_COLS][MAX_VDEG] = '{
    '{0, 1, 8, 16, 24}, '{2, 9, 10, 17, 25}, '{3, 11, 18, 19, 26}, '{4, 12, 20, 27, 28},
    '{13, 21, 29, 0, 0}, '{5, 22, 30, 0, 0}, '{6, 14, 31, 0, 0}, '{7, 15, 23, 0, 0}
  };

  function automatic logic [5:0] edge_shift(input int unsigned e, input code_e code);
    return (code == CODE_512_256) ? EDGES[e].s64 : EDGES[e].s16;
  endfunction

  // frame synchronization sequences (bit 0 sent as +1, bit 1 as -1;
  // MSB is the first symbol on the link)
  localparam int unsigned START_LEN = 64;
  localparam int unsigned TAIL_LEN  = 128;
  localparam logic [START_LEN-1:0] START_SEQ = 64'h0347_76C7_2728_95B0;
  localparam logic [TAIL_LEN-1:0]  TAIL_SEQ  =
      128'h5555_5556_AAAA_AAAA_5555_5555_5555_5555;

  // MRB Part 2 geometry for LDPC(128,64)
  localparam int unsigned MRB_K = 64;
  localparam int unsigned MRB_N = 128;
  localparam int unsigned DIST_W = 13;   // sum of 128 magnitudes <= 31

  function automatic logic [SOFT_W-2:0] soft_mag(input logic signed [SOFT_W-1:0] y);
    logic [SOFT_W-1:0] a;
    a = (y < 0) ? SOFT_W'(-y) : SOFT_W'(y);
    return (a > SOFT_W'(SOFT_MAX)) ? (SOFT_W-1)'(SOFT_MAX) : a[SOFT_W-2:0];
  endfunction

endpackage
