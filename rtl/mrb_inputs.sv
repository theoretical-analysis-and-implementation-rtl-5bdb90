// mrb_inputs: input memories of the MRB Part 2 unit, written by the software
// that runs MRB Part 1 (sorting by reliability and Gauss-Jordan elimination).
//
//   G*   : K rows of N bits (64 x 128 = 8 kbit), the systematic generator
//          matrix for the K most reliable positions; written a row at a time.
//   FC   : N-bit register, the first candidate codeword v* G*.
//   RxCW : N soft symbols of SOFT_W bits (128 x 6 = 768 bits), the received
//          word in the same reordered positions; written a symbol at a time.
// Reads are combinational. NR row-read ports take an index 0..K, where 0
// gives an all-zero row (an unused TEP index) and i gives row i-1. The
// received word is offered as hard decisions (1 = negative symbol) and 5-bit
// reliabilities. Contents, sizes and the split between software and hardware
// follow the design description; the port style is this design's choice.
module mrb_inputs
  import tc_pkg::*;
#(
  parameter int unsigned K  = MRB_K,
  parameter int unsigned N  = MRB_N,
  parameter int unsigned NR = 6,
  parameter int unsigned IW = 7
) (
  input  logic                     clk,
  input  logic                     g_we,
  input  logic [$clog2(K)-1:0]     g_row,
  input  logic [N-1:0]             g_data,
  input  logic                     fc_we,
  input  logic [N-1:0]             fc_data,
  input  logic                     rx_we,
  input  logic [$clog2(N)-1:0]     rx_addr,
  input  logic signed [SOFT_W-1:0] rx_data,
  input  logic [IW-1:0]            rd_idx [NR],
  output logic [N-1:0]             rd_row [NR],
  output logic [N-1:0]             fc,
  output logic [N-1:0]             rx_hard,
  output logic [SOFT_W-2:0]        rx_mag [N]
);
  logic [N-1:0]             gmem [K];
  logic signed [SOFT_W-1:0] rxcw [N];

  always_ff @(posedge clk) begin
    if (g_we)  gmem[g_row]   <= g_data;
    if (fc_we) fc            <= fc_data;
    if (rx_we) rxcw[rx_addr] <= rx_data;
  end

  always_comb begin
    for (int r = 0; r < NR; r++)
      rd_row[r] = (rd_idx[r] == '0 || rd_idx[r] > IW'(K)) ? '0
                : gmem[$clog2(K)'(rd_idx[r] - IW'(1))];
    for (int j = 0; j < N; j++) begin
      rx_hard[j] = rxcw[j][SOFT_W-1];
      rx_mag[j]  = soft_mag(rxcw[j]);
    end
  end
endmodule
