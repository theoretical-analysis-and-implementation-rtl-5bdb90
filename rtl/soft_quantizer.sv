// soft_quantizer: turns the demodulator's soft symbol estimates into the
// 6-bit soft symbols used by frame synchronization and decoding.
//
// Each input sample (IN_W-bit two's complement) is scaled by 2**-shift with
// rounding to nearest and saturated symmetrically, to +-31 in 6-bit mode or
// to +-3 in 3-bit mode (q3 = 1). A 3-bit value v is put on the 6-bit bus as
// 8*v (levels 0, +-8, +-16, +-24), so that the decoder's integer message
// arithmetic, whose normalization by 3/4 would round small values to zero,
// keeps its resolution. One clock of latency: out_valid follows in_valid by
// one clock.
// The two resolutions (3 and 6 bits) and the per-scenario configuration come
// from the design description; the scaling by a power of two, the rounding
// and the input width are this design's choices.
module soft_quantizer
  import tc_pkg::*;
#(
  parameter int unsigned IN_W = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   in_sample,
  input  logic                     q3,
  input  logic [3:0]               shift,
  output logic                     out_valid,
  output logic signed [SOFT_W-1:0] out_sym
);
  logic signed [IN_W+1:0] rnd, scaled, lim, clipped;

  always_comb begin
    rnd    = (shift == 4'd0) ? '0 : ((IN_W+2)'(1) <<< (shift - 4'd1));
    scaled = ((IN_W+2)'(in_sample) + rnd) >>> shift;
    lim    = q3 ? (IN_W+2)'(3) : (IN_W+2)'(SOFT_MAX);
    if (scaled > lim)       clipped = lim;
    else if (scaled < -lim) clipped = -lim;
    else                    clipped = scaled;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= q3 ? SOFT_W'(clipped <<< 3) : SOFT_W'(clipped);
      end
    end
  end
endmodule
