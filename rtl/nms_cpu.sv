// nms_cpu: check-node processing unit (CPU) of the serial NMS LDPC decoder.
//
// Performs the horizontal step of normalized min-sum for one parity-check row
// of degree 8. The eight variable-to-check messages are latched (ld_in),
// then the minimum, the second minimum, the position of the minimum and the
// product of the signs are latched (ld_min). From these registers the unit
// drives, combinationally, the eight check-to-variable messages
//     c2v_i = alpha * prod_{j!=i} sign(v_j) * min_{j!=i} |v_j| .
// alpha = ALPHA_NUM / 2**ALPHA_SHIFT (default 3/4, rounded down). The
// min-sum rule and the unit count follow the design description; the value
// of alpha and the two register stages are this design's choice.
// Timing: ld_in in cycle t, ld_min in t+1, c2v valid from t+2.
module nms_cpu
  import tc_pkg::*;
#(
  parameter int unsigned ALPHA_NUM   = 3,
  parameter int unsigned ALPHA_SHIFT = 2
) (
  input  logic                     clk,
  input  logic                     ld_in,
  input  logic                     ld_min,
  input  logic signed [SOFT_W-1:0] v2c [ROW_DEG],
  output logic signed [SOFT_W-1:0] c2v [ROW_DEG]
);
  localparam int unsigned MW = SOFT_W - 1;

  logic signed [SOFT_W-1:0] vin [ROW_DEG];
  logic [MW-1:0]   min1_q, min2_q;
  logic [2:0]      idx_q;
  logic            sprod_q;
  logic [ROW_DEG-1:0] sgn_q;

  logic [MW-1:0] min1, min2, mag;
  logic [2:0]    idx;
  logic          sprod;

  always_comb begin
    min1  = '1;
    min2  = '1;
    idx   = '0;
    sprod = 1'b0;
    for (int i = 0; i < ROW_DEG; i++) begin
      mag   = soft_mag(vin[i]);
      sprod = sprod ^ vin[i][SOFT_W-1];
      if (mag < min1) begin
        min2 = min1;
        min1 = mag;
        idx  = 3'(i);
      end else if (mag < min2) begin
        min2 = mag;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ld_in) vin <= v2c;
    if (ld_min) begin
      min1_q  <= min1;
      min2_q  <= min2;
      idx_q   <= idx;
      sprod_q <= sprod;
      for (int i = 0; i < ROW_DEG; i++) sgn_q[i] <= vin[i][SOFT_W-1];
    end
  end

  always_comb begin
    for (int i = 0; i < ROW_DEG; i++) begin
      logic [MW-1:0]        m;
      logic [MW+ALPHA_SHIFT+1:0] scaled;
      logic signed [SOFT_W-1:0] out;
      m      = (idx_q == 3'(i)) ? min2_q : min1_q;
      scaled = ((MW+ALPHA_SHIFT+2)'(m) * (MW+ALPHA_SHIFT+2)'(ALPHA_NUM)) >> ALPHA_SHIFT;
      out    = SOFT_W'(scaled);
      c2v[i] = (sprod_q ^ sgn_q[i]) ? -out : out;
    end
  end
endmodule
