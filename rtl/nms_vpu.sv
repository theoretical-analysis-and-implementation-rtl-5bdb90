// nms_vpu: variable-node processing unit (VPU) of the serial NMS LDPC decoder.
//
// Performs the vertical step for one code bit. The channel LLR and up to five
// check-to-variable messages are latched (ld_in); their sum is latched
// (ld_sum); then the extrinsic variable-to-check messages
//     v2c_e = sat(total - c2v_e)
// and the hard decision (1 when total < 0) are latched (ld_ext). Unused
// inputs (degree-3 columns) must be driven with zero. With init set, the
// check messages are taken as zero, so that v2c = LLR: this is how the
// decoder seeds the messages before the first iteration.
// Timing: ld_in in cycle t, ld_sum in t+1, ld_ext in t+2, outputs from t+3.
// Saturation of the messages to +-31 is this design's choice.
module nms_vpu
  import tc_pkg::*;
(
  input  logic                     clk,
  input  logic                     ld_in,
  input  logic                     ld_sum,
  input  logic                     ld_ext,
  input  logic                     init,
  input  logic signed [SOFT_W-1:0] llr,
  input  logic signed [SOFT_W-1:0] c2v [MAX_VDEG],
  output logic signed [SOFT_W-1:0] v2c [MAX_VDEG],
  output logic                     hard
);
  localparam int unsigned TW = SOFT_W + 4;   // wide enough for 6 terms

  logic signed [SOFT_W-1:0] llr_q;
  logic signed [SOFT_W-1:0] c2v_q [MAX_VDEG];
  logic signed [TW-1:0]     tot_q;
  logic signed [TW-1:0]     sum;

  function automatic logic signed [SOFT_W-1:0] sat(input logic signed [TW-1:0] x);
    if (x > TW'(SOFT_MAX))       return SOFT_W'(SOFT_MAX);
    else if (x < -TW'(SOFT_MAX)) return -SOFT_W'(SOFT_MAX);
    else                         return SOFT_W'(x);
  endfunction

  always_comb begin
    sum = TW'(llr_q);
    for (int i = 0; i < MAX_VDEG; i++) sum = sum + TW'(c2v_q[i]);
  end

  always_ff @(posedge clk) begin
    if (ld_in) begin
      llr_q <= llr;
      for (int i = 0; i < MAX_VDEG; i++) c2v_q[i] <= init ? '0 : c2v[i];
    end
    if (ld_sum) tot_q <= sum;
    if (ld_ext) begin
      for (int i = 0; i < MAX_VDEG; i++) v2c[i] <= sat(tot_q - TW'(c2v_q[i]));
      hard <= tot_q[TW-1];
    end
  end
endmodule
