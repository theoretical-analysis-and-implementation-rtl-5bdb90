// tb_nms_vpu: checks the variable-node unit: total = LLR + sum of check
// messages, extrinsic outputs saturated to +-31, hard decision = total < 0,
// the init mode (check messages ignored) and the three-clock latency.
module tb_nms_vpu;
  import tc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic ld_in = 0, ld_sum = 0, ld_ext = 0, init = 0;
  logic signed [SOFT_W-1:0] llr;
  logic signed [SOFT_W-1:0] c2v [MAX_VDEG];
  logic signed [SOFT_W-1:0] v2c [MAX_VDEG];
  logic hard;
  nms_vpu dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sat(int x);
    return x > 31 ? 31 : (x < -31 ? -31 : x);
  endfunction
  initial begin
    int l, c [MAX_VDEG], tot;
    for (int t = 0; t < 400; t++) begin
      l = int'($urandom_range(0, 62)) - 31;
      init = (t % 7 == 0);
      for (int d = 0; d < MAX_VDEG; d++) begin
        c[d] = int'($urandom_range(0, 62)) - 31;
        if (t % 5 == 0 && d >= 3) c[d] = 0;   // degree-3 column
        c2v[d] = SOFT_W'(c[d]);
      end
      llr = SOFT_W'(l);
      @(negedge clk); ld_in = 1;
      @(negedge clk); ld_in = 0; ld_sum = 1;
      @(negedge clk); ld_sum = 0; ld_ext = 1;
      @(negedge clk); ld_ext = 0;
      tot = l;
      if (!init) for (int d = 0; d < MAX_VDEG; d++) tot += c[d];
      checks++;
      if (hard != (tot < 0)) begin failures++; $display("t=%0d hard wrong", t); end
      for (int d = 0; d < MAX_VDEG; d++) begin
        automatic int e = sat(tot - (init ? 0 : c[d]));
        checks++;
        if (int'(v2c[d]) != e) begin failures++; $display("t=%0d d=%0d got %0d exp %0d", t, d, v2c[d], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
