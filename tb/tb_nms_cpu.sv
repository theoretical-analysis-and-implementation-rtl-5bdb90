// tb_nms_cpu: checks the check-node unit against the normalized min-sum rule
// (alpha = 3/4) on random and corner-case message sets, and checks the
// two-clock latency from ld_in to valid outputs.
module tb_nms_cpu;
  import tc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic ld_in = 0, ld_min = 0;
  logic signed [SOFT_W-1:0] v2c [ROW_DEG];
  logic signed [SOFT_W-1:0] c2v [ROW_DEG];
  nms_cpu dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int v [ROW_DEG];
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < ROW_DEG; i++) begin
        v[i] = int'($urandom_range(0, 62)) - 31;
        if (t < 20) v[i] = (t % 2) ? -31 : int'($urandom_range(0, 2)) - 1;  // corners
        v2c[i] = SOFT_W'(v[i]);
      end
      @(negedge clk); ld_in = 1;
      @(negedge clk); ld_in = 0; ld_min = 1;
      @(negedge clk); ld_min = 0;
      for (int i = 0; i < ROW_DEG; i++) begin
        automatic int m = 99, neg = 0, expv;
        for (int j = 0; j < ROW_DEG; j++) if (j != i) begin
          automatic int a = v[j] < 0 ? -v[j] : v[j];
          if (a < m) m = a;
          if (v[j] < 0) neg ^= 1;
        end
        expv = (m * 3) / 4;
        if (neg) expv = -expv;
        checks++;
        if (int'(c2v[i]) != expv) begin
          failures++;
          $display("t=%0d i=%0d got %0d expected %0d", t, i, c2v[i], expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
