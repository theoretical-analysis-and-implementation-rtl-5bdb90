// tb_soft_quantizer: checks rounding, scaling and symmetric saturation in
// 6-bit and 3-bit modes against an integer model, and the one-clock latency.
module tb_soft_quantizer;
  import tc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 0, q3 = 0;
  logic signed [11:0] in_sample = '0;
  logic [3:0] shift = '0;
  logic out_valid;
  logic signed [SOFT_W-1:0] out_sym;
  soft_quantizer dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int x, e, lim;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      x = int'($urandom_range(0, 4095)) - 2048;
      @(negedge clk);
      in_valid = 1; in_sample = 12'(x); q3 = t[0]; shift = 4'($urandom_range(0, 7));
      // model: floor((x + 2^(s-1)) / 2^s), then clip
      e = (shift == 0) ? x : $floor(real'(x + (1 << (shift - 1))) / real'(1 << shift));
      lim = q3 ? 3 : 31;
      if (e > lim) e = lim;
      if (e < -lim) e = -lim;
      if (q3) e = 8 * e;
      @(negedge clk); in_valid = 0;
      checks += 2;
      if (!out_valid) begin failures++; $display("no out_valid"); end
      if (int'(out_sym) != e) begin failures++; $display("x=%0d s=%0d q3=%0d got %0d exp %0d", x, shift, q3, out_sym, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
