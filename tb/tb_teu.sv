// tb_teu: feeds a TEU (C = 8, 16 slices) with random pre-encoded words, G*
// rows and received words; checks the candidate codeword (pre ^ row) and the
// distance (sum of |y| over positions where the candidate bit differs from
// the sign of y) after the 16 clocks of one TEP, for back-to-back TEPs.
module tb_teu;
  import tc_pkg::*;
  localparam int N = 128, C = 8, M = N / C;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en = 0, clear = 0;
  logic [3:0] slice_idx = '0;
  logic [C-1:0] pre_slice, g_slice, rx_hard;
  logic [SOFT_W-2:0] rx_mag [C];
  logic [DIST_W-1:0] dsum;
  logic [N-1:0] cand;
  teu dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [N-1:0] pre, g, h;
    int mag [N], d;
    for (int t = 0; t < 100; t++) begin
      pre = {$urandom, $urandom, $urandom, $urandom};
      g   = {$urandom, $urandom, $urandom, $urandom};
      h   = {$urandom, $urandom, $urandom, $urandom};
      d = 0;
      for (int j = 0; j < N; j++) begin
        mag[j] = int'($urandom_range(0, 31));
        if ((pre[j] ^ g[j]) != h[j]) d += mag[j];
      end
      for (int s = 0; s < M; s++) begin
        @(negedge clk);
        en = 1; clear = (s == 0); slice_idx = 4'(s);
        pre_slice = pre[s*C +: C]; g_slice = g[s*C +: C]; rx_hard = h[s*C +: C];
        for (int j = 0; j < C; j++) rx_mag[j] = 5'(mag[s*C + j]);
      end
      @(negedge clk); en = 0;
      checks += 2;
      if (int'(dsum) != d) begin failures++; $display("t=%0d dist %0d exp %0d", t, dsum, d); end
      if (cand != (pre ^ g)) begin failures++; $display("t=%0d candidate wrong", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
