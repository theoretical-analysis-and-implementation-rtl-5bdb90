// tb_nms_cer: codeword-error-rate spot checks of the NMS decoder at the
// operating points the receiver is specified for.
//
// The decoder is symmetric in the transmitted codeword, so the all-zero
// codeword is sent (every symbol +A) over an additive white Gaussian noise
// channel. Each received symbol is rounded and clipped to the decoder's input
// format as the soft quantizer does it: 6-bit (+-31, A = 8), or 3-bit
// (+-3 after a scaling by 1/4, carried on the bus as 8 times the value).
// A word counts as an error when the decoder reports failure or returns any
// nonzero bit. Points (Es/N0 in dB) are those at which the receiver is meant
// to reach a codeword error rate of about 1e-5: LDPC(128,64) at 2.5 dB with
// 6-bit and 2.7 dB with 3-bit symbols, and LDPC(512,256) at 0.8 dB with
// 6-bit symbols. A few hundred words cannot measure 1e-5, so each point is
// only required to stay below 2 %; a point far below threshold (-2 dB)
// must instead fail on most words, which shows that the check can fail.
// The average iteration count and the worst-case latency of each point are
// printed, and the per-iteration clock count is checked on every word.
module tb_nms_cer;
  import tc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  code_e code_sel = CODE_128_64;
  logic llr_we = 0, llr_page = 0, start = 0, start_page = 0;
  logic [8:0] llr_addr = '0;
  logic signed [SOFT_W-1:0] llr_data = '0;
  logic busy, done, success;
  logic [6:0] iters;
  logic [N_MAX-1:0] dec_bits;

  nms_decoder dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1 = (real'($urandom) + 1.0) / 4294967297.0;
    real u2 = (real'($urandom) + 1.0) / 4294967297.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int quant(real y, bit q3);
    int v, lim;
    lim = q3 ? 3 : SOFT_MAX;
    v = q3 ? int'($floor(y / 4.0 + 0.5)) : int'($floor(y + 0.5));
    if (v > lim) v = lim;
    if (v < -lim) v = -lim;
    return q3 ? 8 * v : v;
  endfunction

  // decode `words` noisy all-zero codewords; returns the number of errors
  task automatic point(code_e c, real esn0_db, bit q3, int words, string tag, output int errs);
    int q = (c == CODE_512_256) ? 64 : 16;
    int n = 8 * q;
    real amp = 8.0;
    real sigma = amp / $sqrt(2.0 * (10.0 ** (esn0_db / 10.0)));
    int it_sum = 0, worst = 0, lat_err = 0;
    errs = 0;
    code_sel = c;
    for (int w = 0; w < words; w++) begin
      int t0, lat;
      for (int v = 0; v < n; v++) begin
        @(negedge clk);
        llr_we = 1; llr_page = w[0]; llr_addr = 9'(v);
        llr_data = SOFT_W'(quant(amp + sigma * gauss(), q3));
      end
      @(negedge clk);
      llr_we = 0; start = 1; start_page = w[0]; t0 = cyc;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      lat = cyc - t0;
      if (lat != (40*q + 1) + int'(iters) * (56*q + 1) + 2) lat_err++;
      if (!success || (dec_bits & ((N_MAX'(1) << n) - N_MAX'(1))) != '0) errs++;
      it_sum += int'(iters);
      if (lat > worst) worst = lat;
    end
    checks++;
    if (lat_err != 0) begin failures++; $display("%s: %0d words with unexpected latency", tag, lat_err); end
    $display("%s: Es/N0 %0.1f dB, %0d-bit: %0d of %0d words wrong, mean iterations %0.2f, worst latency %0d clocks",
             tag, esn0_db, q3 ? 3 : 6, errs, words, real'(it_sum) / words, worst);
  endtask

  initial begin
    int e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    point(CODE_128_64, 2.5, 0, 1000, "LDPC(128,64)", e);
    checks++; if (e * 50 > 1000) begin failures++; $display("CER too high"); end
    point(CODE_128_64, 2.7, 1, 1000, "LDPC(128,64)", e);
    checks++; if (e * 50 > 1000) begin failures++; $display("CER too high"); end
    point(CODE_512_256, 0.8, 0, 200, "LDPC(512,256)", e);
    checks++; if (e * 50 > 200) begin failures++; $display("CER too high"); end
    point(CODE_128_64, -2.0, 0, 100, "LDPC(128,64)", e);
    checks++; if (e < 50) begin failures++; $display("too few errors far below threshold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
