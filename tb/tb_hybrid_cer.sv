// tb_hybrid_cer: error-rate spot check of the hybrid (NMS + MRB) decoding of
// LDPC(128,64) at Es/N0 = 0.7 dB, the point where the hybrid decoder is meant
// to reach a codeword error rate of about 1e-5 while NMS alone is far worse.
//
// Random codewords (built from a row-echelon form of the parity-check
// matrix) are sent as +-8 plus Gaussian noise, rounded and clipped to 6-bit
// symbols. Each word goes to the NMS decoder (50 iterations). When NMS
// fails, a behavioural model of MRB Part 1 written here (sort by
// reliability, Gauss-Jordan elimination of a generator matrix, first
// candidate) loads the MRB Part 2 unit, which searches 400,000 test error
// patterns of order <= 4 with no quick escape. The testbench checks that:
// every MRB result is a codeword and its reported distance is right; every
// MRB search fits in the 27.9 ms (2,790,000 clocks at 100 MHz) budget of a
// 2 kbps link; the hybrid word error rate at 0.7 dB stays below 3 % and
// is no worse than that of NMS alone. A few hundred words cannot measure
// 1e-5, so a second point at -0.5 dB, where NMS fails often, shows that the
// MRB stage corrects words NMS cannot. The counts of both are printed.
module tb_hybrid_cer;
  import tc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // NMS decoder
  code_e code_sel = CODE_128_64;
  logic llr_we = 0, llr_page = 0, start = 0, start_page = 0;
  logic [8:0] llr_addr = '0;
  logic signed [SOFT_W-1:0] llr_data = '0;
  logic busy, done, success;
  logic [6:0] iters;
  logic [N_MAX-1:0] dec_bits;

  nms_decoder u_nms (.clk, .rst_n, .code_sel, .llr_we, .llr_page, .llr_addr, .llr_data,
                     .start, .start_page, .busy, .done, .success, .iters, .dec_bits);

  // MRB Part 2
  logic g_we = 0, fc_we = 0, rx_we = 0, m_start = 0;
  logic [5:0] g_row = '0;
  logic [MRB_N-1:0] g_data = '0, fc_data = '0;
  logic [6:0] rx_addr = '0;
  logic signed [SOFT_W-1:0] rx_data = '0;
  logic [2:0] order = 3'd4;
  logic [19:0] max_teps = 20'd400_000;
  logic [DIST_W-1:0] qe_thr = '0;
  logic m_busy, m_done, quick_escape;
  logic [MRB_N-1:0] best_cw;
  logic [DIST_W-1:0] best_dist;
  logic [6:0] best_tep [4];
  logic [19:0] tep_count;

  mrb_part2 u_mrb (.clk, .rst_n, .g_we, .g_row, .g_data, .fc_we, .fc_data, .rx_we, .rx_addr,
                   .rx_data, .start(m_start), .order, .max_teps, .qe_thr, .busy(m_busy),
                   .done(m_done), .quick_escape, .best_cw, .best_dist, .best_tep, .tep_count);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- code construction ----------------
  localparam int Q = 16, NC = 128, MC = 64;
  logic [NC-1:0] H [MC];
  int pivcol [MC];
  int rank;
  bit is_piv [NC];

  task automatic build_code();
    int r = 0;
    for (int i = 0; i < MC; i++) H[i] = '0;
    for (int e = 0; e < N_EDGE; e++)
      for (int i = 0; i < Q; i++)
        H[int'(EDGES[e].row) * Q + i][int'(EDGES[e].col) * Q + (i + int'(EDGES[e].s16)) % Q] ^= 1'b1;
    for (int j = 0; j < NC; j++) is_piv[j] = 0;
    for (int j = 0; j < NC && r < MC; j++) begin
      int p = -1;
      for (int i = r; i < MC; i++) if (H[i][j]) begin p = i; break; end
      if (p < 0) continue;
      begin logic [NC-1:0] t = H[p]; H[p] = H[r]; H[r] = t; end
      for (int i = 0; i < MC; i++) if (i != r && H[i][j]) H[i] ^= H[r];
      pivcol[r] = j; is_piv[j] = 1; r++;
    end
    rank = r;
  endtask

  function automatic logic [NC-1:0] encode(logic [NC-1:0] freebits);
    logic [NC-1:0] cw = '0;
    for (int j = 0; j < NC; j++) if (!is_piv[j]) cw[j] = freebits[j];
    for (int r = 0; r < rank; r++) cw[pivcol[r]] = ^(H[r] & cw);
    return cw;
  endfunction

  function automatic bit is_codeword(logic [NC-1:0] cw);
    for (int r = 0; r < rank; r++) if (^(H[r] & cw)) return 0;
    return 1;
  endfunction

  // ---------------- MRB Part 1 model ----------------
  logic [NC-1:0] Gb [MRB_K];
  int pos [NC];

  task automatic make_generator();
    int nfree = 0;
    for (int j = 0; j < NC && nfree < MRB_K; j++) if (!is_piv[j]) begin
      logic [NC-1:0] f = '0;
      f[j] = 1'b1;
      Gb[nfree] = encode(f);
      nfree++;
    end
  endtask

  task automatic mrb_load(int y [NC]);
    int perm [NC], ord [NC], npiv = 0;
    logic [NC-1:0] R [MRB_K], Gs [MRB_K], fc;
    bit used [NC];
    for (int j = 0; j < NC; j++) perm[j] = j;
    for (int a = 1; a < NC; a++) begin
      int v = perm[a], b = a - 1;
      int mv = y[v] < 0 ? -y[v] : y[v];
      while (b >= 0 && (y[perm[b]] < 0 ? -y[perm[b]] : y[perm[b]]) < mv) begin
        perm[b+1] = perm[b]; b--;
      end
      perm[b+1] = v;
    end
    for (int i = 0; i < MRB_K; i++)
      for (int j = 0; j < NC; j++) R[i][j] = Gb[i][perm[j]];
    for (int j = 0; j < NC; j++) used[j] = 0;
    for (int j = 0; j < NC && npiv < MRB_K; j++) begin
      int p = -1;
      for (int i = npiv; i < MRB_K; i++) if (R[i][j]) begin p = i; break; end
      if (p < 0) continue;
      begin logic [NC-1:0] t = R[p]; R[p] = R[npiv]; R[npiv] = t; end
      for (int i = 0; i < MRB_K; i++) if (i != npiv && R[i][j]) R[i] ^= R[npiv];
      ord[npiv] = j; used[j] = 1; npiv++;
    end
    begin
      int k2 = npiv;
      for (int j = 0; j < NC; j++) if (!used[j]) begin ord[k2] = j; k2++; end
    end
    for (int i = 0; i < MRB_K; i++)
      for (int j = 0; j < NC; j++) Gs[i][j] = R[i][ord[j]];
    for (int j = 0; j < NC; j++) pos[j] = perm[ord[j]];
    fc = '0;
    for (int i = 0; i < MRB_K; i++) if (y[pos[i]] < 0) fc ^= Gs[i];
    for (int i = 0; i < MRB_K; i++) begin
      @(negedge clk); g_we = 1; g_row = 6'(i); g_data = Gs[i];
    end
    @(negedge clk); g_we = 0; fc_we = 1; fc_data = fc;
    for (int j = 0; j < NC; j++) begin
      @(negedge clk); fc_we = 0; rx_we = 1; rx_addr = 7'(j); rx_data = SOFT_W'(y[pos[j]]);
    end
    @(negedge clk); rx_we = 0;
  endtask

  // ---------------- channel ----------------
  function automatic real gauss();
    real u1 = (real'($urandom) + 1.0) / 4294967297.0;
    real u2 = (real'($urandom) + 1.0) / 4294967297.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  int mrb_runs = 0, bad_mrb = 0, worst_mrb = 0;

  task automatic point(real esn0_db, int words, output int nms_err, output int hyb_err);
    real amp = 8.0;
    real sigma = amp / $sqrt(2.0 * (10.0 ** (esn0_db / 10.0)));
    int runs0 = mrb_runs;
    nms_err = 0; hyb_err = 0;
    for (int w = 0; w < words; w++) begin
      logic [NC-1:0] sent, f, got;
      int y [NC];
      for (int i = 0; i < NC / 32; i++) f[i*32 +: 32] = $urandom;
      sent = encode(f);
      for (int j = 0; j < NC; j++) begin
        int v = int'($floor((sent[j] ? -amp : amp) + sigma * gauss() + 0.5));
        y[j] = v > SOFT_MAX ? SOFT_MAX : (v < -SOFT_MAX ? -SOFT_MAX : v);
      end
      // NMS attempt
      for (int j = 0; j < NC; j++) begin
        @(negedge clk); llr_we = 1; llr_page = 1'b0; llr_addr = 9'(j); llr_data = SOFT_W'(y[j]);
      end
      @(negedge clk); llr_we = 0; start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      got = dec_bits[NC-1:0];
      if (!success || got != sent) nms_err++;
      // MRB when NMS fails
      if (!success) begin
        int t0, lat, d = 0;
        mrb_load(y);
        @(negedge clk); m_start = 1; t0 = cyc;
        @(negedge clk); m_start = 0;
        while (!m_done) @(negedge clk);
        lat = cyc - t0;
        mrb_runs++;
        if (lat > worst_mrb) worst_mrb = lat;
        for (int j = 0; j < NC; j++) got[pos[j]] = best_cw[j];
        for (int j = 0; j < NC; j++) if (got[j] != (y[j] < 0)) d += (y[j] < 0 ? -y[j] : y[j]);
        if (!is_codeword(got) || d != int'(best_dist)) bad_mrb++;
      end
      if (got != sent) hyb_err++;
    end
    $display("Es/N0 %0.1f dB, %0d words: NMS alone %0d wrong, hybrid %0d wrong, %0d MRB searches",
             esn0_db, words, nms_err, hyb_err, mrb_runs - runs0);
  endtask

  initial begin
    int n_hi, h_hi, n_lo, h_lo;
    build_code();
    make_generator();
    repeat (3) @(negedge clk);
    rst_n = 1;
    point(0.7, 150, n_hi, h_hi);
    point(-0.5, 40, n_lo, h_lo);
    checks += 6;
    if (mrb_runs == 0)            begin failures++; $display("NMS never failed: MRB not exercised"); end
    if (bad_mrb != 0)             begin failures++; $display("%0d MRB results not codewords or with a wrong distance", bad_mrb); end
    if (worst_mrb > 2_790_000)    begin failures++; $display("MRB search took %0d clocks", worst_mrb); end
    if (h_hi > n_hi)              begin failures++; $display("hybrid worse than NMS at 0.7 dB"); end
    if (h_lo >= n_lo)             begin failures++; $display("hybrid no better than NMS at -0.5 dB"); end
    if (h_hi * 100 > 3 * 150)     begin failures++; $display("hybrid word error rate too high at 0.7 dB"); end
    $display("worst MRB search %0d clocks", worst_mrb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
