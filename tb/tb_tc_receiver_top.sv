// tb_tc_receiver_top: end-to-end test of the TC receiver core at its default
// parameters.
//
// The testbench builds real codewords of both LDPC codes (it reduces the
// parity-check matrix of tc_pkg to row-echelon form and fills the free bits
// at random), wraps them into CLTUs (acquisition pattern, 64-symbol start
// sequence, codewords, optional 128-symbol tail) and sends them as noisy
// demodulator samples, one every SPACING clocks. Each decoded codeword must
// come back intact. It also plays the software side of the hybrid decoder:
// for an LDPC(128,64) word, a behavioural model of MRB Part 1 (sort by
// reliability, Gauss-Jordan on a generator matrix, first candidate) loads
// the MRB Part 2 unit, whose best candidate, put back in order, must be a
// codeword at the reported distance, and the sent codeword for a lightly
// corrupted word.
// Mechanisms counted (each must happen at least once): start detection in
// both polarities, tail termination, termination by decoding failure,
// decoding after several iterations, NMS failure in deep-space mode (the
// hybrid fallback), both LLR pages used, 3-bit quantization, an MRB search
// run to the end, and an MRB quick escape.
module tb_tc_receiver_top;
  import tc_pkg::*;
  localparam int SPACING = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  code_e code_sel = CODE_128_64;
  logic tail_en = 1, q3 = 0, sample_valid = 0;
  logic [3:0] q_shift = 4'd4;
  logic signed [14:0] start_thr = -15'sd150, tail_thr = -15'sd250;
  logic signed [11:0] sample = '0;
  logic start_det, tail_det, cltu_active, cltu_end, end_by_tail, overrun;
  logic signed [14:0] sync_metric;
  logic [15:0] cw_count;
  logic cw_done, cw_ok;
  logic [6:0] cw_iters;
  logic [N_MAX-1:0] cw_bits;
  logic mrb_g_we = 0, mrb_fc_we = 0, mrb_rx_we = 0, mrb_start = 0;
  logic [5:0] mrb_g_row = '0;
  logic [MRB_N-1:0] mrb_g_data = '0, mrb_fc_data = '0;
  logic [6:0] mrb_rx_addr = '0;
  logic signed [SOFT_W-1:0] mrb_rx_data = '0;
  logic [2:0] mrb_order = 3'd2;
  logic [19:0] mrb_max_teps = 20'd400000;
  logic [DIST_W-1:0] mrb_qe_thr = '0;
  logic mrb_busy, mrb_done, mrb_quick_escape;
  logic [MRB_N-1:0] mrb_best_cw;
  logic [DIST_W-1:0] mrb_best_dist;
  logic [6:0] mrb_best_tep [4];
  logic [19:0] mrb_tep_count;

  tc_receiver_top dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- code construction ----------------
  logic [N_MAX-1:0] H [M_MAX];   // row-echelon form
  int pivcol [M_MAX];
  int rank, ncode, qsz;
  bit is_piv [N_MAX];

  task automatic build_code(code_e c);
    int r = 0;
    qsz = (c == CODE_512_256) ? 64 : 16;
    ncode = 8 * qsz;
    for (int i = 0; i < 4 * qsz; i++) H[i] = '0;
    for (int e = 0; e < N_EDGE; e++) begin
      int s = (c == CODE_512_256) ? int'(EDGES[e].s64) : int'(EDGES[e].s16);
      for (int i = 0; i < qsz; i++)
        H[int'(EDGES[e].row) * qsz + i][int'(EDGES[e].col) * qsz + (i + s) % qsz] ^= 1'b1;
    end
    for (int j = 0; j < N_MAX; j++) is_piv[j] = 0;
    for (int j = 0; j < ncode && r < 4 * qsz; j++) begin
      int p = -1;
      for (int i = r; i < 4 * qsz; i++) if (H[i][j]) begin p = i; break; end
      if (p < 0) continue;
      begin logic [N_MAX-1:0] t = H[p]; H[p] = H[r]; H[r] = t; end
      for (int i = 0; i < 4 * qsz; i++) if (i != r && H[i][j]) H[i] ^= H[r];
      pivcol[r] = j; is_piv[j] = 1; r++;
    end
    rank = r;
  endtask

  // codeword with given free bits (free = non-pivot positions)
  function automatic logic [N_MAX-1:0] encode(logic [N_MAX-1:0] freebits);
    logic [N_MAX-1:0] cw = '0;
    for (int j = 0; j < ncode; j++) if (!is_piv[j]) cw[j] = freebits[j];
    for (int r = 0; r < rank; r++) cw[pivcol[r]] = ^(H[r] & cw);
    return cw;
  endfunction

  function automatic logic [N_MAX-1:0] rand_cw();
    logic [N_MAX-1:0] f;
    for (int w = 0; w < N_MAX / 32; w++) f[w*32 +: 32] = $urandom;
    return encode(f);
  endfunction

  function automatic bit is_codeword(logic [N_MAX-1:0] cw);
    for (int r = 0; r < rank; r++) if (^(H[r] & cw)) return 0;
    return 1;
  endfunction

  // ---------------- link emulation ----------------
  int last_q [N_MAX];    // quantized symbols of the last codeword sent
  logic [N_MAX-1:0] last_sent;
  int nsent;

  function automatic int gauss16(int sigma16);
    int s = 0;
    for (int i = 0; i < 12; i++) s += int'($urandom_range(0, 1000));
    return ((s - 6000) * sigma16) / 1000;
  endfunction

  function automatic int quant(int x);
    int sh = int'(q_shift);
    int lim = q3 ? 3 : 31;
    int v = $floor(real'(x + (1 << (sh - 1))) / real'(1 << sh));
    v = v > lim ? lim : (v < -lim ? -lim : v);
    return q3 ? 8 * v : v;
  endfunction

  task automatic send_sample(bit b, bit inv, int amp16, int sigma16, int idx);
    int x = ((b ^ inv) ? -amp16 : amp16) + gauss16(sigma16);
    if (x > 2047) x = 2047;
    if (x < -2048) x = -2048;
    if (idx >= 0) last_q[idx] = inv ? -quant(x) : quant(x);
    @(negedge clk);
    sample_valid = 1; sample = 12'(x);
    @(negedge clk);
    sample_valid = 0;
    repeat (SPACING - 2) @(negedge clk);
  endtask

  // expected decoder results, in order
  logic [N_MAX-1:0] exp_cw [$];
  bit exp_check [$];
  int n_ok = 0, n_fail = 0, n_multi = 0, n_cmp = 0, n_bad = 0, n_ds_fail = 0;
  bit page_seen [2];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cltu.dec_start) page_seen[dut.u_cltu.dec_page] = 1;
    if (cw_done) begin
      automatic logic [N_MAX-1:0] e = exp_cw.size() ? exp_cw.pop_front() : '0;
      automatic bit chk = exp_check.size() ? exp_check.pop_front() : 1'b0;
      if (cw_ok) n_ok++; else begin n_fail++; if (code_sel == CODE_128_64) n_ds_fail++; end
      if (cw_iters > 1) n_multi++;
      if (chk) begin
        n_cmp++;
        if (!cw_ok || (cw_bits & ((N_MAX'(1) << ncode) - 1)) != e) n_bad++;
      end
    end
  end

  int n_start_up = 0, n_start_inv = 0, n_tail_end = 0, n_fail_end = 0;
  always @(posedge clk) if (rst_n) begin
    if (start_det && !cltu_active) begin
      if (dut.u_fs.polarity) n_start_inv++; else n_start_up++;
    end
    if (cltu_end) begin if (end_by_tail) n_tail_end++; else n_fail_end++; end
  end

  task automatic send_bits(logic [N_MAX-1:0] bits, int len, bit msb_first, bit inv, int amp16,
                           int sigma16, bit keep);
    for (int i = 0; i < len; i++) begin
      int j = msb_first ? len - 1 - i : i;
      send_sample(bits[j], inv, amp16, sigma16, keep ? j : -1);
    end
  endtask

  // one CLTU: acquisition, start, codewords (noise per codeword), tail
  task automatic send_cltu(code_e c, bit inv, int ncw, int amp16, int sigma16,
                           int heavy_idx, bit with_tail);
    logic [N_MAX-1:0] alt;
    for (int i = 0; i < N_MAX; i++) alt[i] = i[0];
    send_bits(alt, 32, 0, inv, amp16, 4, 0);
    send_bits(N_MAX'(START_SEQ), START_LEN, 1, inv, amp16, 4, 0);
    for (int k = 0; k < ncw; k++) begin
      logic [N_MAX-1:0] cw = rand_cw();
      bit heavy = (k == heavy_idx);
      exp_cw.push_back(cw);
      last_sent = cw;
      exp_check.push_back(!heavy);
      send_bits(cw, ncode, 0, inv, heavy ? 16 : amp16, heavy ? 400 : sigma16, 1);
      nsent++;
    end
    if (with_tail) send_bits(N_MAX'(TAIL_SEQ), TAIL_LEN, 1, inv, amp16, 4, 0);
    send_bits(alt, 40, 0, inv, amp16, 4, 0);
    repeat (20) @(negedge clk);
  endtask

  // ---------------- MRB Part 1 model (software side) ----------------
  logic [MRB_N-1:0] Gb [MRB_K];   // generator basis (columns in code order)
  int pos [MRB_N];                // MRB position -> code position

  task automatic make_generator();
    logic [N_MAX-1:0] f;
    int nfree = 0;
    for (int j = 0; j < ncode && nfree < MRB_K; j++) if (!is_piv[j]) begin
      f = '0; f[j] = 1'b1;
      Gb[nfree] = MRB_N'(encode(f));
      nfree++;
    end
  endtask

  task automatic mrb_load(int y [MRB_N]);
    int perm [MRB_N], ord [MRB_N], npiv = 0;
    logic [MRB_N-1:0] R [MRB_K], Gs [MRB_K], fc;
    bit used [MRB_N];
    // sort positions by reliability, most reliable first (stable)
    for (int j = 0; j < MRB_N; j++) perm[j] = j;
    for (int a = 1; a < MRB_N; a++) begin
      int v = perm[a], b = a - 1;
      int mv = y[v] < 0 ? -y[v] : y[v];
      while (b >= 0 && (y[perm[b]] < 0 ? -y[perm[b]] : y[perm[b]]) < mv) begin
        perm[b+1] = perm[b]; b--;
      end
      perm[b+1] = v;
    end
    for (int i = 0; i < MRB_K; i++)
      for (int j = 0; j < MRB_N; j++) R[i][j] = Gb[i][perm[j]];
    // Gauss-Jordan in reliability order
    for (int j = 0; j < MRB_N; j++) used[j] = 0;
    for (int j = 0; j < MRB_N && npiv < MRB_K; j++) begin
      int p = -1;
      for (int i = npiv; i < MRB_K; i++) if (R[i][j]) begin p = i; break; end
      if (p < 0) continue;
      begin logic [MRB_N-1:0] t = R[p]; R[p] = R[npiv]; R[npiv] = t; end
      for (int i = 0; i < MRB_K; i++) if (i != npiv && R[i][j]) R[i] ^= R[npiv];
      ord[npiv] = j; used[j] = 1; npiv++;
    end
    begin
      int k2 = npiv;
      for (int j = 0; j < MRB_N; j++) if (!used[j]) begin ord[k2] = j; k2++; end
    end
    for (int i = 0; i < MRB_K; i++)
      for (int j = 0; j < MRB_N; j++) Gs[i][j] = R[i][ord[j]];
    for (int j = 0; j < MRB_N; j++) pos[j] = perm[ord[j]];
    fc = '0;
    for (int i = 0; i < MRB_K; i++) if (y[pos[i]] < 0) fc ^= Gs[i];
    for (int i = 0; i < MRB_K; i++) begin
      @(negedge clk); mrb_g_we = 1; mrb_g_row = 6'(i); mrb_g_data = Gs[i];
    end
    @(negedge clk); mrb_g_we = 0; mrb_fc_we = 1; mrb_fc_data = fc;
    for (int j = 0; j < MRB_N; j++) begin
      @(negedge clk); mrb_fc_we = 0; mrb_rx_we = 1; mrb_rx_addr = 7'(j);
      mrb_rx_data = SOFT_W'(y[pos[j]]);
    end
    @(negedge clk); mrb_rx_we = 0;
  endtask

  int n_mrb_done = 0, n_mrb_qe = 0;
  task automatic mrb_run(int y [MRB_N], int ord, int thr, bit expect_cw, logic [MRB_N-1:0] sent);
    logic [MRB_N-1:0] c;
    int d = 0;
    mrb_load(y);
    @(negedge clk); mrb_order = 3'(ord); mrb_qe_thr = DIST_W'(thr); mrb_start = 1;
    @(negedge clk); mrb_start = 0;
    while (!mrb_done) @(negedge clk);
    n_mrb_done++;
    if (mrb_quick_escape) n_mrb_qe++;
    for (int j = 0; j < MRB_N; j++) c[pos[j]] = mrb_best_cw[j];
    for (int j = 0; j < MRB_N; j++)
      if (c[j] != (y[j] < 0)) d += (y[j] < 0 ? -y[j] : y[j]);
    checks += 2;
    if (!is_codeword(N_MAX'(c))) begin failures++; $display("MRB result is not a codeword"); end
    if (d != int'(mrb_best_dist)) begin failures++; $display("MRB distance %0d, recomputed %0d", mrb_best_dist, d); end
    if (expect_cw) begin
      checks++;
      if (c != sent) begin failures++; $display("MRB did not recover the sent codeword"); end
    end
    $display("MRB order %0d: dist %0d, %0d TEPs, quick escape %0d", ord, mrb_best_dist,
             mrb_tep_count, mrb_quick_escape);
  endtask

  // ---------------- test sequence ----------------
  initial begin
    int y [MRB_N];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // deep space: LDPC(128,64), tail, inverted polarity, one unrecoverable word
    code_sel = CODE_128_64; tail_en = 1; q3 = 0;
    build_code(CODE_128_64);
    $display("LDPC(128,64): rank %0d", rank);
    send_cltu(CODE_128_64, 1, 4, 128, 64, 3, 1);
    // hybrid fallback: MRB on the word the NMS decoder could not decode
    make_generator();
    for (int j = 0; j < MRB_N; j++) y[j] = last_q[j];
    mrb_run(y, 2, 0, 0, '0);
    send_cltu(CODE_128_64, 0, 2, 128, 96, -1, 1);
    // lightly corrupted word: take the last sent codeword, flip 2 weak symbols
    begin
      automatic logic [MRB_N-1:0] sent = MRB_N'(last_sent);
      for (int j = 0; j < MRB_N; j++) y[j] = sent[j] ? -20 : 20;
      y[5] = -y[5] / 4; y[70] = -y[70] / 4;
      mrb_run(y, 2, 0, 1, sent);
      mrb_run(y, 3, 4000, 0, sent);   // quick escape on the first group
    end

    // 3-bit quantization, deep space
    q3 = 1; start_thr = -15'sd160; tail_thr = -15'sd240;
    send_cltu(CODE_128_64, 0, 2, 256, 48, -1, 1);
    q3 = 0; start_thr = -15'sd150; tail_thr = -15'sd250;

    // near earth: LDPC(512,256), no tail, ends on the failure of a noise block
    code_sel = CODE_512_256; tail_en = 0;
    build_code(CODE_512_256);
    $display("LDPC(512,256): rank %0d", rank);
    send_cltu(CODE_512_256, 0, 3, 128, 64, 2, 0);
    repeat (200000) @(negedge clk);

    checks += 14;
    if (n_bad != 0)         begin failures++; $display("%0d of %0d codewords decoded wrongly", n_bad, n_cmp); end
    if (n_cmp < 8)          begin failures++; $display("only %0d codewords compared", n_cmp); end
    if (n_start_up == 0)    begin failures++; $display("no upright start detection"); end
    if (n_start_inv == 0)   begin failures++; $display("no inverted start detection"); end
    if (n_tail_end == 0)    begin failures++; $display("no tail termination"); end
    if (n_fail_end == 0)    begin failures++; $display("no failure termination"); end
    if (n_multi == 0)       begin failures++; $display("no multi-iteration decode"); end
    if (n_ds_fail == 0)     begin failures++; $display("no NMS failure in deep-space mode"); end
    if (!page_seen[0] || !page_seen[1]) begin failures++; $display("LLR pages not both used"); end
    if (n_mrb_done < 2)     begin failures++; $display("MRB searches %0d", n_mrb_done); end
    if (n_mrb_qe == 0)      begin failures++; $display("no MRB quick escape"); end
    if (overrun)            begin failures++; $display("decoder overrun"); end
    if (cw_count == 0)      begin failures++; $display("no codewords"); end
    if (exp_cw.size() != 0) begin failures++; $display("%0d codewords never decoded", exp_cw.size()); end
    $display("starts up/inv %0d/%0d, ends tail/fail %0d/%0d, decodes ok/fail %0d/%0d, multi-iter %0d, ds fallback %0d, mrb %0d (qe %0d)",
             n_start_up, n_start_inv, n_tail_end, n_fail_end, n_ok, n_fail, n_multi, n_ds_fail, n_mrb_done, n_mrb_qe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
