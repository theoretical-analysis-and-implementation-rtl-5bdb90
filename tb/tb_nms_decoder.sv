// tb_nms_decoder: self-checking testbench of the serial NMS LDPC decoder.
//
// A behavioural flooding NMS decoder written here from the algorithm (same
// 6-bit messages, alpha = 3/4, saturation to +-31) decodes the same noisy
// words; the RTL must give the same success flag, iteration count and hard
// decisions. Words are the all-zero codeword plus pseudo-random noise, for
// both codes, at a high SNR (fast success), a medium SNR (several
// iterations) and a very low SNR (failure after 50 iterations). The latency
// start->done is checked against the design's formula, whose per-iteration
// part is the 4 clocks/row horizontal and 5 clocks/column vertical step.
module tb_nms_decoder;
  import tc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  code_e code_sel;
  logic llr_we, llr_page, start, start_page;
  logic [8:0] llr_addr;
  logic signed [SOFT_W-1:0] llr_data;
  logic busy, done, success;
  logic [6:0] iters;
  logic [N_MAX-1:0] dec_bits;

  nms_decoder dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int llr [N_MAX];
  int msg [N_EDGE][Q_MAX];      // one message per edge, reused for v2c and c2v
  bit ref_hard [N_MAX];
  int ref_iters; bit ref_ok;

  function automatic int satm(int x);
    if (x > SOFT_MAX) return SOFT_MAX;
    if (x < -SOFT_MAX) return -SOFT_MAX;
    return x;
  endfunction

  function automatic int shiftof(int e, code_e c);
    return (c == CODE_512_256) ? int'(EDGES[e].s64) : int'(EDGES[e].s16);
  endfunction

  function automatic bit syndrome_zero(code_e c, int q);
    for (int r = 0; r < NB_ROWS; r++)
      for (int i = 0; i < q; i++) begin
        bit p = 0;
        for (int s = 0; s < ROW_DEG; s++) begin
          int e = 8*r + s;
          p ^= ref_hard[int'(EDGES[e].col)*q + (i + shiftof(e, c)) % q];
        end
        if (p) return 0;
      end
    return 1;
  endfunction

  task automatic ref_decode(code_e c);
    int q = (c == CODE_512_256) ? 64 : 16;
    int tot [N_MAX];
    // initial pass
    for (int e = 0; e < N_EDGE; e++)
      for (int i = 0; i < q; i++)
        msg[e][i] = llr[int'(EDGES[e].col)*q + (i + shiftof(e, c)) % q];
    for (int v = 0; v < 8*q; v++) ref_hard[v] = llr[v] < 0;
    ref_iters = 0;
    ref_ok = syndrome_zero(c, q);
    while (!ref_ok && ref_iters < 50) begin
      ref_iters++;
      // horizontal
      for (int r = 0; r < NB_ROWS; r++)
        for (int i = 0; i < q; i++) begin
          int m1 = 99, m2 = 99, ix = 0; bit sp = 0;
          int vin [8];
          for (int s = 0; s < 8; s++) begin
            int a;
            vin[s] = msg[8*r+s][i];
            a = vin[s] < 0 ? -vin[s] : vin[s];
            sp ^= (vin[s] < 0);
            if (a < m1) begin m2 = m1; m1 = a; ix = s; end
            else if (a < m2) m2 = a;
          end
          for (int s = 0; s < 8; s++) begin
            int m = (s == ix) ? m2 : m1;
            int o = (m * 3) / 4;
            msg[8*r+s][i] = (sp ^ (vin[s] < 0)) ? -o : o;
          end
        end
      // vertical
      for (int v = 0; v < 8*q; v++) tot[v] = llr[v];
      for (int e = 0; e < N_EDGE; e++)
        for (int i = 0; i < q; i++)
          tot[int'(EDGES[e].col)*q + (i + shiftof(e, c)) % q] += msg[e][i];
      for (int e = 0; e < N_EDGE; e++)
        for (int i = 0; i < q; i++) begin
          int v = int'(EDGES[e].col)*q + (i + shiftof(e, c)) % q;
          msg[e][i] = satm(tot[v] - msg[e][i]);
        end
      for (int v = 0; v < 8*q; v++) ref_hard[v] = tot[v] < 0;
      ref_ok = syndrome_zero(c, q);
    end
  endtask

  // ---------------- stimulus ----------------
  function automatic int gauss(int sigma_x8);
    int s = 0;
    for (int i = 0; i < 12; i++) s += int'($urandom_range(0, 1000));
    return ((s - 6000) * sigma_x8) / (8 * 1000);  // ~N(0, sigma)
  endfunction

  task automatic run_one(code_e c, int amp, int sigma_x8, bit pg, string tag);
    int q = (c == CODE_512_256) ? 64 : 16;
    int n = 8*q, t0, lat, exp_lat;
    bit bits_ok;
    for (int v = 0; v < n; v++) llr[v] = satm(amp + gauss(sigma_x8));
    ref_decode(c);
    @(negedge clk);
    code_sel = c;
    for (int v = 0; v < n; v++) begin
      llr_we = 1; llr_page = pg; llr_addr = 9'(v); llr_data = SOFT_W'(llr[v]);
      @(negedge clk);
    end
    llr_we = 0;
    start = 1; start_page = pg;
    t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    exp_lat = (40*q + 1) + int'(iters) * (56*q + 1) + 2;
    bits_ok = 1;
    for (int v = 0; v < n; v++) if (dec_bits[v] != ref_hard[v]) bits_ok = 0;
    checks += 4;
    if (success != ref_ok)            begin failures++; $display("%s: success %0d ref %0d", tag, success, ref_ok); end
    if (int'(iters) != ref_iters)     begin failures++; $display("%s: iters %0d ref %0d", tag, iters, ref_iters); end
    if (!bits_ok)                     begin failures++; $display("%s: hard decisions differ", tag); end
    if (lat != exp_lat)               begin failures++; $display("%s: latency %0d expected %0d", tag, lat, exp_lat); end
    $display("%s: success=%0d iters=%0d latency=%0d", tag, success, iters, lat);
  endtask

  int n_ok = 0, n_fail = 0, n_multi = 0;
  initial begin
    llr_we = 0; start = 0; llr_page = 0; start_page = 0; llr_addr = '0; llr_data = '0;
    code_sel = CODE_128_64;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // clean word: zero iterations
    run_one(CODE_128_64, 12, 0, 0, "short clean");
    for (int k = 0; k < 6; k++) begin
      run_one(CODE_128_64, 8, 40, k[0], $sformatf("short noisy %0d", k));
      if (success) n_ok++; else n_fail++;
      if (iters > 1) n_multi++;
    end
    run_one(CODE_128_64, 1, 120, 1, "short very noisy");
    if (!success) n_fail++;
    for (int k = 0; k < 3; k++) begin
      run_one(CODE_512_256, 8, 40, k[0], $sformatf("long noisy %0d", k));
      if (success) n_ok++;
      if (iters > 1) n_multi++;
    end
    run_one(CODE_512_256, 1, 120, 0, "long very noisy");
    if (!success) n_fail++;
    checks += 3;
    if (n_ok == 0)    begin failures++; $display("no successful noisy decode"); end
    if (n_fail == 0)  begin failures++; $display("no failed decode"); end
    if (n_multi == 0) begin failures++; $display("no multi-iteration decode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
