// tb_mrb_part2: self-checking testbench of the MRB Part 2 accelerator.
//
// Random G*, FC and received words are written through the software ports.
// A reference search written here enumerates the same TEP set (all
// patterns of weight <= order, in the order [a,X,Y,Z] with a > X > Y > Z,
// grouped N_TEU at a time) with plain nested loops, computes each candidate
// and its distance, and gives the expected best distance, TEP, codeword,
// TEP count and clock count. Cases: full order-2 search, order-4 search cut
// by a TEP budget, order-3 search left by quick escape, order 0, and the
// sizing case of the design: 400,000 TEPs of order <= 4 with 3 TEUs at
// c = 8, which must finish within the 27.9 ms decoding budget of a 2 kbps
// link (2,790,000 clocks at 100 MHz).
module tb_mrb_part2;
  import tc_pkg::*;
  localparam int NT = 3, C = 8, K = 64, N = 128, M = N / C;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic g_we = 0, fc_we = 0, rx_we = 0, start = 0;
  logic [5:0] g_row = '0;
  logic [N-1:0] g_data = '0, fc_data = '0;
  logic [6:0] rx_addr = '0;
  logic signed [SOFT_W-1:0] rx_data = '0;
  logic [2:0] order = '0;
  logic [19:0] max_teps = '0;
  logic [DIST_W-1:0] qe_thr = '0;
  logic busy, done, quick_escape;
  logic [N-1:0] best_cw;
  logic [DIST_W-1:0] best_dist;
  logic [6:0] best_tep [4];
  logic [19:0] tep_count;

  mrb_part2 dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] G [K];
  logic [N-1:0] FC;
  int rx [N];

  function automatic logic [N-1:0] row(int i);
    return (i == 0) ? '0 : G[i-1];
  endfunction

  function automatic int distance(logic [N-1:0] cw);
    int d = 0;
    for (int j = 0; j < N; j++) begin
      int m = rx[j] < 0 ? -rx[j] : rx[j];
      if (m > 31) m = 31;
      if (cw[j] != (rx[j] < 0)) d += m;
    end
    return d;
  endfunction

  // reference search
  int r_best, r_count, r_cycles, r_tep[4]; bit r_qe; logic [N-1:0] r_cw;
  task automatic reference(int ord, int budget, int thr);
    bit stop = 0;
    r_best = 1 << 30; r_count = 0; r_cycles = 0; r_qe = 0;
    for (int x = 0; x < K && !stop; x++) begin
      if (x > 0 && ord < 2) break;
      for (int y = 0; y < (x == 0 ? 1 : x) && !stop; y++) begin
        if (y > 0 && ord < 3) break;
        for (int z = 0; z < (y == 0 ? 1 : y) && !stop; z++) begin
          int lo = (x == 0) ? 0 : x + 1;
          int hi = (ord >= 1) ? K : 0;
          if (z > 0 && ord < 4) break;
          r_cycles += 1;                               // pre-encoding
          for (int base = lo; base <= hi && !stop; base += NT) begin
            r_cycles += M + 1;
            for (int i = 0; i < NT; i++) begin
              int a = base + i;
              if (a <= hi && r_count < budget) begin
                logic [N-1:0] cw = FC ^ row(a) ^ row(x) ^ row(y) ^ row(z);
                int d = distance(cw);
                r_count++;
                if (d < r_best) begin
                  r_best = d; r_cw = cw; r_tep = '{a, x, y, z};
                end
              end
            end
            if (r_best <= thr) begin r_qe = 1; stop = 1; end
            if (r_count >= budget) stop = 1;
          end
        end
      end
    end
  endtask

  task automatic load_random(bit plant, int pa, int px);
    for (int i = 0; i < K; i++) G[i] = {$urandom, $urandom, $urandom, $urandom};
    FC = {$urandom, $urandom, $urandom, $urandom};
    for (int j = 0; j < N; j++) rx[j] = int'($urandom_range(0, 62)) - 31;
    if (plant) begin
      // received word close to the candidate FC ^ G*[pa] ^ G*[px]
      logic [N-1:0] cw = FC ^ row(pa) ^ row(px);
      for (int j = 0; j < N; j++) begin
        int m = int'($urandom_range(10, 31));
        rx[j] = cw[j] ? -m : m;
      end
      rx[3] = -rx[3] / 8; rx[77] = -rx[77] / 8;
    end
    for (int i = 0; i < K; i++) begin
      @(negedge clk); g_we = 1; g_row = 6'(i); g_data = G[i];
    end
    @(negedge clk); g_we = 0; fc_we = 1; fc_data = FC;
    for (int j = 0; j < N; j++) begin
      @(negedge clk); fc_we = 0; rx_we = 1; rx_addr = 7'(j); rx_data = SOFT_W'(rx[j]);
    end
    @(negedge clk); rx_we = 0;
  endtask

  int n_qe = 0, n_budget = 0, last_lat = 0;
  task automatic run(int ord, int budget, int thr, string tag);
    int t0, lat;
    reference(ord, budget, thr);
    @(negedge clk);
    order = 3'(ord); max_teps = 20'(budget); qe_thr = DIST_W'(thr); start = 1;
    t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    last_lat = lat;
    checks += 6;
    if (int'(best_dist) != r_best)        begin failures++; $display("%s: dist %0d ref %0d", tag, best_dist, r_best); end
    if (best_cw != r_cw)                  begin failures++; $display("%s: codeword differs", tag); end
    if (int'(best_tep[0]) != r_tep[0] || int'(best_tep[1]) != r_tep[1] ||
        int'(best_tep[2]) != r_tep[2] || int'(best_tep[3]) != r_tep[3])
                                          begin failures++; $display("%s: tep differs", tag); end
    if (int'(tep_count) != r_count)       begin failures++; $display("%s: count %0d ref %0d", tag, tep_count, r_count); end
    if (quick_escape != r_qe)             begin failures++; $display("%s: qe %0d ref %0d", tag, quick_escape, r_qe); end
    if (lat != r_cycles + 2)              begin failures++; $display("%s: clocks %0d ref %0d", tag, lat, r_cycles + 2); end
    if (quick_escape) n_qe++;
    if (r_count == budget) n_budget++;
    $display("%s: dist=%0d tep=[%0d,%0d,%0d,%0d] teps=%0d qe=%0d clocks=%0d", tag, best_dist,
             best_tep[0], best_tep[1], best_tep[2], best_tep[3], tep_count, quick_escape, lat);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_random(0, 0, 0);
    run(2, 1_000_000, 0, "order 2 full");
    run(0, 1_000_000, 0, "order 0");
    run(4, 3000, 0, "order 4 budget");
    load_random(1, 40, 17);
    run(3, 1_000_000, 0, "order 3 planted full");
    run(3, 1_000_000, 20, "order 3 quick escape");
    load_random(0, 0, 0);
    run(4, 400_000, 0, "order 4, 400K TEPs");
    checks++;
    if (last_lat > 2_790_000) begin failures++; $display("400K TEPs took %0d clocks", last_lat); end
    checks += 2;
    if (n_qe == 0)     begin failures++; $display("quick escape never happened"); end
    if (n_budget == 0) begin failures++; $display("budget stop never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
