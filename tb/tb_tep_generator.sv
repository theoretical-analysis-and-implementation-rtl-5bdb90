// tb_tep_generator: runs the generator with K = 12 and 3 TEUs for orders 0
// to 4 and checks that every pattern of weight <= order appears exactly once
// (using a table of the (order+1)-subsets seen), that no invalid pattern is
// issued, that last comes on the final group, that xyz_change predicts the
// next [X,Y,Z], and that a TEP budget stops the search at exactly that count.
module tb_tep_generator;
  localparam int NT = 3, K = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 0, advance = 0;
  logic [2:0] order = '0;
  logic [19:0] max_teps = '0;
  logic [6:0] x, y, z;
  logic [6:0] a [NT];
  logic a_valid [NT];
  logic xyz_change, last;
  logic [19:0] tep_count;
  tep_generator #(.N_TEU(NT), .K(K)) dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int binom(int n, int r);
    int v = 1;
    for (int i = 0; i < r; i++) v = v * (n - i) / (i + 1);
    return v;
  endfunction
  task automatic run(int ord, int budget);
    bit seen [int];
    int issued = 0, expected = 0, dup = 0, bad = 0, xyzerr = 0;
    logic [6:0] px, py, pz; bit pchg;
    for (int j = 0; j <= ord; j++) expected += binom(K, j);
    if (budget < expected) expected = budget;
    @(negedge clk); order = 3'(ord); max_teps = 20'(budget); start = 1;
    @(negedge clk); start = 0;
    forever begin
      for (int i = 0; i < NT; i++) if (a_valid[i]) begin
        int key, w;
        int idx [4] = '{int'(a[i]), int'(x), int'(y), int'(z)};
        key = 0; w = 0;
        for (int q = 0; q < 4; q++) begin
          if (idx[q] != 0) w++;
          key = key * 16 + idx[q];
          if (q > 0 && idx[q] != 0 && idx[q] >= idx[q-1]) bad++;
          if (q > 0 && idx[q] != 0 && idx[q-1] == 0) bad++;
        end
        if (w > ord || int'(a[i]) > K) bad++;
        if (seen.exists(key)) dup++;
        seen[key] = 1;
        issued++;
      end
      if (last) break;
      px = x; py = y; pz = z; pchg = xyz_change;
      advance = 1; @(negedge clk); advance = 0;
      if (pchg != ((x != px) || (y != py) || (z != pz))) xyzerr++;
    end
    checks += 5;
    if (issued != expected) begin failures++; $display("order %0d: issued %0d expected %0d", ord, issued, expected); end
    if (dup != 0) begin failures++; $display("order %0d: %0d duplicates", ord, dup); end
    if (bad != 0) begin failures++; $display("order %0d: %0d malformed", ord, bad); end
    if (xyzerr != 0) begin failures++; $display("order %0d: xyz_change wrong %0d", ord, xyzerr); end
    if (int'(tep_count) + 0 > expected) begin failures++; $display("count too high"); end
    $display("order %0d budget %0d: %0d TEPs", ord, budget, issued);
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int o = 0; o <= 4; o++) run(o, 100000);
    run(4, 500);
    run(2, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
