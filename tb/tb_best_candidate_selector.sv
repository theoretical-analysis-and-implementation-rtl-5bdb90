// tb_best_candidate_selector: random groups of three distances with random
// valid flags; a running minimum kept here (strictly smaller replaces, lowest
// TEU index on a tie) must match the stored best distance, codeword and TEP,
// and qe_hit must tell whether that best is at or below the threshold.
module tb_best_candidate_selector;
  import tc_pkg::*;
  localparam int NT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic init = 0, update = 0;
  logic [DIST_W-1:0] dsum [NT];
  logic valid [NT];
  logic [127:0] cand [NT];
  logic [6:0] a [NT];
  logic [6:0] x, y, z;
  logic [DIST_W-1:0] qe_thr;
  logic found, qe_hit;
  logic [DIST_W-1:0] best_dist;
  logic [127:0] best_cw;
  logic [6:0] best_tep [4];
  best_candidate_selector dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int best; logic [127:0] bcw; int btep; bit bqe;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      best = -1;
      qe_thr = DIST_W'($urandom_range(100, 400));
      for (int g = 0; g < 30; g++) begin
        x = 7'(g); y = 7'(run); z = 0;
        for (int i = 0; i < NT; i++) begin
          dsum[i] = DIST_W'($urandom_range(50, 2000));
          valid[i] = ($urandom_range(0, 3) != 0);
          cand[i] = {$urandom, $urandom, $urandom, $urandom};
          a[i] = 7'(g * NT + i + 1);
          if (valid[i] && (best < 0 || int'(dsum[i]) < best)) begin
            best = int'(dsum[i]); bcw = cand[i]; btep = int'(a[i]);
          end
        end
        bqe = (best >= 0) && (best <= int'(qe_thr));
        update = 1;
        #1;
        checks++;
        if (qe_hit != bqe) begin failures++; $display("qe_hit %0d exp %0d", qe_hit, bqe); end
        @(negedge clk); update = 0;
        if (best >= 0) begin
          checks += 3;
          if (int'(best_dist) != best) begin failures++; $display("best %0d exp %0d", best_dist, best); end
          if (best_cw != bcw) begin failures++; $display("cw wrong"); end
          if (int'(best_tep[0]) != btep || int'(best_tep[2]) != run) begin failures++; $display("tep wrong"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
