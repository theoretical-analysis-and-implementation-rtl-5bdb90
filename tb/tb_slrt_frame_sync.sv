// tb_slrt_frame_sync: streams noise, a noisy start sequence (once upright,
// once inverted) and a noisy tail sequence through the detector. The S-LRT
// metric of every window is recomputed here and compared with the metric
// the unit reports; start_det must fire exactly once per start sequence,
// two clocks after its last symbol, with the right polarity; in tail mode,
// tail_det must be set only for the block that holds the tail.
module tb_slrt_frame_sync;
  import tc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic mode = 0, sym_valid = 0, tail_eval = 0;
  logic signed [SOFT_W-1:0] sym = '0;
  logic signed [14:0] start_thr = -15'sd150, tail_thr = -15'sd250, metric;
  logic start_det, polarity, tail_done, tail_det;
  slrt_frame_sync dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int hist [$];          // all symbols sent, newest last
  int n_start = 0, n_tail = 0;

  function automatic int lambda(int len, bit tail);
    int corr = 0, en = 0;
    for (int i = 0; i < len; i++) begin
      int y = hist[hist.size() - 1 - i];
      bit p = tail ? TAIL_SEQ[i] : START_SEQ[i];
      corr += p ? -y : y;
      en += (y < 0 ? -y : y);
    end
    return (corr < 0 ? -corr : corr) - en;
  endfunction

  function automatic int noisy(int v);
    int r = v + int'($urandom_range(0, 16)) - 8;
    return r > 31 ? 31 : (r < -31 ? -31 : r);
  endfunction

  // send one symbol; in start mode check the result
  task automatic send(int y, bit expect_det, bit exp_pol);
    @(negedge clk);
    sym_valid = 1; sym = SOFT_W'(y); hist.push_back(y);
    @(negedge clk); sym_valid = 0;
    @(negedge clk);
    if (!mode) begin
      if (hist.size() >= START_LEN) begin
        checks++;
        if (int'(metric) != lambda(START_LEN, 0)) begin failures++; $display("metric %0d exp %0d", metric, lambda(START_LEN, 0)); end
      end
      checks++;
      if (start_det != expect_det) begin failures++; $display("start_det %0d expected %0d at symbol %0d", start_det, expect_det, hist.size()); end
      if (start_det) begin
        n_start++; checks++;
        if (polarity != exp_pol) begin failures++; $display("polarity wrong"); end
      end
    end
    @(negedge clk);
  endtask

  task automatic send_seq(bit tail, bit inv);
    for (int i = (tail ? TAIL_LEN : START_LEN) - 1; i >= 0; i--) begin
      bit b = tail ? TAIL_SEQ[i] : START_SEQ[i];
      int v = (b ^ inv) ? -20 : 20;
      send(noisy(v), (!tail && i == 0), inv);
    end
  endtask

  task automatic tail_check(bit expect_det);
    @(negedge clk); tail_eval = 1;
    @(negedge clk); tail_eval = 0;
    checks += 3;
    if (!tail_done) begin failures++; $display("no tail_done"); end
    if (tail_det != expect_det) begin failures++; $display("tail_det %0d expected %0d", tail_det, expect_det); end
    if (int'(metric) != lambda(TAIL_LEN, 1)) begin failures++; $display("tail metric %0d exp %0d", metric, lambda(TAIL_LEN, 1)); end
    if (tail_det) n_tail++;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 150; i++) send(int'($urandom_range(0, 40)) - 20, 0, 0);
    send_seq(0, 0);
    for (int i = 0; i < 100; i++) send(int'($urandom_range(0, 40)) - 20, 0, 0);
    send_seq(0, 1);
    // tail mode: two random blocks, then the tail (inverted), blocks of 128
    mode = 1;
    for (int b = 0; b < 3; b++) begin
      if (b < 2) for (int i = 0; i < 128; i++) send(int'($urandom_range(0, 40)) - 20, 0, 0);
      else send_seq(1, 1);
      tail_check(b == 2);
    end
    checks += 2;
    if (n_start != 2) begin failures++; $display("start detections %0d", n_start); end
    if (n_tail != 1) begin failures++; $display("tail detections %0d", n_tail); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
