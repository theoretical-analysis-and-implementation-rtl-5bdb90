// tb_cltu_controller: drives the CLTU controller together with an S-LRT
// frame synchronizer and a simple decoder model written here (busy for a
// fixed time, result chosen by the test). Checks, for a tail-terminated
// CLTU with inverted polarity (LDPC(128,64)) and a failure-terminated CLTU
// (LDPC(512,256)): every LLR write (page, address, sign-corrected value),
// the pages handed to the decoder, the number of codewords, and how and
// when the CLTU ends. A third CLTU uses a decoder that stays busy for
// longer than a codeword takes to arrive, so the blocks that find it busy
// must be dropped and flagged as overrun.
module tb_cltu_controller;
  import tc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  code_e code_sel = CODE_128_64;
  logic tail_en = 1, sym_valid = 0;
  logic signed [SOFT_W-1:0] sym = '0;
  logic fs_mode, fs_tail_eval, fs_start_det, fs_polarity, fs_tail_done, fs_tail_det, fs_td;
  logic llr_we, llr_page, dec_start, dec_page, dec_busy = 0, dec_done = 0, dec_success = 0;
  logic [8:0] llr_addr;
  logic signed [SOFT_W-1:0] llr_data;
  logic cltu_active, cltu_end, end_by_tail, overrun;
  logic [15:0] cw_count;
  logic signed [14:0] metric;

  slrt_frame_sync u_fs (.clk(clk), .rst_n(rst_n), .mode(fs_mode), .sym_valid(sym_valid), .sym(sym),
    .tail_eval(fs_tail_eval), .start_thr(-15'sd150), .tail_thr(-15'sd250), .start_det(fs_start_det),
    .polarity(fs_polarity), .tail_done(fs_tail_done), .tail_det(fs_td), .metric(metric));
  assign fs_tail_det = fs_td;

  cltu_controller dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // decoder model: busy busy_len clocks, result from the queue
  bit results [$];
  int busy_len = 40;
  int starts = 0; int pages [$];
  always @(posedge clk) if (rst_n && dec_start) begin
    starts++; pages.push_back(int'(dec_page));
    fork begin
      bit r;
      dec_busy <= 1;
      repeat (busy_len) @(posedge clk);
      r = results.size() ? results.pop_front() : 1'b1;
      dec_busy <= 0; dec_done <= 1; dec_success <= r;
      @(posedge clk); dec_done <= 0;
    end join_none
  end

  // LLR write monitor
  int exp_page = 0, exp_addr = 0, wr_err = 0, writes = 0, exp_val = 0; bit inv = 0;
  int ends = 0, tail_ends = 0;
  always @(posedge clk) if (rst_n) begin
    if (llr_we) begin
      writes++;
      if (int'(llr_addr) != exp_addr || int'(llr_page) != exp_page || int'(llr_data) != exp_val) begin
        if (wr_err < 5) $display("write %0d: page %0d addr %0d data %0d, expected %0d %0d %0d", writes, llr_page, llr_addr, llr_data, exp_page, exp_addr, exp_val);
        wr_err++;
      end
    end
    if (cltu_end) begin ends++; if (end_by_tail) tail_ends++; end
  end

  task automatic send(int y);
    @(negedge clk);
    sym_valid = 1; sym = SOFT_W'(y); exp_val = inv ? -y : y;
    @(negedge clk); sym_valid = 0;
    if (llr_we === 1'b0) ;
    repeat (3) @(negedge clk);
  endtask

  task automatic send_block(int n, int idx);
    for (int i = 0; i < n; i++) begin
      exp_addr = i;
      send(int'($urandom_range(0, 40)) - 20);
    end
  endtask

  task automatic send_seq(bit tail, bit pol);
    for (int i = (tail ? TAIL_LEN : START_LEN) - 1; i >= 0; i--) begin
      bit b = tail ? TAIL_SEQ[i] : START_SEQ[i];
      if (tail) exp_addr = TAIL_LEN - 1 - i;
      send(((b ^ pol) ? -20 : 20) + int'($urandom_range(0, 6)) - 3);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // --- DS: LDPC(128,64), tail present, inverted stream ---
    code_sel = CODE_128_64; tail_en = 1;
    for (int i = 0; i < 80; i++) send(int'($urandom_range(0, 40)) - 20);
    inv = 1;
    send_seq(0, 1);
    checks++;
    if (!cltu_active) begin failures++; $display("CLTU not started"); end
    for (int b = 0; b < 3; b++) begin exp_page = b % 2; send_block(128, b); end
    exp_page = 1;
    send_seq(1, 1);
    repeat (100) @(negedge clk);
    checks += 5;
    if (starts != 3) begin failures++; $display("decoder starts %0d", starts); end
    if (pages.size() == 3 && (pages[0] != 0 || pages[1] != 1 || pages[2] != 0)) begin failures++; $display("pages wrong"); end
    if (ends != 1 || tail_ends != 1) begin failures++; $display("ends %0d tail %0d", ends, tail_ends); end
    if (cltu_active) begin failures++; $display("CLTU still active"); end
    if (cw_count != 3) begin failures++; $display("cw_count %0d", cw_count); end
    // --- NE: LDPC(512,256), no tail, upright, second block fails ---
    code_sel = CODE_512_256; tail_en = 0; inv = 0;
    results.push_back(1); results.push_back(0);
    for (int i = 0; i < 80; i++) send(int'($urandom_range(0, 40)) - 20);
    send_seq(0, 0);
    // the tail block of the first CLTU went to page 1, so pages continue 1, 0, 1
    exp_page = 1; send_block(512, 0);
    exp_page = 0; send_block(512, 1);
    exp_page = 1;
    for (int i = 0; i < 60 && cltu_active; i++) begin exp_addr = i; send(int'($urandom_range(0, 40)) - 20); end
    repeat (100) @(negedge clk);
    checks += 5;
    if (starts != 5) begin failures++; $display("decoder starts %0d", starts); end
    if (ends != 2 || tail_ends != 1) begin failures++; $display("ends %0d tail %0d", ends, tail_ends); end
    if (cltu_active) begin failures++; $display("CLTU still active after failure"); end
    if (wr_err != 0) begin failures++; $display("%0d bad LLR writes", wr_err); end
    if (writes < 3*128 + 128 + 2*512) begin failures++; $display("only %0d LLR writes", writes); end
    if (overrun) begin failures++; $display("overrun"); end
    // --- DS again, decoder slower than the link: blocks 2 and 3 dropped ---
    code_sel = CODE_128_64; tail_en = 1; inv = 0; busy_len = 3000;
    for (int i = 0; i < 80; i++) send(int'($urandom_range(0, 40)) - 20);
    send_seq(0, 0);
    for (int b = 0; b < 3; b++) begin exp_page = (b + 1) % 2; send_block(128, b); end
    exp_page = 0;
    send_seq(1, 0);
    repeat (4000) @(negedge clk);
    checks += 5;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    if (starts != 6) begin failures++; $display("decoder starts %0d, expected 6", starts); end
    if (cw_count != 6) begin failures++; $display("cw_count %0d, expected 6", cw_count); end
    if (ends != 3 || tail_ends != 2) begin failures++; $display("ends %0d tail %0d", ends, tail_ends); end
    if (wr_err != 0) begin failures++; $display("%0d bad LLR writes", wr_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
