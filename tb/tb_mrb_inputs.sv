// tb_mrb_inputs: writes G*, FC and RxCW through the software ports, then
// checks every row-read port (index 0 = zero row, i = row i-1), the FC
// register, and the hard decisions and reliabilities of the received word.
module tb_mrb_inputs;
  import tc_pkg::*;
  localparam int NR = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic g_we = 0, fc_we = 0, rx_we = 0;
  logic [5:0] g_row = '0;
  logic [127:0] g_data = '0, fc_data = '0, fc, rx_hard;
  logic [6:0] rx_addr = '0;
  logic signed [SOFT_W-1:0] rx_data = '0;
  logic [6:0] rd_idx [NR];
  logic [127:0] rd_row [NR];
  logic [SOFT_W-2:0] rx_mag [128];
  mrb_inputs dut (.*);
  int checks = 0, failures = 0;
  logic [127:0] G [64];
  int rx [128];
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      G[i] = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); g_we = 1; g_row = 6'(i); g_data = G[i];
    end
    @(negedge clk); g_we = 0; fc_we = 1; fc_data = {$urandom, $urandom, $urandom, $urandom};
    for (int j = 0; j < 128; j++) begin
      rx[j] = int'($urandom_range(0, 63)) - 32;
      @(negedge clk); fc_we = 0; rx_we = 1; rx_addr = 7'(j); rx_data = SOFT_W'(rx[j]);
    end
    @(negedge clk); rx_we = 0;
    checks++;
    if (fc != fc_data) begin failures++; $display("fc wrong"); end
    for (int t = 0; t < 40; t++) begin
      for (int r = 0; r < NR; r++) rd_idx[r] = 7'($urandom_range(0, 64));
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rd_row[r] != (rd_idx[r] == 0 ? 128'd0 : G[rd_idx[r] - 1])) begin
          failures++; $display("row port %0d idx %0d wrong", r, rd_idx[r]);
        end
      end
      @(negedge clk);
    end
    for (int j = 0; j < 128; j++) begin
      automatic int m = rx[j] < 0 ? -rx[j] : rx[j];
      if (m > 31) m = 31;
      checks += 2;
      if (rx_hard[j] != (rx[j] < 0)) begin failures++; $display("hard %0d wrong", j); end
      if (int'(rx_mag[j]) != m) begin failures++; $display("mag %0d wrong", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
