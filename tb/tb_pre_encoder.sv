// tb_pre_encoder: random FC and rows; the held output must equal their XOR
// one clock after load and must not change without load.
module tb_pre_encoder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic load = 0;
  logic [127:0] fc, gx, gy, gz, pre, expv;
  pre_encoder dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 200; t++) begin
      fc = {$urandom, $urandom, $urandom, $urandom};
      gx = {$urandom, $urandom, $urandom, $urandom};
      gy = (t % 3 == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      gz = (t % 2 == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      expv = fc ^ gx ^ gy ^ gz;
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      fc = ~fc;
      @(negedge clk);
      checks++;
      if (pre != expv) begin failures++; $display("t=%0d mismatch", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
