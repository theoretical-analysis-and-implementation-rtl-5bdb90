// tb_nms_mem_bank: writes random data to random cells of a 64 x 6 bank while
// mirroring them in an array, then reads every cell back and checks the data
// and the one-clock read latency.
module tb_nms_mem_bank;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [5:0] wdata = '0, rdata;
  nms_mem_bank dut (.*);
  int checks = 0, failures = 0;
  logic [5:0] model [64];
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = 6'(i * 5 + 3); model[i] = wdata;
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk); we = 1; waddr = 6'($urandom); wdata = 6'($urandom); model[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = 6'(i);
      @(negedge clk);
      checks++;
      if (rdata != model[i]) begin failures++; $display("cell %0d got %0d exp %0d", i, rdata, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
