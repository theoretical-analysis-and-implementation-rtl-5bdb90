// nms_mem_bank: one memory bank (MB) of the serial NMS LDPC decoder.
//
// A bank holds the messages of one edge group (one circulant of the
// parity-check matrix), or the channel LLRs of one block column. It is a
// simple dual-port RAM: one synchronous read port (data appear one clock
// after the address) and one write port. DEPTH defaults to 64 cells of 6 bits
// (384 bits), the size that serves both the Q = 16 and the Q = 64 code; the
// short code uses only the first 16 cells. The decoder never reads and writes
// the same cell in one clock, so read-during-write behaviour is not defined.
module nms_mem_bank #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = 6
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
