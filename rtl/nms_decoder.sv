// nms_decoder: serial normalized min-sum (NMS) decoder for the two CCSDS
// telecommand LDPC codes, LDPC(128,64) and LDPC(512,256).
//
// Architecture (serial version): one check-node unit (nms_cpu), one
// variable-node unit (nms_vpu), 32 edge memory banks (one per circulant of
// the parity-check matrix, see tc_pkg), 8 channel-LLR banks (one per block
// column), a controller and a syndrome register. The code is chosen per
// decoding with code_sel; both codes share all hardware and differ only in
// the circulant size Q (16 or 64) and the shift of each circulant, which sets
// the bank addresses.
//
// Schedule (flooding). On start the decoder first runs an initial vertical
// pass with zero check messages, which writes v2c = LLR into every edge and
// forms the hard decisions and syndrome of the channel word. Then each
// iteration is a horizontal step (4*Q rows, 4 clocks per row: address, read,
// min, write) followed by a vertical step (8*Q columns, 5 clocks per column:
// address, read, sum, extrinsic, write). The syndrome is built during the
// vertical step by XOR-ing every hard decision into the syndrome bits of its
// checks, and tested in one clock after it. Decoding stops on a zero syndrome
// (success) or after MAX_ITER iterations (failure).
// Latency, from the clock in which start is high to the clock in which done
// is high: (40Q+1) + iters*(56Q+1) + 2 clocks; per iteration
// 896 + 1 clocks for Q = 16 and 3584 + 1 for Q = 64.
//
// Interface: channel LLRs are written through llr_we/llr_addr/llr_data
// (address = code bit index, 0..n-1; positive LLR means bit 0) into one of
// two pages (llr_page), so that the next codeword can be loaded while the
// current one is decoded; start_page picks the page to decode. done pulses
// for one clock; success, iters and dec_bits (bit i = code bit i, the first k
// are the information bits) then stay valid until the next start.
//
// The counts of units and banks, Q, the 6-bit messages, the 50-iteration
// limit and the horizontal/vertical tick counts follow the design
// description. The double-buffered LLR banks, the overlapped syndrome check
// and the initial pass are this design's choices.
module nms_decoder
  import tc_pkg::*;
#(
  parameter int unsigned MAX_ITER    = 50,
  parameter int unsigned ALPHA_NUM   = 3,
  parameter int unsigned ALPHA_SHIFT = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  code_e                    code_sel,
  input  logic                     llr_we,
  input  logic                     llr_page,
  input  logic [8:0]               llr_addr,
  input  logic signed [SOFT_W-1:0] llr_data,
  input  logic                     start,
  input  logic                     start_page,
  output logic                     busy,
  output logic                     done,
  output logic                     success,
  output logic [6:0]               iters,
  output logic [N_MAX-1:0]         dec_bits
);
  typedef enum logic [2:0] {S_IDLE, S_VS, S_CHECK, S_HS, S_DONE} state_e;
  state_e state;

  code_e     code;
  logic      page;
  logic      init;
  logic [8:0] node;      // row (HS) or column (VS) counter
  logic [2:0] tick;
  logic [M_MAX-1:0] syn;

  // --- geometry of the current node ---
  logic [5:0] qmask;
  logic [1:0] br;        // block row in HS
  logic [2:0] bc;        // block column in VS
  logic [5:0] sub;       // index inside the block
  logic [8:0] last_row, last_col;
  always_comb begin
    qmask    = (code == CODE_512_256) ? 6'd63 : 6'd15;
    sub      = node[5:0] & qmask;
    br       = (code == CODE_512_256) ? node[7:6] : node[5:4];
    bc       = (code == CODE_512_256) ? node[8:6] : node[6:4];
    last_row = (code == CODE_512_256) ? 9'd255 : 9'd63;
    last_col = (code == CODE_512_256) ? 9'd511 : 9'd127;
  end

  // --- memory banks ---
  logic [5:0]               e_raddr [N_EDGE];
  logic [5:0]               e_waddr [N_EDGE];
  logic                     e_we    [N_EDGE];
  logic signed [SOFT_W-1:0] e_wdata [N_EDGE];
  logic signed [SOFT_W-1:0] e_rdata [N_EDGE];
  logic signed [SOFT_W-1:0] l_rdata [NB_COLS];
  logic [5:0]               vaddr   [N_EDGE];   // VS address of each bank

  for (genvar e = 0; e < N_EDGE; e++) begin : g_emb
    nms_mem_bank #(.DEPTH(Q_MAX), .W(SOFT_W)) u_mb (
      .clk(clk), .we(e_we[e]), .waddr(e_waddr[e]), .wdata(e_wdata[e]),
      .raddr(e_raddr[e]), .rdata(e_rdata[e]));
  end

  for (genvar c = 0; c < NB_COLS; c++) begin : g_lmb
    logic                     lwe;
    logic [6:0]               lwaddr;
    assign lwe    = llr_we && ((code_sel == CODE_512_256) ? (llr_addr[8:6] == 3'(c))
                                                          : (llr_addr[8:4] == 5'(c)));
    assign lwaddr = {llr_page, (code_sel == CODE_512_256) ? llr_addr[5:0] : {2'b00, llr_addr[3:0]}};
    nms_mem_bank #(.DEPTH(2*Q_MAX), .W(SOFT_W)) u_lmb (
      .clk(clk), .we(lwe), .waddr(lwaddr), .wdata(llr_data),
      .raddr({page, sub}), .rdata(l_rdata[c]));
  end

  // --- processing units ---
  logic signed [SOFT_W-1:0] cpu_in  [ROW_DEG];
  logic signed [SOFT_W-1:0] cpu_out [ROW_DEG];
  logic signed [SOFT_W-1:0] vpu_in  [MAX_VDEG];
  logic signed [SOFT_W-1:0] vpu_out [MAX_VDEG];
  logic                     vpu_hard;

  always_comb begin
    for (int s = 0; s < ROW_DEG; s++) cpu_in[s] = e_rdata[8*br + s];
    for (int d = 0; d < MAX_VDEG; d++)
      vpu_in[d] = (d < COL_DEG[bc]) ? e_rdata[COL_EDGE[bc][d]] : '0;
  end

  nms_cpu #(.ALPHA_NUM(ALPHA_NUM), .ALPHA_SHIFT(ALPHA_SHIFT)) u_cpu (
    .clk(clk),
    .ld_in (state == S_HS && tick == 3'd1),
    .ld_min(state == S_HS && tick == 3'd2),
    .v2c(cpu_in), .c2v(cpu_out));

  nms_vpu u_vpu (
    .clk(clk),
    .ld_in (state == S_VS && tick == 3'd1),
    .ld_sum(state == S_VS && tick == 3'd2),
    .ld_ext(state == S_VS && tick == 3'd3),
    .init(init), .llr(l_rdata[bc]), .c2v(vpu_in), .v2c(vpu_out), .hard(vpu_hard));

  // --- bank addressing and write-back ---
  always_comb begin
    for (int e = 0; e < N_EDGE; e++) begin
      vaddr[e]   = (sub - edge_shift(e, code)) & qmask;
      e_raddr[e] = (state == S_VS) ? vaddr[e] : sub;
      e_waddr[e] = e_raddr[e];
      e_we[e]    = 1'b0;
      e_wdata[e] = '0;
    end
    if (state == S_HS && tick == 3'd3) begin
      for (int s = 0; s < ROW_DEG; s++) begin
        e_we[8*br + s]    = 1'b1;
        e_wdata[8*br + s] = cpu_out[s];
      end
    end
    if (state == S_VS && tick == 3'd4) begin
      for (int d = 0; d < MAX_VDEG; d++) begin
        if (d < COL_DEG[bc]) begin
          e_we[COL_EDGE[bc][d]]    = 1'b1;
          e_wdata[COL_EDGE[bc][d]] = vpu_out[d];
        end
      end
    end
  end

  // --- controller and syndrome control ---
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      code     <= CODE_128_64;
      page     <= 1'b0;
      init     <= 1'b0;
      node     <= '0;
      tick     <= '0;
      syn      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      success  <= 1'b0;
      iters    <= '0;
      dec_bits <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          code    <= code_sel;
          page    <= start_page;
          init    <= 1'b1;
          iters   <= '0;
          success <= 1'b0;
          busy    <= 1'b1;
          node    <= '0;
          tick    <= '0;
          syn     <= '0;
          state   <= S_VS;
        end
        S_VS: begin
          if (tick == 3'd4) begin
            tick <= '0;
            dec_bits[node] <= vpu_hard;
            if (vpu_hard) begin
              for (int d = 0; d < MAX_VDEG; d++) begin
                if (d < COL_DEG[bc]) begin
                  if (code == CODE_512_256)
                    syn[{EDGES[COL_EDGE[bc][d]].row, vaddr[COL_EDGE[bc][d]]}] <=
                      ~syn[{EDGES[COL_EDGE[bc][d]].row, vaddr[COL_EDGE[bc][d]]}];
                  else
                    syn[8'({EDGES[COL_EDGE[bc][d]].row, vaddr[COL_EDGE[bc][d]][3:0]})] <=
                      ~syn[8'({EDGES[COL_EDGE[bc][d]].row, vaddr[COL_EDGE[bc][d]][3:0]})];
                end
              end
            end
            if (node == last_col) begin
              node  <= '0;
              state <= S_CHECK;
            end else begin
              node <= node + 9'd1;
            end
          end else begin
            tick <= tick + 3'd1;
          end
        end
        S_CHECK: begin
          init <= 1'b0;
          if (syn == '0) begin
            success <= 1'b1;
            state   <= S_DONE;
          end else if (iters == 7'(MAX_ITER)) begin
            state <= S_DONE;
          end else begin
            iters <= iters + 7'd1;
            state <= S_HS;
          end
        end
        S_HS: begin
          if (tick == 3'd3) begin
            tick <= '0;
            if (node == last_row) begin
              node  <= '0;
              syn   <= '0;
              state <= S_VS;
            end else begin
              node <= node + 9'd1;
            end
          end else begin
            tick <= tick + 3'd1;
          end
        end
        S_DONE: begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
