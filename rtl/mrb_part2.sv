// mrb_part2: hardware part (Part 2) of the most-reliable-basis (MRB) decoder
// used, after a failed NMS attempt, in the hybrid decoder of LDPC(128,64).
//
// Software (Part 1) sorts the received symbols by reliability, builds the
// systematic generator matrix G* for the K most reliable positions, and
// writes G*, the first candidate codeword FC = v* G* and the reordered
// received word RxCW into the input memories (mrb_inputs). start then runs
// the search over test error patterns (TEPs) of weight <= order, at most
// max_teps of them:
//   PRE   when [X,Y,Z] changes, the pre-encoder forms FC^G*[X]^G*[Y]^G*[Z];
//   EVAL  N_TEU TEP evaluation units each add their own row G*[a_i] and
//         accumulate the distance to RxCW, C bits per clock, N/C clocks;
//   SEL   the best candidate selector keeps the closest candidate and the
//         controller stops on quick escape (best distance <= qe_thr), after
//         the last TEP, or advances the TEP generator.
// A group of N_TEU TEPs thus costs N/C + 1 clocks, plus one clock whenever
// [X,Y,Z] changes. done pulses at the end; best_cw (in the reordered
// positions, for software to put back in order), best_dist, best_tep
// ([a,X,Y,Z]), quick_escape and tep_count then stay valid until the next
// start.
// Defaults N_TEU = 3 and C = 8 are the configuration chosen for the
// breadboard; K = 64, N = 128, the 6-bit RxCW and the block structure follow
// the design description. The sequential PRE/EVAL/SEL schedule is this
// design's choice.
module mrb_part2
  import tc_pkg::*;
#(
  parameter int unsigned N_TEU = 3,
  parameter int unsigned C     = 8,
  parameter int unsigned K     = MRB_K,
  parameter int unsigned N     = MRB_N,
  parameter int unsigned IW    = 7,
  parameter int unsigned CW    = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // written by software (MRB Part 1)
  input  logic                     g_we,
  input  logic [$clog2(K)-1:0]     g_row,
  input  logic [N-1:0]             g_data,
  input  logic                     fc_we,
  input  logic [N-1:0]             fc_data,
  input  logic                     rx_we,
  input  logic [$clog2(N)-1:0]     rx_addr,
  input  logic signed [SOFT_W-1:0] rx_data,
  // control
  input  logic                     start,
  input  logic [2:0]               order,
  input  logic [CW-1:0]            max_teps,
  input  logic [DIST_W-1:0]        qe_thr,
  output logic                     busy,
  output logic                     done,
  output logic                     quick_escape,
  output logic [N-1:0]             best_cw,
  output logic [DIST_W-1:0]        best_dist,
  output logic [IW-1:0]            best_tep [4],
  output logic [CW-1:0]            tep_count
);
  localparam int unsigned M  = N / C;                 // clocks per TEP
  localparam int unsigned SW = $clog2(M > 1 ? M : 2);
  localparam int unsigned NR = N_TEU + 3;

  typedef enum logic [2:0] {M_IDLE, M_PRE, M_EVAL, M_SEL, M_DONE} mstate_e;
  mstate_e state;
  logic [SW-1:0] t;

  // TEP generator
  logic [IW-1:0] x, y, z;
  logic [IW-1:0] a [N_TEU];
  logic          a_valid [N_TEU];
  logic          xyz_change, last, advance, found, qe_hit;
  logic [CW-1:0] gen_count;

  assign advance = (state == M_SEL) && !qe_hit && !last;

  tep_generator #(.N_TEU(N_TEU), .K(K), .IW(IW), .CW(CW)) u_gen (
    .clk(clk), .rst_n(rst_n), .start(start && state == M_IDLE), .advance(advance),
    .order(order), .max_teps(max_teps), .x(x), .y(y), .z(z), .a(a), .a_valid(a_valid),
    .xyz_change(xyz_change), .last(last), .tep_count(gen_count));

  // input memories
  logic [IW-1:0]     rd_idx [NR];
  logic [N-1:0]      rd_row [NR];
  logic [N-1:0]      fc, rx_hard;
  logic [SOFT_W-2:0] rx_mag [N];

  always_comb begin
    rd_idx[0] = x;
    rd_idx[1] = y;
    rd_idx[2] = z;
    for (int i = 0; i < N_TEU; i++) rd_idx[3+i] = a[i];
  end

  mrb_inputs #(.K(K), .N(N), .NR(NR), .IW(IW)) u_in (
    .clk(clk), .g_we(g_we), .g_row(g_row), .g_data(g_data), .fc_we(fc_we), .fc_data(fc_data),
    .rx_we(rx_we), .rx_addr(rx_addr), .rx_data(rx_data), .rd_idx(rd_idx), .rd_row(rd_row),
    .fc(fc), .rx_hard(rx_hard), .rx_mag(rx_mag));

  // pre-encoded candidate
  logic [N-1:0] pre;
  pre_encoder #(.N(N)) u_pre (
    .clk(clk), .load(state == M_PRE), .fc(fc), .gx(rd_row[0]), .gy(rd_row[1]), .gz(rd_row[2]),
    .pre(pre));

  // TEP evaluation bank
  logic [SOFT_W-2:0]  mag_slice [C];
  logic [DIST_W-1:0]  tdist [N_TEU];
  logic [N-1:0]       tcand [N_TEU];

  always_comb
    for (int j = 0; j < C; j++) mag_slice[j] = rx_mag[int'(t)*C + j];

  for (genvar i = 0; i < N_TEU; i++) begin : g_teu
    teu #(.N(N), .C(C), .DW(DIST_W)) u_teu (
      .clk(clk), .en(state == M_EVAL), .clear(t == '0), .slice_idx(t),
      .pre_slice(pre[t*C +: C]), .g_slice(rd_row[3+i][t*C +: C]),
      .rx_hard(rx_hard[t*C +: C]), .rx_mag(mag_slice),
      .dsum(tdist[i]), .cand(tcand[i]));
  end

  best_candidate_selector #(.N_TEU(N_TEU), .N(N), .DW(DIST_W), .IW(IW)) u_sel (
    .clk(clk), .rst_n(rst_n), .init(start && state == M_IDLE), .update(state == M_SEL),
    .dsum(tdist), .valid(a_valid), .cand(tcand), .a(a), .x(x), .y(y), .z(z),
    .qe_thr(qe_thr), .found(found), .best_dist(best_dist), .best_cw(best_cw),
    .best_tep(best_tep), .qe_hit(qe_hit));

  // controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= M_IDLE;
      t            <= '0;
      busy         <= 1'b0;
      done         <= 1'b0;
      quick_escape <= 1'b0;
      tep_count    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_IDLE: if (start) begin
          busy         <= 1'b1;
          quick_escape <= 1'b0;
          tep_count    <= '0;
          state        <= M_PRE;
        end
        M_PRE: begin
          t     <= '0;
          state <= M_EVAL;
        end
        M_EVAL: begin
          if (t == SW'(M - 1)) state <= M_SEL;
          t <= t + SW'(1);
        end
        M_SEL: begin
          t <= '0;
          if (qe_hit || last) begin
            quick_escape <= qe_hit;
            tep_count    <= gen_count + CW'(count_valid(a_valid));
            state        <= M_DONE;
          end else begin
            state <= xyz_change ? M_PRE : M_EVAL;
          end
        end
        M_DONE: begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  function automatic int unsigned count_valid(input logic v [N_TEU]);
    int unsigned s = 0;
    for (int i = 0; i < N_TEU; i++) s += v[i] ? 1 : 0;
    return s;
  endfunction

  // the selector always has a result when the search ends
  a_found_at_done: assert property (@(posedge clk) disable iff (!rst_n) done |-> found);
endmodule
