// cltu_controller: CLTU reception and termination.
//
// While no CLTU is active the frame synchronizer runs in start mode. When it
// reports the start sequence, the controller latches the stream polarity,
// switches the synchronizer to tail mode and cuts the following symbols into
// blocks of n (128 or 512, from code_sel). Each symbol, sign-corrected, is
// written straight into the decoder's LLR memory, alternating between two
// pages so that one block can be received while the previous one is decoded.
// At the end of each block:
//   - with a tail sequence (tail_en = 1, used with LDPC(128,64)) the
//     synchronizer tests the block against the 128-symbol tail; a match ends
//     the CLTU, otherwise the block is handed to the decoder;
//   - without a tail (LDPC(512,256)) the block goes to the decoder at once,
//     and a decoding failure ends the CLTU.
// If a block ends while the decoder is still busy, the block is dropped and
// overrun is set; it stays set until reset. The two termination rules follow
// the design description. The paging, the block-boundary timing, the overrun
// flag and driving the synchronizer mode from here (rather than from
// software) are this design's choices.
// Symbols must be at least 4 clocks apart (checked by an assertion), which
// the link rates (at most 64 ksps) meet by a wide margin.
module cltu_controller
  import tc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  code_e                    code_sel,
  input  logic                     tail_en,
  input  logic                     sym_valid,
  input  logic signed [SOFT_W-1:0] sym,
  // frame synchronizer
  output logic                     fs_mode,
  output logic                     fs_tail_eval,
  input  logic                     fs_start_det,
  input  logic                     fs_polarity,
  input  logic                     fs_tail_done,
  input  logic                     fs_tail_det,
  // decoder
  output logic                     llr_we,
  output logic                     llr_page,
  output logic [8:0]               llr_addr,
  output logic signed [SOFT_W-1:0] llr_data,
  output logic                     dec_start,
  output logic                     dec_page,
  input  logic                     dec_busy,
  input  logic                     dec_done,
  input  logic                     dec_success,
  // status
  output logic                     cltu_active,
  output logic                     cltu_end,
  output logic                     end_by_tail,
  output logic [15:0]              cw_count,
  output logic                     overrun
);
  typedef enum logic [1:0] {C_SEARCH, C_RECV, C_TEVAL, C_TWAIT} cstate_e;
  cstate_e state;
  logic       pol;
  logic       wpage;
  logic [8:0] cnt;
  logic [8:0] last;

  assign last         = (code_sel == CODE_512_256) ? 9'd511 : 9'd127;
  assign fs_mode      = (state != C_SEARCH);
  assign fs_tail_eval = (state == C_TEVAL);
  assign cltu_active  = (state != C_SEARCH);

  // symbol write into the decoder LLR memory
  assign llr_we   = (state == C_RECV) && sym_valid;
  assign llr_page = wpage;
  assign llr_addr = cnt;
  assign llr_data = pol ? -sym : sym;

  task automatic hand_over();
    if (dec_busy) overrun <= 1'b1;
    else begin
      dec_start <= 1'b1;
      dec_page  <= wpage;
      cw_count  <= cw_count + 16'd1;
    end
    wpage <= ~wpage;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_SEARCH;
      pol         <= 1'b0;
      wpage       <= 1'b0;
      cnt         <= '0;
      dec_start   <= 1'b0;
      dec_page    <= 1'b0;
      cltu_end    <= 1'b0;
      end_by_tail <= 1'b0;
      cw_count    <= '0;
      overrun     <= 1'b0;
    end else begin
      dec_start <= 1'b0;
      cltu_end  <= 1'b0;
      unique case (state)
        C_SEARCH: if (fs_start_det) begin
          pol   <= fs_polarity;
          cnt   <= '0;
          state <= C_RECV;
        end
        C_RECV: begin
          if (!tail_en && dec_done && !dec_success) begin
            cltu_end    <= 1'b1;
            end_by_tail <= 1'b0;
            state       <= C_SEARCH;
          end else if (sym_valid) begin
            if (cnt == last) begin
              cnt <= '0;
              if (tail_en) state <= C_TEVAL;
              else         hand_over();
            end else begin
              cnt <= cnt + 9'd1;
            end
          end
        end
        C_TEVAL: state <= C_TWAIT;
        C_TWAIT: if (fs_tail_done) begin
          if (fs_tail_det) begin
            cltu_end    <= 1'b1;
            end_by_tail <= 1'b1;
            state       <= C_SEARCH;
          end else begin
            hand_over();
            state <= C_RECV;
          end
        end
        default: state <= C_SEARCH;
      endcase
    end
  end

  // symbols come far slower than the clock: at least 4 clocks apart
  a_sym_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    sym_valid |=> !sym_valid [*3]);
endmodule
