// slrt_frame_sync: start- and tail-sequence detector using the simplified
// likelihood ratio test (S-LRT).
//
// The unit keeps the last TAIL_LEN soft symbols in a shift register and
// computes, for a window of L symbols compared with a stored pattern s,
//     Lambda = | sum_k y_k * s_k |  -  sum_k |y_k|      (s_k = +1 for bit 0)
// Lambda is never positive; it is 0 when every symbol agrees with the
// pattern or with its complement, so it is insensitive to the sign
// ambiguity of the link, and the sign of the correlation tells the polarity
// of the received stream. A detection is declared when Lambda >= threshold
// (thresholds are negative numbers set by software).
// One metric unit serves both modes, chosen with mode:
//   mode = 0 (start): after every new symbol the last START_LEN symbols are
//     tested against the start sequence; start_det pulses two clocks after
//     the symbol's sym_valid, with polarity = 1 when the stream is inverted.
//   mode = 1 (tail): a test over the last TAIL_LEN symbols against the tail
//     sequence runs only when tail_eval is pulsed (once per codeword, by the
//     CLTU controller); tail_done pulses the next clock with tail_det.
// The metric, the two modes and the 64/128 sequence lengths follow the
// design description; the threshold form, the pattern bit order (first
// symbol = MSB) and the timing are this design's choices, as is the guard
// that ignores the window until START_L symbols have arrived or while it
// holds only zeros (an all-zero window would otherwise give Lambda = 0).
module slrt_frame_sync
  import tc_pkg::*;
#(
  parameter int unsigned        START_L = START_LEN,
  parameter int unsigned        TAIL_L  = TAIL_LEN,
  parameter logic [START_L-1:0] START_PATTERN = START_SEQ,
  parameter logic [TAIL_L-1:0]  TAIL_PATTERN  = TAIL_SEQ,
  parameter int unsigned        MW = 15        // metric width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mode,
  input  logic                     sym_valid,
  input  logic signed [SOFT_W-1:0] sym,
  input  logic                     tail_eval,
  input  logic signed [MW-1:0]     start_thr,
  input  logic signed [MW-1:0]     tail_thr,
  output logic                     start_det,
  output logic                     polarity,
  output logic                     tail_done,
  output logic                     tail_det,
  output logic signed [MW-1:0]     metric
);
  logic signed [SOFT_W-1:0] win [TAIL_L];   // win[0] = newest symbol
  logic                     valid_q;
  logic [7:0]               fill;      // symbols seen since reset, saturating
  logic signed [MW-1:0]     corr, energy, lam, abs_corr;

  always_ff @(posedge clk) begin
    if (sym_valid) begin
      win[0] <= sym;
      for (int i = 1; i < TAIL_L; i++) win[i] <= win[i-1];
    end
  end

  // shared metric unit
  always_comb begin
    corr   = '0;
    energy = '0;
    for (int i = 0; i < TAIL_L; i++) begin
      logic pbit;
      logic use_i;
      use_i = mode || (i < START_L);
      pbit  = mode ? TAIL_PATTERN[i] : ((i < START_L) ? START_PATTERN[i % START_L] : 1'b0);
      if (use_i) begin
        corr   = pbit ? corr - MW'(win[i]) : corr + MW'(win[i]);
        energy = energy + MW'(soft_mag(win[i]));
      end
    end
    abs_corr = (corr < 0) ? -corr : corr;
    lam      = abs_corr - energy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      fill      <= '0;
      start_det <= 1'b0;
      polarity  <= 1'b0;
      tail_done <= 1'b0;
      tail_det  <= 1'b0;
      metric    <= '0;
    end else begin
      valid_q   <= sym_valid && !mode;
      if (sym_valid && fill != 8'hFF) fill <= fill + 8'd1;
      start_det <= 1'b0;
      tail_done <= 1'b0;
      if (valid_q && !mode) begin
        metric    <= lam;
        start_det <= (lam >= start_thr) && (fill >= 8'(START_L)) && (energy != '0);
        polarity  <= corr[MW-1];
      end
      if (tail_eval && mode) begin
        metric    <= lam;
        tail_done <= 1'b1;
        tail_det  <= (lam >= tail_thr);
      end
    end
  end
endmodule
