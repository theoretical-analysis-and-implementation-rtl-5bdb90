// pre_encoder: shared pre-encoded candidate codeword of the MRB Part 2 unit.
//
// Every TEU in the bank evaluates a TEP [a_i, X, Y, Z] whose last three
// indices are common, so the part of the encoding they share, the first
// candidate codeword (FC) XOR the rows X, Y and Z of G*, is formed once here
// and held in a register:  pre = FC ^ G*[X] ^ G*[Y] ^ G*[Z]  (a zero index
// contributes a zero row; the caller supplies the rows). load captures a new
// value; it is valid from the next clock. This sharing follows the design
// description; the one-clock register is this design's choice.
module pre_encoder #(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         load,
  input  logic [N-1:0] fc,
  input  logic [N-1:0] gx,
  input  logic [N-1:0] gy,
  input  logic [N-1:0] gz,
  output logic [N-1:0] pre
);
  always_ff @(posedge clk) begin
    if (load) pre <= fc ^ gx ^ gy ^ gz;
  end
endmodule
