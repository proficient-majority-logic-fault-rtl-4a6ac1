// check_xor_matrix: the XOR matrix of the serial majority logic decoder.
//
// Forms the J parity check sums of the word held in the decoder's cyclic
// shift register. Check j is the XOR of the codeword bits on line j of the
// geometry (mld_pkg::eg_check_masks). The J lines all pass through the point
// bit c_(N-1) stands for and share no other bit, so the checks are
// orthogonal on c_(N-1). For the default (15,7) code they are
//   checks[0] = c0^c2^c6^c14     checks[1] = c1^c5^c13^c14
//   checks[2] = c3^c11^c12^c14   checks[3] = c7^c8^c10^c14
// A nonzero check sum means an odd number of the bits it covers are in
// error. Each check is a J-input XOR, so the fan-in stays low.
//
// These four equations are the ones of the published serial decoder for the
// (15,7) code; generating them, and those of the larger codes, from the
// geometry is this design's own addition.
//
// Purely combinational: checks follows word in the same cycle.
module check_xor_matrix #(
  parameter int unsigned S = mld_pkg::S,           // geometry EG(2,2^S)
  localparam int unsigned N = mld_pkg::code_n(S),
  localparam int unsigned J = mld_pkg::code_j(S)
) (
  input  logic [N-1:0] word,    // current shift register contents
  output logic [J-1:0] checks   // one check sum per equation
);

  localparam mld_pkg::maskset_t MASKS = mld_pkg::eg_check_masks(S);

  always_comb begin
    for (int j = 0; j < J; j++) begin
      checks[j] = ^(word & MASKS[j][N-1:0]);
    end
  end

endmodule
