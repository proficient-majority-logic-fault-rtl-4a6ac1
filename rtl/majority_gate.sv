// majority_gate: the majority circuit of the one-step majority logic decoder.
//
// Its J inputs are the check sums orthogonal on the bit under decoding. The
// output is 1, meaning "flip that bit", when more than half of the inputs are
// 1. With J orthogonal checks this corrects any pattern of up to J/2 errors:
// a wrong bit makes at least J - (J/2 - 1) > J/2 checks fail, and a correct
// bit at most J/2. The strict "more than half" threshold is this design's
// reading of majority voting; a tie (J/2 ones) does not flip the bit.
//
// Purely combinational.
module majority_gate #(
  parameter int unsigned J = mld_pkg::J
) (
  input  logic [J-1:0] votes,
  output logic         majority
);

  localparam int unsigned CW = $clog2(J + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int j = 0; j < J; j++) begin
      ones = ones + CW'(votes[j]);
    end
    majority = (ones > CW'(J / 2));
  end

endmodule
