// eg_encoder: systematic encoder for the cyclic EG-LDPC code.
//
// Data words are encoded before they are stored. The codeword polynomial is
//   c(x) = x^(N-K) d(x) + (x^(N-K) d(x) mod g(x)),
// so the K data bits sit unchanged in c[N-1:N-K] and the N-K parity bits,
// the remainder of a division by the generator polynomial g(x), in
// c[N-K-1:0]. g(x) comes from mld_pkg; for the default (15,7) code it is
// 1 + x^4 + x^6 + x^7 + x^8. The division is the usual feedback shift register unrolled over
// the K data bits into XOR logic. Being a multiple of g(x), the result
// satisfies every cyclic shift of the decoder's check equations.
//
// That an encoder stands in front of the memory is the architecture used
// here; its systematic form and the bit placement are this design's own
// choice, made so that the decoder's output can be read back as data
// directly.
//
// Purely combinational: code follows data in the same cycle.
module eg_encoder #(
  parameter int unsigned S = mld_pkg::S,            // geometry EG(2,2^S)
  localparam int unsigned N = mld_pkg::code_n(S),
  localparam int unsigned K = mld_pkg::code_k(S)
) (
  input  logic [K-1:0] data,
  output logic [N-1:0] code
);

  localparam int unsigned P = N - K;
  localparam mld_pkg::poly_t GEN_POLY = mld_pkg::eg_gen_poly(S);

  logic [P-1:0] rem;
  logic         fb;

  always_comb begin
    // remainder of x^P d(x) / g(x), feeding the highest data bit first
    rem = '0;
    for (int i = K - 1; i >= 0; i--) begin
      fb  = data[i] ^ rem[P-1];
      rem = {rem[P-2:0], 1'b0} ^ (fb ? GEN_POLY[P-1:0] : '0);
    end
    code = {data, rem};
  end

endmodule
