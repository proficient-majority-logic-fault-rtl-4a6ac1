// mld_pkg: code construction shared by the EG-LDPC encoder, memory and
// serial one-step majority logic decoder (MLD).
//
// The codes are the cyclic one-step majority-logic-decodable codes of the
// two-dimensional Euclidean geometry EG(2,2^s) over GF(2^s), here for
// s = 2..5:
//     s   N = 2^(2s)-1   K     J = 2^s   errors corrected J/2
//     2       15          7      4        2
//     3       63         37      8        4
//     4      255        175     16        8
//     5     1023        781     32       16
// The default, S = 2, is the (15,7) code.
//
// Codeword bit c_i stands for the point alpha^i of the geometry, alpha a
// primitive element of GF(2^(2s)). The J check equations used by the decoder
// are the lines {p + beta*(q - p) : beta in GF(2^s)} through the point
// p = alpha^(N-1) that do not pass through the origin; any two of them meet
// only in p, so they are orthogonal on bit c_(N-1). For s = 2 with the
// primitive polynomial x^4 + x + 1 they come out as
//     c0^c2^c6^c14, c1^c5^c13^c14, c3^c11^c12^c14, c7^c8^c10^c14.
// Every check equation of the code is a cyclic shift of one line, so the
// code is the set of words orthogonal to all shifts of line 0, and its
// generator polynomial is g(x) = (x^N + 1) / gcd(x^N + 1, L*(x)), L* being
// line 0 with its bit order reversed. For s = 2 this gives
// g(x) = 1 + x^4 + x^6 + x^7 + x^8 and K = 7.
//
// The code sizes and the four (15,7) check equations are those of the
// published scheme. Computing everything by constant functions at
// elaboration, and the primitive polynomials (standard ones), are this
// design's own choices.
package mld_pkg;

  localparam int unsigned MAXS = 5;
  localparam int unsigned MAXN = 1023;   // largest code length supported
  localparam int unsigned MAXJ = 32;     // largest number of check equations

  typedef logic [MAXN:0]             poly_t;     // bit i = coefficient of x^i
  typedef logic [MAXJ-1:0][MAXN-1:0] maskset_t;  // check equation j = mask j

  // primitive polynomial of GF(2^(2s)), bit i = coefficient of x^i
  function automatic int unsigned prim_poly(int unsigned s);
    case (s)
      2:       return 'h13;   // x^4 + x + 1
      3:       return 'h43;   // x^6 + x + 1
      4:       return 'h11D;  // x^8 + x^4 + x^3 + x^2 + 1
      5:       return 'h409;  // x^10 + x^3 + 1
      default: return 0;
    endcase
  endfunction

  function automatic int unsigned code_n(int unsigned s);
    return (1 << (2 * s)) - 1;
  endfunction

  function automatic int unsigned code_j(int unsigned s);
    return 1 << s;
  endfunction

  // The J lines through alpha^(N-1) that miss the origin, as bit masks;
  // mask j is the line through the j-th lowest bit not on an earlier line.
  function automatic maskset_t eg_check_masks(int unsigned s);
    int unsigned m, n, q, x, p0, d, pt, nl;
    int unsigned expt [MAXN+1];
    int unsigned logt [MAXN+1];
    logic [MAXN-1:0] covered, line;
    logic through_origin;
    maskset_t masks;
    m = 2 * s;
    n = code_n(s);
    q = code_j(s);
    for (int unsigned j = 0; j < MAXJ; j++) masks[j] = '0;
    covered = '0;
    nl = 0;
    // exponent and logarithm tables of GF(2^m)
    x = 1;
    for (int unsigned i = 0; i < n; i++) begin
      expt[i] = x;
      logt[x] = i;
      x = x << 1;
      if ((x >> m) != 0) x = x ^ prim_poly(s);
    end
    p0 = expt[n-1];
    for (int unsigned j = 0; j < n - 1; j++) begin
      if (!covered[j]) begin
        // line through p0 and alpha^j: p0 + beta*d, beta = 0 or alpha^((k-1)(q+1))
        d = p0 ^ expt[j];
        line = '0;
        through_origin = 1'b0;
        for (int unsigned k = 0; k < q; k++) begin
          pt = (k == 0) ? p0 : (p0 ^ expt[((k - 1) * (q + 1) + logt[d]) % n]);
          if (pt == 0) through_origin = 1'b1;
          else         line[logt[pt]] = 1'b1;
        end
        if (!through_origin) begin
          masks[nl] = line;
          covered   = covered | line;
          nl++;
        end
      end
    end
    return masks;
  endfunction

  // degree of a polynomial, searching down from bit 'start'; -1 for zero
  function automatic int poly_degree(poly_t a, int start);
    for (int i = start; i >= 0; i--) begin
      if (a[i]) return i;
    end
    return -1;
  endfunction

  // generator polynomial: (x^N + 1) / gcd(x^N + 1, reversed line 0)
  function automatic poly_t eg_gen_poly(int unsigned s);
    int unsigned n;
    int da, db, t;
    poly_t a, b, r, quo, line_rev;
    maskset_t masks;
    masks = eg_check_masks(s);
    n = code_n(s);
    line_rev = '0;
    for (int unsigned i = 0; i < n; i++) line_rev[(n - i) % n] = masks[0][i];
    a = '0; a[n] = 1'b1; a[0] = 1'b1;
    b = line_rev;
    da = poly_degree(a, MAXN);
    db = poly_degree(b, MAXN);
    while (db >= 0) begin
      while (da >= db) begin
        a  = a ^ (b << (da - db));
        da = poly_degree(a, da);
      end
      r = a; a = b; b = r;
      t = da; da = db; db = t;
    end
    r = '0; r[n] = 1'b1; r[0] = 1'b1;
    quo = '0;
    db = poly_degree(a, MAXN);
    da = n;
    while (da >= db) begin
      quo[da - db] = 1'b1;
      r  = r ^ (a << (da - db));
      da = poly_degree(r, da);
    end
    return quo;
  endfunction

  function automatic int unsigned code_k(int unsigned s);
    return code_n(s) - int'(poly_degree(eg_gen_poly(s), MAXN));
  endfunction

  // Default code and decoder setting
  localparam int unsigned S = 2;
  localparam int unsigned N = code_n(S);
  localparam int unsigned K = code_k(S);
  localparam int unsigned J = code_j(S);
  localparam int unsigned DETECT_ITERS = 3;  // iterations used for error detection

endpackage
