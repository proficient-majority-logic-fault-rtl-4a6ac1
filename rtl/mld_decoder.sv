// mld_decoder: serial one-step majority logic decoder for a cyclic EG-LDPC
// code, with error detection in its first iterations and early stop.
//
// A codeword read from memory is loaded into an N-bit cyclic shift register
// (bit c0 .. c_{N-1}). In every iteration the XOR matrix forms the J check
// sums orthogonal on the last bit c_{N-1}, the majority gate decides whether
// that bit is wrong, and the register shifts by one place: c_i takes c_{i-1}
// and c0 takes c_{N-1} through the correction gate (an XOR with the majority
// output). Because every check equation of the code is a cyclic shift of one
// line vector, the same J equations decode each bit in turn as the word
// rotates; after N iterations every bit has been decoded and the word is back
// in its original alignment.
//
// Error detection: during the first DETECT_ITERS (3) iterations the decoder
// watches whether any check sum is nonzero. If none was, the word is taken to
// be error free (for the codes of mld_pkg every pattern of 1 to 4 bit errors
// makes some check fail within those three iterations), decoding stops, and
// the register, rotated back by DETECT_ITERS places, is written to the output
// buffer. Otherwise the decoder runs all N iterations and corrects up to J/2
// errors.
//
// Interface and timing: in_ready is high while idle. A start pulse with
// in_ready loads code_in. out_valid pulses for one cycle with code_out and
// err_detected, DETECT_ITERS + 1 cycles after start for an error-free word
// and N + 1 cycles after start otherwise (4 and 16 for the (15,7) code).
// code_out and err_detected hold their values until the next result.
// in_ready is high again in the cycle out_valid is. Reset (rst_n low,
// asynchronous) returns the decoder to idle and clears the buffer.
//
// The structure (shift register, XOR matrix, majority gate, correction gate,
// early stop after three iterations, output buffer) follows the decoder as
// described for this code; the handshake, the reset and the realignment of an
// early-stopped word are this design's own choices.
module mld_decoder #(
  parameter int unsigned S = mld_pkg::S,                     // geometry EG(2,2^S)
  parameter int unsigned DETECT_ITERS = mld_pkg::DETECT_ITERS,
  localparam int unsigned N = mld_pkg::code_n(S),
  localparam int unsigned J = mld_pkg::code_j(S)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] code_in,
  output logic         in_ready,
  output logic         out_valid,
  output logic [N-1:0] code_out,
  output logic         err_detected
);

  localparam int unsigned IW = $clog2(N + 1);

  typedef enum logic {S_IDLE, S_DECODE} state_t;

  state_t        state;
  logic [N-1:0]  sreg;
  logic [IW-1:0] iter;
  logic          err_seen;

  logic [J-1:0]  checks;
  logic          flip;
  logic [N-1:0]  shifted;
  logic [N-1:0]  realigned;
  logic          err_now;
  logic          last_detect_iter;
  logic          last_iter;

  check_xor_matrix #(.S(S)) u_xor (
    .word  (sreg),
    .checks(checks)
  );

  majority_gate #(.J(J)) u_maj (
    .votes   (checks),
    .majority(flip)
  );

  always_comb begin
    // cyclic shift towards higher indices, correction gate into c0
    shifted = {sreg[N-2:0], sreg[N-1] ^ flip};
    // undo the DETECT_ITERS shifts of an early-stopped word
    for (int i = 0; i < N; i++) begin
      realigned[i] = shifted[(i + DETECT_ITERS) % N];
    end
    err_now          = err_seen | (|checks);
    last_detect_iter = (iter == IW'(DETECT_ITERS - 1));
    last_iter        = (iter == IW'(N - 1));
  end

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      sreg         <= '0;
      iter         <= '0;
      err_seen     <= 1'b0;
      out_valid    <= 1'b0;
      code_out     <= '0;
      err_detected <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            sreg     <= code_in;
            iter     <= '0;
            err_seen <= 1'b0;
            state    <= S_DECODE;
          end
        end
        S_DECODE: begin
          sreg <= shifted;
          iter <= iter + 1'b1;
          if (iter < IW'(DETECT_ITERS)) begin
            err_seen <= err_now;
          end
          if (last_detect_iter && !err_now) begin
            // no check failed in the detection iterations: stop early
            code_out     <= realigned;
            err_detected <= 1'b0;
            out_valid    <= 1'b1;
            state        <= S_IDLE;
          end else if (last_iter) begin
            code_out     <= shifted;
            err_detected <= 1'b1;
            out_valid    <= 1'b1;
            state        <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A decode never outlasts N iterations.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state == S_DECODE |-> iter < IW'(N))
    else $error("mld_decoder: iteration counter overran the code length");

endmodule
