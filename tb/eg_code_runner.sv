// eg_code_runner: drives one protected memory built for the code of
// geometry EG(2,2^S) through a series of write / corrupt / read rounds and
// counts the checks it makes. Used by tb_eg_codes, once per code.
//
// Each round writes random data to a random address, flips w random bits of
// the stored codeword through the upset port, reads it back and checks:
//   w = 0         no error flagged, data intact, result 5 cycles after rd_en
//                 (early stop after three decoder iterations);
//   1 <= w <= J/2 error flagged, data and codeword restored, result N + 2
//                 cycles after rd_en;
//   w = 3, 4 when above J/2 (only the (15,7) code): error flagged after
//                 N + 2 cycles.
// The code's K and J are also compared with the expected values passed in,
// and the check equations the design computes are tested for the properties
// the decoder relies on: J lines of J bits each, all through c_(N-1) and
// disjoint elsewhere (orthogonality), each a cyclic shift of line 0, no two
// ones of a line at the same cyclic distance, and no distance a multiple of
// 2^S + 1.
module eg_code_runner #(
  parameter int unsigned S      = 2,
  parameter int unsigned EXP_K  = 7,
  parameter int unsigned ROUNDS = 100
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_early,
  output int   n_corrected,
  output int   n_detected
);

  localparam int unsigned N = mld_pkg::code_n(S);
  localparam int unsigned K = mld_pkg::code_k(S);
  localparam int unsigned J = mld_pkg::code_j(S);
  localparam int unsigned T = J / 2;
  localparam int unsigned DEPTH = 16, AW = 4;

  logic          clk = 0, rst_n = 0;
  logic          wr_en = 0, rd_en = 0, seu_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, seu_addr = '0;
  logic [K-1:0]  wr_data = '0;
  logic [N-1:0]  seu_mask = '0;
  logic          rd_ready, rd_valid, rd_err_detected;
  logic [K-1:0]  rd_data;
  logic [N-1:0]  rd_code;

  mld_memory_top #(.S(S), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [K-1:0] rand_data();
    logic [K-1:0] d;
    for (int i = 0; i < K; i++) d[i] = 1'($urandom);
    return d;
  endfunction

  function automatic logic [N-1:0] rand_mask(int unsigned w);
    logic [N-1:0] m = '0;
    int unsigned idx;
    while ($countones(m) < w) begin
      idx = $urandom % N;
      m[idx] = 1'b1;
    end
    return m;
  endfunction

  localparam mld_pkg::maskset_t LINES = mld_pkg::eg_check_masks(S);

  function automatic logic [N-1:0] rotl(logic [N-1:0] v, int unsigned k);
    logic [N-1:0] r;
    for (int unsigned i = 0; i < N; i++) r[(i + k) % N] = v[i];
    return r;
  endfunction

  task automatic check_lines();
    logic [N-1:0] all_bits, l, dist_seen;
    bit is_shift;
    int unsigned dd;
    all_bits = '0;
    for (int unsigned j = 0; j < J; j++) begin
      l = LINES[j][N-1:0];
      checks++;
      if ($countones(l) != J || !l[N-1] || (all_bits & l & ~(N'(1) << (N - 1))) != '0) begin
        failures++;
        $display("S=%0d line %0d not orthogonal", S, j);
      end
      all_bits |= l;
      is_shift = 0;
      for (int unsigned k = 0; k < N; k++) if (rotl(LINES[0][N-1:0], k) == l) is_shift = 1;
      checks++;
      if (!is_shift) begin
        failures++;
        $display("S=%0d line %0d is not a cyclic shift of line 0", S, j);
      end
      dist_seen = '0;
      for (int unsigned a = 0; a < N; a++) begin
        for (int unsigned b = 0; b < N; b++) begin
          if (a != b && l[a] && l[b]) begin
            dd = (b + N - a) % N;
            checks++;
            if (dist_seen[dd] || (dd % ((1 << S) + 1)) == 0) begin
              failures++;
              $display("S=%0d line %0d: distance %0d repeated or a multiple of 2^S+1", S, j, dd);
            end
            dist_seen[dd] = 1'b1;
          end
        end
      end
    end
  endtask

  initial begin
    logic [K-1:0] d;
    logic [N-1:0] cw;
    int unsigned a, w, cycles;
    done = 0; checks = 0; failures = 0;
    n_early = 0; n_corrected = 0; n_detected = 0;
    checks++;
    if (K != EXP_K || N != (1 << (2 * S)) - 1 || J != (1 << S)) begin
      failures++;
      $display("S=%0d: N %0d K %0d J %0d, expected K %0d", S, N, K, J, EXP_K);
    end
    check_lines();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROUNDS; r++) begin
      a = $urandom % DEPTH;
      d = rand_data();
      case (r % 4)
        0:       w = 0;
        1:       w = 1 + $urandom % 4;          // 1..4: always detected
        default: w = 1 + $urandom % T;          // within correction capacity
      endcase
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = d;
      #1 cw = dut.enc_code;
      @(negedge clk);
      wr_en = 0;
      if (w > 0) begin
        seu_en = 1; seu_addr = AW'(a); seu_mask = rand_mask(w);
        @(negedge clk);
        seu_en = 0;
      end
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 0;
      cycles = 1;
      while (!rd_valid && cycles < N + 10) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (w == 0) begin
        n_early++;
        if (cycles != 5 || rd_err_detected || rd_data !== d || rd_code !== cw) begin
          failures++;
          $display("S=%0d clean read: cycles %0d err %b", S, cycles, rd_err_detected);
        end
      end else if (w <= T) begin
        n_corrected++;
        if (cycles != N + 2 || !rd_err_detected || rd_data !== d || rd_code !== cw) begin
          failures++;
          $display("S=%0d %0d errors: cycles %0d err %b data ok %b", S, w, cycles,
                   rd_err_detected, rd_data === d);
        end
      end else begin
        n_detected++;
        if (cycles != N + 2 || !rd_err_detected) begin
          failures++;
          $display("S=%0d %0d errors: cycles %0d err %b", S, w, cycles, rd_err_detected);
        end
      end
    end
    done = 1;
  end

endmodule
