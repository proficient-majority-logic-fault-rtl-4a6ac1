// tb_mld_memory_top: end-to-end test of the protected memory at its default
// size (16 words of 15 bits, 7 data bits each).
//
// All words are written with random data. Then, for many rounds, a random
// word gets 0 to 4 bits flipped through the upset port and is read back:
//   0 flips   early stop: rd_valid 5 cycles after rd_en, no error flagged;
//   1-2 flips the data and the whole codeword come back corrected after
//             17 cycles, error flagged;
//   3-4 flips error flagged after 17 cycles (correction is not promised).
// The word is then rewritten with new data. Reads are sometimes requested
// while the decoder is busy, so that rd_ready holds them off, and writes are
// issued while a word is being decoded. Each of these events is counted; one
// that never happened counts as a failure. The expected codeword is computed
// here by long division by g(x) = 1 + x^4 + x^6 + x^7 + x^8.
module tb_mld_memory_top;

  localparam int N = 15, K = 7, DEPTH = 16, AW = 4;

  logic          clk = 0, rst_n = 0;
  logic          wr_en = 0, rd_en = 0, seu_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, seu_addr = '0;
  logic [K-1:0]  wr_data = '0;
  logic [N-1:0]  seu_mask = '0;
  logic          rd_ready, rd_valid, rd_err_detected;
  logic [K-1:0]  rd_data;
  logic [N-1:0]  rd_code;

  logic [K-1:0]  ref_data [DEPTH];
  int checks = 0, failures = 0;
  int n_early = 0, n_corrected = 0, n_detected = 0, n_stall = 0,
      n_write_busy = 0, n_upset = 0;

  mld_memory_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ref_encode(logic [K-1:0] d);
    logic [N-1:0] r = {d, 8'h00};
    for (int i = N - 1; i >= N - K; i--)
      if (r[i]) r ^= N'(9'h1D1) << (i - (N - K));
    return {d, r[N-K-1:0]};
  endfunction

  function automatic logic [N-1:0] rand_mask(int w);
    logic [N-1:0] m = '0;
    int unsigned idx;
    while ($countones(m) < w) begin
      idx = $urandom % N;
      m[idx] = 1'b1;
    end
    return m;
  endfunction

  task automatic write_word(int a, logic [K-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = AW'(a); wr_data = d;
    ref_data[a] = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic upset(int a, logic [N-1:0] m);
    @(negedge clk);
    seu_en = 1; seu_addr = AW'(a); seu_mask = m;
    @(negedge clk);
    seu_en = 0;
    n_upset++;
  endtask

  // read address a, expecting w flipped bits; optionally write another
  // address while the decoder is busy
  task automatic read_check(int a, int w, bit write_during);
    int cycles, wa;
    logic [K-1:0] wd;
    @(negedge clk);
    rd_en = 1; rd_addr = AW'(a);
    cycles = 0;
    while (!rd_ready) begin
      n_stall++;
      @(negedge clk);
    end
    @(negedge clk);
    rd_en = 0;
    cycles = 1;
    checks++;
    if (rd_ready) begin
      failures++;
      $display("rd_ready high with a read in flight");
    end
    while (!rd_valid && cycles < 40) begin
      if (write_during && cycles == 3) begin
        wa = (a + 1 + ($urandom % (DEPTH - 1))) % DEPTH;
        wd = K'($urandom);
        wr_en = 1; wr_addr = AW'(wa); wr_data = wd;
        ref_data[wa] = wd;
        n_write_busy++;
      end else begin
        wr_en = 0;
      end
      @(negedge clk);
      cycles++;
    end
    wr_en = 0;
    checks++;
    if (w == 0) begin
      n_early++;
      if (cycles != 5 || rd_err_detected || rd_data !== ref_data[a]
          || rd_code !== ref_encode(ref_data[a])) begin
        failures++;
        $display("addr %0d clean: cycles %0d err %b data %h exp %h", a, cycles,
                 rd_err_detected, rd_data, ref_data[a]);
      end
    end else if (w <= 2) begin
      n_corrected++;
      if (cycles != 17 || !rd_err_detected || rd_data !== ref_data[a]
          || rd_code !== ref_encode(ref_data[a])) begin
        failures++;
        $display("addr %0d %0d flips: cycles %0d err %b data %h exp %h", a, w, cycles,
                 rd_err_detected, rd_data, ref_data[a]);
      end
    end else begin
      n_detected++;
      if (cycles != 17 || !rd_err_detected) begin
        failures++;
        $display("addr %0d %0d flips: cycles %0d err %b", a, w, cycles, rd_err_detected);
      end
    end
  endtask

  // a read of b requested while the (clean) word at a is being decoded:
  // rd_ready holds it off until a's result is out
  task automatic stall_test(int a, int b);
    int cycles;
    @(negedge clk);
    rd_en = 1; rd_addr = AW'(a);
    @(negedge clk);
    rd_addr = AW'(b);
    cycles = 1;
    while (!rd_ready && cycles < 40) begin
      n_stall++;
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != 5 || !rd_valid || rd_err_detected || rd_data !== ref_data[a]) begin
      failures++;
      $display("stall: first read of %0d: cycles %0d valid %b data %h exp %h", a, cycles,
               rd_valid, rd_data, ref_data[a]);
    end
    @(negedge clk);
    rd_en = 0;
    cycles = 1;
    while (!rd_valid && cycles < 40) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    n_early += 2;
    if (cycles != 5 || rd_err_detected || rd_data !== ref_data[b]) begin
      failures++;
      $display("stall: second read of %0d: cycles %0d data %h exp %h", b, cycles,
               rd_data, ref_data[b]);
    end
  endtask

  initial begin
    int a, w;
    logic [N-1:0] m, m1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) write_word(i, K'($urandom));
    for (int r = 0; r < 2000; r++) begin
      a = $urandom % DEPTH;
      w = $urandom % 5;
      if (w > 0) begin
        if (w >= 2 && ($urandom % 2) != 0) begin
          // two separate upsets accumulate in the stored word
          m  = rand_mask(w);
          m1 = m & rand_mask(1 + $urandom % w);
          upset(a, m1);
          upset(a, m ^ m1);
        end else begin
          upset(a, rand_mask(w));
        end
      end
      read_check(a, w, ($urandom % 4) == 0);
      if (w > 0) begin
        // re-store the word so that its errors do not pile up
        write_word(a, K'($urandom));
      end else if (($urandom % 8) == 0) begin
        stall_test(a, ($urandom % DEPTH));
      end
    end
    checks++;
    if (n_early == 0 || n_corrected == 0 || n_detected == 0 || n_stall == 0
        || n_write_busy == 0 || n_upset == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("early stops %0d, corrected reads %0d, detected 3-4 bit reads %0d",
             n_early, n_corrected, n_detected);
    $display("read stalls %0d, writes during decode %0d, upsets %0d",
             n_stall, n_write_busy, n_upset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
