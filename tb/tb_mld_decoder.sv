// tb_mld_decoder: the serial majority logic decoder on the (15,7) code.
//
// Codewords are made in the testbench as m(x) g(x) with a random message
// polynomial m(x) of degree below 7, independently of the encoder. For each
// of several codewords every error pattern of weight 0 to 4 is applied
// (1 + 15 + 105 + 455 + 1365 patterns):
//   weight 0     the decoder must stop early: out_valid 4 cycles after
//                start, err_detected low, the word unchanged;
//   weight 1, 2  err_detected high, out_valid after 16 cycles, the original
//                codeword restored;
//   weight 3, 4  err_detected high (every such pattern is caught in the
//                first three iterations) and out_valid after 16 cycles.
// in_ready is checked to be low while a word is being decoded.
module tb_mld_decoder;

  localparam int N = 15;
  localparam int NWORDS = 4;

  logic         clk = 0, rst_n = 0;
  logic         start = 0;
  logic [N-1:0] code_in = '0;
  logic         in_ready, out_valid, err_detected;
  logic [N-1:0] code_out;
  int checks = 0, failures = 0;
  int n_early = 0, n_corrected = 0, n_detected = 0;

  mld_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] gf2_mul_g(logic [6:0] m);
    logic [N-1:0] c = '0;
    logic [8:0]   g = 9'h1D1;
    for (int i = 0; i < 7; i++)
      if (m[i]) c ^= N'(g) << i;
    return c;
  endfunction

  task automatic run_one(logic [N-1:0] cw, logic [N-1:0] err, int w);
    int cycles = 0;
    @(negedge clk);
    if (!in_ready) begin
      failures++;
      $display("decoder not ready");
    end
    start = 1; code_in = cw ^ err;
    @(negedge clk);
    start = 0; code_in = '0;
    cycles = 1;
    while (!out_valid && cycles < 40) begin
      checks++;
      if (in_ready) begin
        failures++;
        $display("in_ready high while decoding");
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (w == 0) begin
      if (cycles != 4 || err_detected || code_out !== cw) begin
        failures++;
        $display("clean %h: cycles %0d err %b out %h", cw, cycles, err_detected, code_out);
      end
      n_early++;
    end else if (w <= 2) begin
      if (cycles != 16 || !err_detected || code_out !== cw) begin
        failures++;
        $display("cw %h err %h: cycles %0d err %b out %h", cw, err, cycles, err_detected, code_out);
      end
      n_corrected++;
    end else begin
      if (cycles != 16 || !err_detected) begin
        failures++;
        $display("cw %h err %h (w %0d): cycles %0d err %b", cw, err, w, cycles, err_detected);
      end
      n_detected++;
    end
  endtask

  initial begin
    logic [N-1:0] cw;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NWORDS; k++) begin
      cw = gf2_mul_g((k == 0) ? 7'h00 : 7'($urandom));
      for (int e = 0; e < (1 << N); e++) begin
        if ($countones(e) <= 4) run_one(cw, N'(e), $countones(e));
      end
    end
    checks++;
    if (n_early == 0 || n_corrected == 0 || n_detected == 0) begin
      failures++;
      $display("a decoding outcome never occurred");
    end
    $display("early stops %0d, corrected %0d, detected 3-4 bit %0d", n_early, n_corrected, n_detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
