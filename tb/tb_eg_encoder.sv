// tb_eg_encoder: exhaustive test of the (15,7) encoder. For each of the
// 128 data words it checks that the data bits appear unchanged at the top,
// that the codeword is a multiple of g(x) = 1 + x^4 + x^6 + x^7 + x^8
// (by long division in the testbench), and that all fifteen cyclic shifts
// of the check line {c3, c11, c12, c14} are satisfied. It also checks that
// the smallest weight of a nonzero codeword is 5.
module tb_eg_encoder;

  logic [6:0]  data;
  logic [14:0] code;
  int checks = 0, failures = 0;

  eg_encoder dut (.data(data), .code(code));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [14:0] rotl(logic [14:0] v, int k);
    logic [14:0] r;
    for (int i = 0; i < 15; i++) r[(i + k) % 15] = v[i];
    return r;
  endfunction

  function automatic logic [7:0] mod_g(logic [14:0] c);
    logic [14:0] r = c;
    for (int i = 14; i >= 8; i--)
      if (r[i]) r ^= 15'(9'h1D1) << (i - 8);
    return r[7:0];
  endfunction

  initial begin
    int minw;
    logic [14:0] line;
    minw = 99;
    line = 15'b101_1000_0000_1000;
    for (int d = 0; d < 128; d++) begin
      data = 7'(d);
      #1;
      checks++;
      if (code[14:8] !== data) begin
        failures++;
        $display("data %h: code %h data bits wrong", data, code);
      end
      checks++;
      if (mod_g(code) !== 8'h00) begin
        failures++;
        $display("data %h: code %h not a multiple of g(x)", data, code);
      end
      for (int k = 0; k < 15; k++) begin
        checks++;
        if (^(code & rotl(line, k))) begin
          failures++;
          $display("data %h: code %h fails check shift %0d", data, code, k);
        end
      end
      if (d != 0 && $countones(code) < minw) minw = $countones(code);
    end
    checks++;
    if (minw != 5) begin
      failures++;
      $display("minimum weight %0d, expected 5", minw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
