// tb_check_xor_matrix: exhaustive test of the XOR matrix for the (15,7)
// code. Every one of the 2^15 words is applied and each of the four check
// sums is compared with the parity of its bits, taken from explicit lists
// of bit indices kept in this testbench.
module tb_check_xor_matrix;

  logic [14:0] word;
  logic [3:0]  checks;
  int checks_n = 0, failures = 0;

  check_xor_matrix dut (.word(word), .checks(checks));

  // the four equations, by bit index; all contain c14
  int unsigned eq [4][4] = '{'{0, 2, 6, 14}, '{1, 5, 13, 14}, '{3, 11, 12, 14}, '{7, 8, 10, 14}};

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks_n, failures);
    $finish;
  end

  initial begin
    logic exp;
    logic [3:0] expv;
    for (int w = 0; w < (1 << 15); w++) begin
      word = 15'(w);
      #1;
      for (int j = 0; j < 4; j++) begin
        exp = 1'b0;
        for (int b = 0; b < 4; b++) exp ^= word[eq[j][b]];
        expv[j] = exp;
      end
      checks_n++;
      if (checks !== expv) begin
        failures++;
        if (failures < 10) $display("word %h: checks %b expected %b", word, checks, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks_n, failures);
    $finish;
  end

endmodule
