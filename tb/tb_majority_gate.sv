// tb_majority_gate: exhaustive test of the majority gate for J = 4 (the
// (15,7) code) and J = 8 (the (63,37) code). The output must be 1 exactly
// when more than half of the inputs are 1.
module tb_majority_gate;

  logic [3:0] v4;
  logic [7:0] v8;
  logic       m4, m8;
  int checks = 0, failures = 0;

  majority_gate #(.J(4)) dut4 (.votes(v4), .majority(m4));
  majority_gate #(.J(8)) dut8 (.votes(v8), .majority(m8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(int unsigned v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += (v >> i) & 1;
    return n;
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin
      v4 = 4'(i);
      #1;
      checks++;
      if (m4 !== (ones(i) >= 3)) begin
        failures++;
        $display("J=4 votes %b: majority %b", v4, m4);
      end
    end
    for (int i = 0; i < 256; i++) begin
      v8 = 8'(i);
      #1;
      checks++;
      if (m8 !== (ones(i) >= 5)) begin
        failures++;
        $display("J=8 votes %b: majority %b", v8, m8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
