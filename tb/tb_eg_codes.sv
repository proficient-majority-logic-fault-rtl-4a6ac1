// tb_eg_codes: runs the protected memory with each one-step majority logic
// decodable EG-LDPC code of the family: (15,7), (63,37), (255,175) and
// (1023,781), each through write / corrupt / read rounds (see
// eg_code_runner). Checks K and J of every code, early stop on clean words,
// correction of up to J/2 errors after N iterations, and detection of every
// 1 to 4 bit error in the first three iterations.
module tb_eg_codes;

  logic done [4];
  int   c [4], f [4], ne [4], nc [4], nd [4];
  int   checks, failures;

  eg_code_runner #(.S(2), .EXP_K(7),   .ROUNDS(400)) r15   (.done(done[0]), .checks(c[0]), .failures(f[0]), .n_early(ne[0]), .n_corrected(nc[0]), .n_detected(nd[0]));
  eg_code_runner #(.S(3), .EXP_K(37),  .ROUNDS(300)) r63   (.done(done[1]), .checks(c[1]), .failures(f[1]), .n_early(ne[1]), .n_corrected(nc[1]), .n_detected(nd[1]));
  eg_code_runner #(.S(4), .EXP_K(175), .ROUNDS(200)) r255  (.done(done[2]), .checks(c[2]), .failures(f[2]), .n_early(ne[2]), .n_corrected(nc[2]), .n_detected(nd[2]));
  eg_code_runner #(.S(5), .EXP_K(781), .ROUNDS(100)) r1023 (.done(done[3]), .checks(c[3]), .failures(f[3]), .n_early(ne[3]), .n_corrected(nc[3]), .n_detected(nd[3]));

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
      $display("S=%0d: %0d checks, %0d failures, early stops %0d, corrected %0d, detected only %0d",
               i + 2, c[i], f[i], ne[i], nc[i], nd[i]);
      if (ne[i] == 0 || nc[i] == 0) failures++;
    end
    if (nd[0] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
