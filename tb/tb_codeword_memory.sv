// tb_codeword_memory: the codeword memory against a reference array kept
// in the testbench. Random writes, reads and upsets, including writes and
// upsets to the same address in one cycle and reads of an address being
// written; rdata is checked one cycle after each read.
module tb_codeword_memory;

  localparam int W = 15, DEPTH = 16, AW = 4;

  logic          clk = 0;
  logic          we = 0, re = 0, upset_en = 0;
  logic [AW-1:0] waddr = '0, raddr = '0, upset_addr = '0;
  logic [W-1:0]  wdata = '0, upset_mask = '0, rdata;
  logic [W-1:0]  ref_mem [DEPTH];
  logic [W-1:0]  exp_rdata;
  logic          exp_valid = 0;
  int checks = 0, failures = 0;

  codeword_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every address first
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = W'($urandom);
      ref_mem[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (exp_valid) begin
        checks++;
        if (rdata !== exp_rdata) begin
          failures++;
          $display("cycle %0d: rdata %h expected %h", t, rdata, exp_rdata);
        end
      end
      we = ($urandom % 3) == 0;
      waddr = AW'($urandom);
      wdata = W'($urandom);
      re = ($urandom % 2) == 0;
      raddr = ($urandom % 4 == 0) ? waddr : AW'($urandom);
      upset_en = ($urandom % 3) == 0;
      upset_addr = ($urandom % 4 == 0) ? waddr : AW'($urandom);
      upset_mask = W'($urandom);
      // reference: read sees the old contents
      // rdata holds between reads
      if (re) begin
        exp_valid = 1'b1;
        exp_rdata = ref_mem[raddr];
      end
      if (upset_en && !(we && waddr == upset_addr)) ref_mem[upset_addr] ^= upset_mask;
      if (we) ref_mem[waddr] = wdata;
    end
    @(negedge clk);
    if (exp_valid) begin
      checks++;
      if (rdata !== exp_rdata) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
