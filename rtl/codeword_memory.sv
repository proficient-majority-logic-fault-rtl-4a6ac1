// codeword_memory: word-wide storage for encoded words.
//
// A DEPTH x W array with one synchronous write port and one synchronous read
// port. A read presents the stored word on rdata one cycle after re; rdata
// holds until the next read. A write lands at the end of its cycle; a read of
// the same address in that cycle returns the old word.
//
// The upset port models soft errors, the single event upsets that flip
// memory cells without damaging them and that the code is there to correct:
// when upset_en is high the stored word at upset_addr is XORed with
// upset_mask. A write to the same address in the same cycle takes
// precedence. This port exists for fault injection in simulation; tie
// upset_en low in use.
//
// Depth, port arrangement and read latency are this design's own choices;
// only the memory's place between the encoder and the decoder is given.
// The array has no reset, as a RAM macro would not.
module codeword_memory #(
  parameter int unsigned W      = mld_pkg::N,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [W-1:0]  upset_mask
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[waddr] <= wdata;
    end
    if (upset_en && !(we && waddr == upset_addr)) begin
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    end
    if (re) begin
      rdata <= mem[raddr];
    end
  end

endmodule
