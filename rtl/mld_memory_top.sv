// mld_memory_top: a memory protected by a Euclidean-geometry LDPC code with
// a serial one-step majority logic decoder that stops early on error-free
// words. The default is the (15,7) code (S = 2); S = 3, 4, 5 select the
// (63,37), (255,175) and (1023,781) codes.
//
// Data path: a K-bit data word is encoded into an N-bit codeword and stored.
// On a read the stored codeword, possibly hit by soft errors, is passed
// through the majority logic decoder before its data bits are returned. The
// decoder looks for failing check equations during its first three
// iterations; a clean word leaves after those three, a word with errors goes
// through all N iterations and has up to J/2 wrong bits corrected (two for
// the (15,7) code).
//
// Interface and timing:
//   write  wr_en, wr_addr, wr_data: encoded and stored at the clock edge.
//   read   rd_en, rd_addr: accepted when rd_ready is high; one read is in
//          flight at a time. The memory answers one cycle later and the
//          decoder starts then, so rd_valid pulses 1 + DETECT_ITERS + 1 = 5
//          cycles after an accepted rd_en for an error-free word and
//          1 + N + 1 cycles after it (17 for the (15,7) code) for a word
//          with errors. rd_code is the whole decoded codeword, rd_data its
//          data bits; they and rd_err_detected hold until the next result.
//   upset  seu_en, seu_addr, seu_mask: flips the masked bits of a stored
//          codeword, to model soft errors in simulation. Tie seu_en low in
//          use.
// rst_n is an active-low asynchronous reset for the control logic; the
// memory array itself is not reset.
//
// The chain encoder - memory - decoder follows the architecture described
// for this scheme; the memory depth, the read handshake and the upset port
// are this design's own choices.
module mld_memory_top #(
  parameter int unsigned S     = mld_pkg::S,        // geometry EG(2,2^S)
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned N    = mld_pkg::code_n(S),
  localparam int unsigned K    = mld_pkg::code_k(S)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [AW-1:0]           wr_addr,
  input  logic [K-1:0]   wr_data,
  input  logic                    rd_en,
  input  logic [AW-1:0]           rd_addr,
  output logic                    rd_ready,
  output logic                    rd_valid,
  output logic [K-1:0]   rd_data,
  output logic [N-1:0]   rd_code,
  output logic                    rd_err_detected,
  input  logic                    seu_en,
  input  logic [AW-1:0]           seu_addr,
  input  logic [N-1:0]   seu_mask
);

  logic [N-1:0] enc_code;
  logic [N-1:0] mem_rdata;
  logic      mem_re;
  logic      rd_pending;
  logic      dec_ready;

  eg_encoder #(.S(S)) u_enc (
    .data(wr_data),
    .code(enc_code)
  );

  codeword_memory #(.W(N), .DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk       (clk),
    .we        (wr_en),
    .waddr     (wr_addr),
    .wdata     (enc_code),
    .re        (mem_re),
    .raddr     (rd_addr),
    .rdata     (mem_rdata),
    .upset_en  (seu_en),
    .upset_addr(seu_addr),
    .upset_mask(seu_mask)
  );

  assign rd_ready = dec_ready && !rd_pending;
  assign mem_re   = rd_en && rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_pending <= 1'b0;
    else        rd_pending <= mem_re;
  end

  mld_decoder #(.S(S)) u_dec (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (rd_pending),
    .code_in     (mem_rdata),
    .in_ready    (dec_ready),
    .out_valid   (rd_valid),
    .code_out    (rd_code),
    .err_detected(rd_err_detected)
  );

  // The memory answers only while the decoder is idle, so no word is lost.
  assert property (@(posedge clk) disable iff (!rst_n) rd_pending |-> dec_ready)
    else $error("mld_memory_top: memory word arrived while the decoder was busy");

  // systematic code: the data bits are the top K bits of the codeword
  assign rd_data = rd_code[N-1:N-K];

endmodule
