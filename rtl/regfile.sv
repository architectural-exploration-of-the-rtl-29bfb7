// regfile: multi-ported register file, used for every DRF and PRF of the
// array.
//
// The document fixes the four configurations this module is built in:
//   global DRF  64 x 32 bit, 12 read / 4 write ports
//   global PRF  64 x  1 bit,  4 read / 4 write ports
//   local DRF   16 x 32 bit,  2 read / 1 write port
//   local PRF   16 x  1 bit,  1 read / 1 write port
// (16 words for the local PRF and 64 for the global PRF are this design's
// reading of "the local and global RFs have 16 and 64 words"). The defaults
// are those of the global DRF.
//
// Reads are asynchronous: rdata[i] shows the word at raddr[i] in the same
// cycle, as the non-pipelined core needs operands and results within one
// clock. Writes take effect at the rising clock edge; a read of a word being
// written returns the old value. When several write ports hit the same
// address in one cycle the highest-numbered port wins (the document does not
// say; the compiler is expected to avoid it). Reset clears all words, a
// choice of this design so that nothing is read uninitialised.
module regfile #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned NREAD  = 12,
  parameter int unsigned NWRITE = 4,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NREAD-1:0][AW-1:0]    raddr,
  output logic [NREAD-1:0][WIDTH-1:0] rdata,
  input  logic [NWRITE-1:0]           we,
  input  logic [NWRITE-1:0][AW-1:0]   waddr,
  input  logic [NWRITE-1:0][WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      for (int unsigned w = 0; w < NWRITE; w++)
        if (we[w]) mem[waddr[w]] <= wdata[w];
    end
  end

  always_comb
    for (int unsigned r = 0; r < NREAD; r++) rdata[r] = mem[raddr[r]];

endmodule
