// cfg_mem: configuration memory (CM) behind one control unit of the array.
//
// In the document every FU, register file and multiplexer of the CGA section
// has its own configuration memory of fixed depth 128 words, whose width
// depends on what it controls; the CM is the instruction memory of the array
// mode. Here each tile has one CM for its FU and source muxes, one for its
// data register file and one for its predicate register file.
//
// Write port: a word is loaded at the rising edge when we = 1 (the document
// does not say how CMs are filled; this port is this design's choice).
// Read port: while en = 1 (the array is in CGA mode) rdata is the word at the
// configuration address raddr, asynchronously, so that the selected context
// controls the FU in the same cycle. While en = 0 rdata is all zeros, which
// every control unit decodes as "no operation, no register write", so the
// array is idle in VLIW mode. The contents are not reset; software loads
// every context it uses.
module cfg_mem #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             en,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = en ? mem[raddr] : '0;

endmodule
