// ebc_line_buffer: line buffer holding the last row of the previous stripe.
//
// One word per column of the code-block (DEPTH = 64 columns), each word being
// a fully decoded coefficient {cf, sign, magnitude[NPLANES-1:0]} of row 3 of
// the stripe just decoded: 12 bits for ten magnitude bit-planes. cf marks a
// coefficient that became significant in a cleanup pass; the CFs of the next
// stripe need it to rebuild the previous-stripe significance for the first two
// passes. One synchronous write port (from the output of the bit-plane 0
// stage) and one asynchronous read port (to the column feeder). The 12x64 size
// follows the architecture; the content of the twelfth bit and the port
// timing are this design's choices.
module ebc_line_buffer #(
  parameter int WIDTH = 12,
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
