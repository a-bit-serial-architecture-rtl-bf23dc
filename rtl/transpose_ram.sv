// transpose_ram: 8x8 word memory that turns rows into columns between the
// two passes of a 2-D transform.
//
// A whole row of N words is written in one cycle (the eight results of one
// 1-D transform leave the core together); a whole column is read
// combinationally, so the reader can load it into the serialiser in the
// cycle it needs it. The document names the transpose RAM and its place
// in the data path; the row-write, column-read organisation is this
// design's choice. Written rows become readable the cycle after `we`.
module transpose_ram
  import bindct_pkg::*;
#(
  parameter int unsigned N = LANES,
  parameter int unsigned W = WORD
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wrow,
  input  logic signed [W-1:0]  wdata [N],
  input  logic [$clog2(N)-1:0] rcol,
  output logic signed [W-1:0]  rdata [N]
);
  logic signed [W-1:0] mem [N][N];

  always_ff @(posedge clk)
    if (we)
      for (int j = 0; j < N; j++) mem[wrow][j] <= wdata[j];

  always_comb
    for (int i = 0; i < N; i++) rdata[i] = mem[i][rcol];

endmodule
