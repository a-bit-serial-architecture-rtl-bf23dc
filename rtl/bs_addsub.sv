// bs_addsub: bit-serial adder or subtractor.
//
// One full adder and one carry flip-flop. Operands arrive LSB first; the
// sum bit is combinational, the carry is kept for the next bit. In the
// cycle marked by `first` (frame position 0 of the operands) the stored
// carry is replaced by its initial value: 0 for an adder, 1 for a
// subtractor, which also inverts b so that s = a + ~b + 1 = a - b.
// A word of n bits therefore takes n cycles, with no latency of its own.
// The structure follows the document's bit-serial adder and subtractor;
// applying the initial value as a multiplexer at frame start is this
// design's way of initialising the flip-flop for every word.
module bs_addsub #(
  parameter bit SUB = 1'b0        // 0: s = a + b, 1: s = a - b
) (
  input  logic clk,
  input  logic rst_n,
  input  logic first,             // first bit of a word: use initial carry
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry_q, cin, bb, cout;

  always_comb begin
    bb   = SUB ? ~b : b;
    cin  = first ? SUB : carry_q;
    s    = a ^ bb ^ cin;
    cout = (a & bb) | (a & cin) | (bb & cin);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) carry_q <= SUB;
    else        carry_q <= cout;

endmodule
