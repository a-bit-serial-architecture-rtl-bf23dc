// bs_butterfly: bit-serial butterfly, s = a + b and d = a - b.
//
// A bit-serial adder and a bit-serial subtractor share the two inputs; both
// results are registered, so the butterfly has a latency of one cycle. With
// two butterfly stages this register accounts for the difference between
// the delays drawn along each line of the forward architecture and its
// stated latency of 12 cycles. Guard slots of the output frame are forced
// to zero. The sums wrap at 16 bits; the input scaling keeps them in range.
//
// Timing: `pos` is the frame position of a and b; outputs are one cycle
// later.
module bs_butterfly
  import bindct_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pos_t pos,
  input  logic a,
  input  logic b,
  output logic s,
  output logic d
);
  logic sum, dif, guard;

  assign guard = (pos < pos_t'(GUARD));

  bs_addsub #(.SUB(1'b0)) u_add (.clk, .rst_n, .first(pos == '0), .a, .b, .s(sum));
  bs_addsub #(.SUB(1'b1)) u_sub (.clk, .rst_n, .first(pos == '0), .a, .b, .s(dif));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s <= 1'b0;
      d <= 1'b0;
    end else begin
      s <= guard ? 1'b0 : sum;
      d <= guard ? 1'b0 : dif;
    end
endmodule
