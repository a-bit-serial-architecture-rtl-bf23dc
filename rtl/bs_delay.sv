// bs_delay: N-cycle delay of a bit-serial line (the "nD" boxes).
//
// A chain of N flip-flops, reset to zero; N = 0 is a plain wire. Used to
// align lines that carry fewer lifting steps than their neighbours, so that
// all eight lines keep the same frame position. With N = 0 the clock and
// reset inputs are left unused.
module bs_delay #(
  parameter int unsigned N = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic sr [N+1];
    assign sr[0] = d;
    for (genvar i = 1; i <= N; i++) begin : g_ff
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) sr[i] <= 1'b0;
        else        sr[i] <= sr[i-1];
    end
    assign q = sr[N];
  end
endmodule
