// bs_scale: bit-serial kP/2^m scaling circuit (k = 1, 3 or 5; m = 1..3).
//
// P runs through an m-stage delay line; P' is its end, P delayed by m.
// Relative to P', the term P/2^j is the line tapped j stages earlier
// (delay m - j): a right shift is a bit stream taken earlier. The constant
// is split into two powers of two (3/4 = 1/2 + 1/4, 3/8 = 1/4 + 1/8,
// 5/8 = 1/2 + 1/8, as in the document's tap table a+b, b+c, a+c) and the
// two taps are summed by a bit-serial adder; for k = 1 the single tap is
// the result. The sum starts in the guard slots of P's frame, so the bits
// shifted out below the LSB enter as a fraction and only their carry
// reaches the result; `kp` is the exact value kP/2^m with m fraction bits
// placed in the last m guard slots before P' bit 0.
//
// Sign extension is this design's addition: a tap that would read past the
// top bit of its word gives the word's sign (captured from the top bit,
// bit WL-1, at the last frame position), and a
// tap that would read a guard slot of its own word gives 0. Without it a
// negative P shifted right would be filled with the following zeros.
//
// Timing: p_o and kp are aligned with P delayed m cycles; `pos` is the
// frame position of p, pos_o = pos - m that of the outputs.
module bs_scale
  import bindct_pkg::*;
#(
  parameter int unsigned K  = 3,
  parameter int unsigned M  = 3,
  parameter int unsigned WL = WORD    // word length in bits
) (
  input  logic clk,
  input  logic rst_n,
  input  pos_t pos,     // frame position of p
  input  logic p,
  output logic p_o,     // P' = P delayed m
  output logic kp       // kP/2^m, aligned with p_o
);
  // Shifts of the two taps (J1 = J0 when K = 1).
  localparam int unsigned FL = WL + GUARD;   // frame length
  localparam int unsigned J0 = M;
  localparam int unsigned J1 = (K == 3) ? M - 1 : (K == 5) ? M - 2 : M;

  initial begin
    assert (K == 1 || K == 3 || K == 5) else $error("bs_scale: K must be 1, 3 or 5");
    assert (M >= 1 && M <= GUARD && J1 >= 1 && J1 <= M) else $error("bs_scale: bad M");
  end

  logic dl [M+1];            // dl[i] = p delayed i
  logic psign;               // sign bit of the word on the tap side
  pos_t pos_o;
  logic t0;

  assign dl[0] = p;
  for (genvar i = 1; i <= M; i++) begin : g_dl
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) dl[i] <= 1'b0;
      else        dl[i] <= dl[i-1];
  end
  assign p_o = dl[M];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  psign <= 1'b0;
    else if (pos == pos_t'(FL-1)) psign <= p;

  assign pos_o = pos_back(pos, M, FL);

  // Tap for P/2^j: source frame position is pos_o + j.
  function automatic logic tap(int unsigned j, logic raw, pos_t po, logic sgn);
    int unsigned src;
    src = int'(po) + j;
    if (src >= FL)         return sgn;    // past the top bit: sign extension
    else if (src < GUARD)  return 1'b0;   // below the fraction: zero
    else                   return raw;
  endfunction

  assign t0 = tap(J0, dl[M-J0], pos_o, psign);

  if (K == 1) begin : g_k1
    assign kp = t0;
  end else begin : g_kadd
    logic t1;
    assign t1 = tap(J1, dl[M-J1], pos_o, psign);
    bs_addsub #(.SUB(1'b0)) u_add (
      .clk, .rst_n, .first(pos_o == '0), .a(t1), .b(t0), .s(kp)
    );
  end

endmodule
