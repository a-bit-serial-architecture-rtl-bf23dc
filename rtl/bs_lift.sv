// bs_lift: one bit-serial lifting step, Q' = Q + s, Q - s or s - Q with
// s = kP/2^m.
//
// P passes through the m-stage delay line of the scaling circuit and Q
// through m flip-flops of its own, so both leave m cycles later and stay
// aligned (the "+mD" box). A second bit-serial adder or subtractor combines
// the delayed Q with kP/2^m. Its first bits, in the guard slots, hold the
// fraction of kP/2^m; the Ctrl multiplexer discards them and sends zeros,
// restoring the guard slots, while their carry still reaches bit 0. The
// result is therefore floor(Q +/- kP/2^m) or floor(kP/2^m - Q), wrapping at
// WL bits (16 by default). The structure follows the document's circuit for Q + kP/2^m and
// its simplified forms; the three sign forms are read from the signs marked
// in its flow diagrams.
//
// Timing: latency m cycles on both lines; `pos` is the frame position of p
// and q.
module bs_lift
  import bindct_pkg::*;
#(
  parameter int unsigned K    = 3,
  parameter int unsigned M    = 3,
  parameter lift_mode_e  MODE = LIFT_ADD,
  parameter int unsigned WL   = WORD    // word length in bits
) (
  input  logic clk,
  input  logic rst_n,
  input  pos_t pos,
  input  logic p,
  input  logic q,
  output logic p_o,
  output logic q_o
);
  logic kp, qd, a, b, s;
  pos_t pos_o;

  bs_scale #(.K(K), .M(M), .WL(WL)) u_scale (.clk, .rst_n, .pos, .p, .p_o, .kp);
  bs_delay #(.N(M)) u_qdly (.clk, .rst_n, .d(q), .q(qd));

  assign pos_o = pos_back(pos, M, WL + GUARD);
  assign a = (MODE == LIFT_RSUB) ? kp : qd;
  assign b = (MODE == LIFT_RSUB) ? qd : kp;

  bs_addsub #(.SUB(MODE != LIFT_ADD)) u_bsa (
    .clk, .rst_n, .first(pos_o == '0), .a, .b, .s
  );

  // Ctrl: guard slots of the output frame are forced to zero.
  assign q_o = (pos_o < pos_t'(GUARD)) ? 1'b0 : s;

endmodule
