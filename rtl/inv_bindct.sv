// inv_bindct: bit-serial 8-point reverse binDCT, coefficient set CB.
//
// Undoes the forward flow step by step in reverse order, with the same
// bit-serial lifting circuits and the same 19-cycle frames (WL + 3 in general):
//   stage 1  b1 = X0/2 - X4, b0 = X0 - b1;  b3 = X2 + d1*X6, b2 = u1*b3 - X6;
//            d7 = X1 + d3*X7, d4 = u3*d7 - X7;  d6 = X3 + d2*X5,
//            d5 = X5 - u2*d6  (4 cycles)
//   stage 2  butterflies b0 +/- b3, b1 +/- b2, d4 +/- d5, d7 +/- d6
//            (registered, 1 cycle)
//   stage 3  inverse pi/4 rotation by lifts u5, d4, u4 (6 cycles)
//   stage 4  butterflies giving x0..x7 (registered, 1 cycle)
// A lift is inverted by the opposite operation on the same term; a
// butterfly is inverted by another butterfly, which doubles the values, so
// the reverse transform returns 4 times the forward input. The caller's x2
// scaling before it and the forward side's /4 and /2 make up for that.
// Latency 12 cycles, one transform per frame, like the forward core.
//
// Follows the document: the order of the inverse lifts and butterflies and
// the scaling arrangement around it. This design's choices: the same
// timing, registers and padding as the forward core; the per-step
// rounding, which makes the round trip near-exact rather than lossless.
//
// Inputs in natural order X[0..7], outputs x[0..7]; pos_o = pos - 12.
module inv_bindct
  import bindct_pkg::*;
#(
  parameter int unsigned U1_K = 1, parameter int unsigned U1_M = 1,  // 1/2
  parameter int unsigned D1_K = 3, parameter int unsigned D1_M = 3,  // 3/8
  parameter int unsigned U2_K = 5, parameter int unsigned U2_M = 3,  // 5/8
  parameter int unsigned D2_K = 1, parameter int unsigned D2_M = 1,  // 1/2
  parameter int unsigned U3_K = 1, parameter int unsigned U3_M = 2,  // 1/4
  parameter int unsigned D3_K = 1, parameter int unsigned D3_M = 2,  // 1/4
  parameter int unsigned U4_K = 1, parameter int unsigned U4_M = 1,  // 1/2
  parameter int unsigned D4_K = 3, parameter int unsigned D4_M = 2,  // 3/4
  parameter int unsigned U5_K = 1, parameter int unsigned U5_M = 1,  // 1/2
  parameter int unsigned WL   = WORD                                 // word length
) (
  input  logic clk,
  input  logic rst_n,
  input  pos_t pos,                 // frame position of y
  input  logic y [LANES],           // serial coefficients X(0)..X(7)
  output logic x [LANES]            // serial reconstructed words, times 4
);
  localparam int unsigned FL = WL + GUARD;   // frame length
  localparam int unsigned LA = max2(6, U4_M + D4_M + U5_M);
  localparam int unsigned LC = max2(max2(4, U1_M + D1_M),
                                    max2(U3_M + D3_M, U2_M + D2_M));

  pos_t p1, p2, p3;
  assign p1 = pos_back(pos, LC, FL);         // after stage 1
  assign p2 = pos_back(p1, 1, FL);           // after stage-2 butterflies
  assign p3 = pos_back(p2, LA, FL);          // after stage 3

  // ---------------- stage 1: inverse output lifts
  // b1 = X0/2 - X4, b0 = X0 - b1
  logic x0d, b1a, b0a, b0, b1;
  bs_lift #(.K(1), .M(1), .MODE(LIFT_RSUB), .WL(WL)) u_x4 (
    .clk, .rst_n, .pos, .p(y[0]), .q(y[4]), .p_o(x0d), .q_o(b1a));
  bs_addsub #(.SUB(1'b1)) u_b0 (.clk, .rst_n, .first(pos_back(pos, 1, FL) == '0),
                                .a(x0d), .b(b1a), .s(b0a));
  bs_delay #(.N(LC - 1)) u_pad0 (.clk, .rst_n, .d(b0a), .q(b0));
  bs_delay #(.N(LC - 1)) u_pad1 (.clk, .rst_n, .d(b1a), .q(b1));

  // b3 = X2 + d1*X6, b2 = u1*b3 - X6
  logic x6a, b3a, b3b, b2a, b2, b3;
  bs_lift #(.K(D1_K), .M(D1_M), .MODE(LIFT_ADD), .WL(WL)) u_d1 (
    .clk, .rst_n, .pos, .p(y[6]), .q(y[2]), .p_o(x6a), .q_o(b3a));
  bs_lift #(.K(U1_K), .M(U1_M), .MODE(LIFT_RSUB), .WL(WL)) u_u1 (
    .clk, .rst_n, .pos(pos_back(pos, D1_M, FL)), .p(b3a), .q(x6a), .p_o(b3b), .q_o(b2a));
  bs_delay #(.N(LC - U1_M - D1_M)) u_pad2 (.clk, .rst_n, .d(b2a), .q(b2));
  bs_delay #(.N(LC - U1_M - D1_M)) u_pad3 (.clk, .rst_n, .d(b3b), .q(b3));

  // d7 = X1 + d3*X7, d4 = u3*d7 - X7
  logic x7a, d7a, d7b, d4a, d4, d7;
  bs_lift #(.K(D3_K), .M(D3_M), .MODE(LIFT_ADD), .WL(WL)) u_d3 (
    .clk, .rst_n, .pos, .p(y[7]), .q(y[1]), .p_o(x7a), .q_o(d7a));
  bs_lift #(.K(U3_K), .M(U3_M), .MODE(LIFT_RSUB), .WL(WL)) u_u3 (
    .clk, .rst_n, .pos(pos_back(pos, D3_M, FL)), .p(d7a), .q(x7a), .p_o(d7b), .q_o(d4a));
  bs_delay #(.N(LC - U3_M - D3_M)) u_pad4 (.clk, .rst_n, .d(d4a), .q(d4));
  bs_delay #(.N(LC - U3_M - D3_M)) u_pad7 (.clk, .rst_n, .d(d7b), .q(d7));

  // d6 = X3 + d2*X5, d5 = X5 - u2*d6
  logic x5a, d6a, d6b, d5a, d5, d6;
  bs_lift #(.K(D2_K), .M(D2_M), .MODE(LIFT_ADD), .WL(WL)) u_d2 (
    .clk, .rst_n, .pos, .p(y[5]), .q(y[3]), .p_o(x5a), .q_o(d6a));
  bs_lift #(.K(U2_K), .M(U2_M), .MODE(LIFT_SUB), .WL(WL)) u_u2 (
    .clk, .rst_n, .pos(pos_back(pos, D2_M, FL)), .p(d6a), .q(x5a), .p_o(d6b), .q_o(d5a));
  bs_delay #(.N(LC - U2_M - D2_M)) u_pad5 (.clk, .rst_n, .d(d5a), .q(d5));
  bs_delay #(.N(LC - U2_M - D2_M)) u_pad6 (.clk, .rst_n, .d(d6b), .q(d6));

  // ---------------- stage 2: butterflies
  logic e [LANES];
  logic c5, c6;
  bs_butterfly u_b03 (.clk, .rst_n, .pos(p1), .a(b0), .b(b3), .s(e[0]), .d(e[3]));
  bs_butterfly u_b12 (.clk, .rst_n, .pos(p1), .a(b1), .b(b2), .s(e[1]), .d(e[2]));
  bs_butterfly u_b45 (.clk, .rst_n, .pos(p1), .a(d4), .b(d5), .s(e[4]), .d(c5));
  bs_butterfly u_b76 (.clk, .rst_n, .pos(p1), .a(d7), .b(d6), .s(e[7]), .d(c6));

  // ---------------- stage 3: inverse pi/4 rotation
  logic f [LANES];
  for (genvar i = 0; i < LANES; i++) begin : g_pad_a
    if (i != 5 && i != 6) begin : g_d
      bs_delay #(.N(LA)) u_d (.clk, .rst_n, .d(e[i]), .q(f[i]));
    end
  end

  logic c6a, c5a, c5b, a6a, a6b, a5a;
  // u5 undone: c5a = u5*c6 - c5
  bs_lift #(.K(U5_K), .M(U5_M), .MODE(LIFT_RSUB), .WL(WL)) u_u5 (
    .clk, .rst_n, .pos(p2), .p(c6), .q(c5), .p_o(c6a), .q_o(c5a));
  // d4 undone: a6 = c6 - d4*c5a
  bs_lift #(.K(D4_K), .M(D4_M), .MODE(LIFT_SUB), .WL(WL)) u_d4 (
    .clk, .rst_n, .pos(pos_back(p2, U5_M, FL)), .p(c5a), .q(c6a), .p_o(c5b), .q_o(a6a));
  // u4 undone: a5 = c5a + u4*a6
  bs_lift #(.K(U4_K), .M(U4_M), .MODE(LIFT_ADD), .WL(WL)) u_u4 (
    .clk, .rst_n, .pos(pos_back(p2, U5_M + D4_M, FL)), .p(a6a), .q(c5b), .p_o(a6b), .q_o(a5a));
  bs_delay #(.N(LA - U4_M - D4_M - U5_M)) u_pad5a (.clk, .rst_n, .d(a5a), .q(f[5]));
  bs_delay #(.N(LA - U4_M - D4_M - U5_M)) u_pad6a (.clk, .rst_n, .d(a6b), .q(f[6]));

  // ---------------- stage 4: butterflies
  bs_butterfly u_o07 (.clk, .rst_n, .pos(p3), .a(f[0]), .b(f[7]), .s(x[0]), .d(x[7]));
  bs_butterfly u_o16 (.clk, .rst_n, .pos(p3), .a(f[1]), .b(f[6]), .s(x[1]), .d(x[6]));
  bs_butterfly u_o25 (.clk, .rst_n, .pos(p3), .a(f[2]), .b(f[5]), .s(x[2]), .d(x[5]));
  bs_butterfly u_o34 (.clk, .rst_n, .pos(p3), .a(f[3]), .b(f[4]), .s(x[3]), .d(x[4]));

endmodule
