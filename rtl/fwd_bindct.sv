// fwd_bindct: bit-serial 8-point forward binDCT (lifting approximation of
// Chen's fast DCT, coefficient set CB).
//
// Eight words enter in parallel, one bit of each per cycle, LSB first, in
// 19-cycle frames (3 guard zeros, 16 data bits; with the parameter WL,
// WL + 3 cycles and WL data bits). The flow is:
//   stage 1  butterflies a0..a7 = x0+x7, x1+x6, x2+x5, x3+x4,
//            x3-x4, x2-x5, x1-x6, x0-x7 (registered, 1 cycle)
//   stage 2  pi/4 rotation of a5, a6 by three lifts u4, d4, u5;
//            other lines delayed to the same length (6 cycles)
//   stage 3  butterflies b0 = a0+a3, b1 = a1+a2, b2 = a1-a2, b3 = a0-a3,
//            a4 +/- c5, a7 +/- c6 (registered, 1 cycle)
//   stage 4  X0 = b0 + b1, X4 = X0/2 - b1;  X6 = u1*b3 - b2, X2 = b3 - d1*X6;
//            X7 = u3*d7 - d4, X1 = d7 - d3*X7;  X5 = d5 + u2*d6,
//            X3 = d6 - d2*X5  (4 cycles)
// Each lift is a bs_lift of latency m; shorter lines get plain delays. With
// the document's coefficients the latency from an input bit to the same
// output bit is 12 cycles and a new 8-point transform can start every frame
// (8 words per 19 cycles). The outputs are unscaled binDCT coefficients:
// the per-coefficient scale factors are left to the quantiser.
//
// Follows the document: data flow, lifting signs, latency, the CB lifting
// values of its coefficient table (u5 = 1/2 there; its architecture drawing
// shows 3/8 for u5, and stage 2 keeps that drawing's 6-cycle length, so the
// u5 lift is followed by two alignment delays). This design's choices: the
// registered butterflies and the position-based guard handling.
//
// Outputs are in natural order X[0..7]; pos_o = pos - LATENCY.
module fwd_bindct
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
  input  pos_t pos,                 // frame position of x
  input  logic x [LANES],           // serial input words x(0)..x(7)
  output logic y [LANES]            // serial coefficients X(0)..X(7)
);
  // Stage lengths: at least those of the document's drawing (6 and 4).
  localparam int unsigned FL = WL + GUARD;   // frame length
  localparam int unsigned LA = max2(6, U4_M + D4_M + U5_M);
  localparam int unsigned LC = max2(max2(4, U1_M + D1_M),
                                    max2(U3_M + D3_M, U2_M + D2_M));
  localparam int unsigned LATENCY = 1 + LA + 1 + LC;   // 12 by default

  initial assert (LATENCY == 12)
    else $warning("fwd_bindct: latency %0d differs from the 12 cycles the engine assumes", LATENCY);

  pos_t p1, p2, p3;
  assign p1 = pos_back(pos, 1, FL);          // after stage-1 butterflies
  assign p2 = pos_back(p1, LA, FL);          // after stage 2
  assign p3 = pos_back(p2, 1, FL);           // after stage-3 butterflies

  // ---------------- stage 1: butterflies
  logic a [LANES];
  bs_butterfly u_b07 (.clk, .rst_n, .pos, .a(x[0]), .b(x[7]), .s(a[0]), .d(a[7]));
  bs_butterfly u_b16 (.clk, .rst_n, .pos, .a(x[1]), .b(x[6]), .s(a[1]), .d(a[6]));
  bs_butterfly u_b25 (.clk, .rst_n, .pos, .a(x[2]), .b(x[5]), .s(a[2]), .d(a[5]));
  bs_butterfly u_b34 (.clk, .rst_n, .pos, .a(x[3]), .b(x[4]), .s(a[3]), .d(a[4]));

  // ---------------- stage 2: pi/4 rotation of a5, a6 by lifting
  logic e [LANES];
  for (genvar i = 0; i < LANES; i++) begin : g_pad_a
    if (i != 5 && i != 6) begin : g_d
      bs_delay #(.N(LA)) u_d (.clk, .rst_n, .d(a[i]), .q(e[i]));
    end
  end

  logic c5a, a6a, c5b, c6a, c5c, c6b;
  // u4: c5a = a5 - u4*a6
  bs_lift #(.K(U4_K), .M(U4_M), .MODE(LIFT_SUB), .WL(WL)) u_u4 (
    .clk, .rst_n, .pos(p1), .p(a[6]), .q(a[5]), .p_o(a6a), .q_o(c5a));
  // d4: c6 = a6 + d4*c5a
  bs_lift #(.K(D4_K), .M(D4_M), .MODE(LIFT_ADD), .WL(WL)) u_d4 (
    .clk, .rst_n, .pos(pos_back(p1, U4_M, FL)), .p(c5a), .q(a6a), .p_o(c5b), .q_o(c6a));
  // u5: c5 = u5*c6 - c5a
  bs_lift #(.K(U5_K), .M(U5_M), .MODE(LIFT_RSUB), .WL(WL)) u_u5 (
    .clk, .rst_n, .pos(pos_back(p1, U4_M + D4_M, FL)), .p(c6a), .q(c5b), .p_o(c6b), .q_o(c5c));
  bs_delay #(.N(LA - U4_M - D4_M - U5_M)) u_pad5 (.clk, .rst_n, .d(c5c), .q(e[5]));
  bs_delay #(.N(LA - U4_M - D4_M - U5_M)) u_pad6 (.clk, .rst_n, .d(c6b), .q(e[6]));

  // ---------------- stage 3: butterflies
  logic b0, b1, b2, b3, d4, d5, d6, d7;
  bs_butterfly u_b03 (.clk, .rst_n, .pos(p2), .a(e[0]), .b(e[3]), .s(b0), .d(b3));
  bs_butterfly u_b12 (.clk, .rst_n, .pos(p2), .a(e[1]), .b(e[2]), .s(b1), .d(b2));
  bs_butterfly u_b45 (.clk, .rst_n, .pos(p2), .a(e[4]), .b(e[5]), .s(d4), .d(d5));
  bs_butterfly u_b76 (.clk, .rst_n, .pos(p2), .a(e[7]), .b(e[6]), .s(d7), .d(d6));

  // ---------------- stage 4: output lifts
  // X0 = b0 + b1, X4 = X0/2 - b1
  logic x0s, x0d, x4s;
  bs_addsub #(.SUB(1'b0)) u_x0 (.clk, .rst_n, .first(p3 == '0), .a(b0), .b(b1), .s(x0s));
  bs_lift #(.K(1), .M(1), .MODE(LIFT_RSUB), .WL(WL)) u_x4 (
    .clk, .rst_n, .pos(p3), .p(x0s), .q(b1), .p_o(x0d), .q_o(x4s));
  bs_delay #(.N(LC - 1)) u_pad0 (.clk, .rst_n, .d(x0d), .q(y[0]));
  bs_delay #(.N(LC - 1)) u_pad4 (.clk, .rst_n, .d(x4s), .q(y[4]));

  // X6 = u1*b3 - b2, X2 = b3 - d1*X6
  logic b3a, x6a, x6b, x2a;
  bs_lift #(.K(U1_K), .M(U1_M), .MODE(LIFT_RSUB), .WL(WL)) u_u1 (
    .clk, .rst_n, .pos(p3), .p(b3), .q(b2), .p_o(b3a), .q_o(x6a));
  bs_lift #(.K(D1_K), .M(D1_M), .MODE(LIFT_SUB), .WL(WL)) u_d1 (
    .clk, .rst_n, .pos(pos_back(p3, U1_M, FL)), .p(x6a), .q(b3a), .p_o(x6b), .q_o(x2a));
  bs_delay #(.N(LC - U1_M - D1_M)) u_pad6o (.clk, .rst_n, .d(x6b), .q(y[6]));
  bs_delay #(.N(LC - U1_M - D1_M)) u_pad2o (.clk, .rst_n, .d(x2a), .q(y[2]));

  // X7 = u3*d7 - d4, X1 = d7 - d3*X7
  logic d7a, x7a, x7b, x1a;
  bs_lift #(.K(U3_K), .M(U3_M), .MODE(LIFT_RSUB), .WL(WL)) u_u3 (
    .clk, .rst_n, .pos(p3), .p(d7), .q(d4), .p_o(d7a), .q_o(x7a));
  bs_lift #(.K(D3_K), .M(D3_M), .MODE(LIFT_SUB), .WL(WL)) u_d3 (
    .clk, .rst_n, .pos(pos_back(p3, U3_M, FL)), .p(x7a), .q(d7a), .p_o(x7b), .q_o(x1a));
  bs_delay #(.N(LC - U3_M - D3_M)) u_pad7o (.clk, .rst_n, .d(x7b), .q(y[7]));
  bs_delay #(.N(LC - U3_M - D3_M)) u_pad1o (.clk, .rst_n, .d(x1a), .q(y[1]));

  // X5 = d5 + u2*d6, X3 = d6 - d2*X5
  logic d6a, x5a, x5b, x3a;
  bs_lift #(.K(U2_K), .M(U2_M), .MODE(LIFT_ADD), .WL(WL)) u_u2 (
    .clk, .rst_n, .pos(p3), .p(d6), .q(d5), .p_o(d6a), .q_o(x5a));
  bs_lift #(.K(D2_K), .M(D2_M), .MODE(LIFT_SUB), .WL(WL)) u_d2 (
    .clk, .rst_n, .pos(pos_back(p3, U2_M, FL)), .p(x5a), .q(d6a), .p_o(x5b), .q_o(x3a));
  bs_delay #(.N(LC - U2_M - D2_M)) u_pad5o (.clk, .rst_n, .d(x5b), .q(y[5]));
  bs_delay #(.N(LC - U2_M - D2_M)) u_pad3o (.clk, .rst_n, .d(x3a), .q(y[3]));

endmodule
