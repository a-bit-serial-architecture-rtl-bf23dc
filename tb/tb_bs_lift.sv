// tb_bs_lift: self-checking testbench of the bit-serial lifting step.
//
// Five instances cover the three forms and the constants of the design:
// Q - P/2, Q + 3P/4, Q - 3P/8, Q + 5P/8 and P/4 - Q. Random signed words P
// and Q are sent in 19-cycle frames. After exactly m cycles P' must equal P
// and Q' must equal floor(Q +/- kP/2^m) (or floor(kP/2^m - Q)) modulo 2^16,
// from the word-level model; the guard slots of Q' (where the Ctrl
// multiplexer discards the fraction) must be zero.
module tb_bs_lift;
  import bindct_pkg::*;
  import bindct_model_pkg::*;
  localparam int NFRAMES = 300;
  localparam int NI = 5;
  localparam int KS [NI] = '{1, 3, 3, 5, 1};
  localparam int MS [NI] = '{1, 2, 3, 3, 2};
  localparam int MD [NI] = '{1, 0, 1, 0, 2};   // 0 add, 1 sub, 2 reverse sub

  logic clk = 1'b0, rst_n = 1'b0;
  pos_t pos;
  logic p, q;
  logic po [NI], qo [NI];
  int checks = 0, failures = 0;
  w16_t wp [NFRAMES], wq [NFRAMES];

  for (genvar i = 0; i < NI; i++) begin : g_dut
    bs_lift #(.K(KS[i]), .M(MS[i]), .MODE(lift_mode_e'(MD[i]))) dut (
      .clk, .rst_n, .pos, .p, .q, .p_o(po[i]), .q_o(qo[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NFRAMES * FRAME + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w16_t acc_p [NI], acc_q [NI], e;
    int opos, ofr;
    for (int f = 0; f < NFRAMES; f++) begin wp[f] = 16'($urandom); wq[f] = 16'($urandom); end
    wp[0] = -16'sd1; wq[0] = 16'sd0; wp[1] = -16'sd7; wq[1] = 16'sd100;
    pos = '0; p = 1'b0; q = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NFRAMES * FRAME + 4; cyc++) begin
      @(posedge clk); #1;
      pos = pos_t'(cyc % FRAME);
      p = (cyc / FRAME < NFRAMES && pos >= GUARD) ? wp[cyc / FRAME][pos - GUARD] : 1'b0;
      q = (cyc / FRAME < NFRAMES && pos >= GUARD) ? wq[cyc / FRAME][pos - GUARD] : 1'b0;
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        if (cyc >= MS[i]) begin
          opos = (cyc - MS[i]) % FRAME;
          ofr  = (cyc - MS[i]) / FRAME;
          if (opos < GUARD) begin
            checks++;
            if (qo[i] !== 1'b0) begin failures++; $display("inst %0d: guard bit set", i); end
          end else begin
            acc_p[i][opos - GUARD] = po[i];
            acc_q[i][opos - GUARD] = qo[i];
          end
          if (opos == FRAME - 1 && ofr < NFRAMES) begin
            checks += 2;
            e = lift(wq[ofr], wp[ofr], KS[i], MS[i], MD[i]);
            if (acc_p[i] !== wp[ofr]) begin failures++; $display("inst %0d: P' wrong", i); end
            if (acc_q[i] !== e) begin
              failures++;
              $display("inst %0d frame %0d: P=%0d Q=%0d got %0d expected %0d", i, ofr, wp[ofr], wq[ofr], acc_q[i], e);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
