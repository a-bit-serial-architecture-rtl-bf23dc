// tb_bs_scale: self-checking testbench of the kP/2^m scaling circuit.
//
// Five instances cover the constants of the design: 1/2, 1/4, 3/4, 3/8 and
// 5/8. Random signed 16-bit words P are sent in 19-cycle frames. For each
// instance the delayed copy P' must equal P after exactly m cycles, and the
// scaled stream, read over its m fraction slots and 16 data slots, must
// equal k*P exactly as a (16+m)-bit two's complement number, i.e. kP/2^m
// with m fractional bits, sign-extended at the top.
module tb_bs_scale;
  import bindct_pkg::*;
  localparam int NFRAMES = 300;
  localparam int NI = 5;
  localparam int KS [NI] = '{1, 1, 3, 3, 5};
  localparam int MS [NI] = '{1, 2, 2, 3, 3};

  logic clk = 1'b0, rst_n = 1'b0;
  pos_t pos;
  logic p;
  logic po [NI], kp [NI];
  int checks = 0, failures = 0;
  logic signed [15:0] wp [NFRAMES];

  for (genvar i = 0; i < NI; i++) begin : g_dut
    bs_scale #(.K(KS[i]), .M(MS[i])) dut (.clk, .rst_n, .pos, .p, .p_o(po[i]), .kp(kp[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NFRAMES * FRAME + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [18:0] acc_k [NI];
    logic [15:0] acc_p [NI];
    int opos, ofr;
    longint expk;
    for (int f = 0; f < NFRAMES; f++) wp[f] = 16'($urandom);
    wp[0] = -16'sd1; wp[1] = -16'sd32768; wp[2] = 16'sd32767; wp[3] = -16'sd8;
    pos = '0; p = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NFRAMES * FRAME + 4; cyc++) begin
      @(posedge clk); #1;
      pos = pos_t'(cyc % FRAME);
      p = (cyc / FRAME < NFRAMES && pos >= GUARD) ? wp[cyc / FRAME][pos - GUARD] : 1'b0;
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        if (cyc >= MS[i]) begin
          opos = (cyc - MS[i]) % FRAME;
          ofr  = (cyc - MS[i]) / FRAME;
          if (opos >= GUARD) acc_p[i][opos - GUARD] = po[i];
          if (opos >= GUARD - MS[i]) acc_k[i][opos - (GUARD - MS[i])] = kp[i];
          if (opos == FRAME - 1 && ofr < NFRAMES) begin
            checks += 2;
            expk = longint'(KS[i]) * longint'(wp[ofr]);
            if (acc_p[i] !== wp[ofr]) begin
              failures++; $display("inst %0d frame %0d: P' %h expected %h", i, ofr, acc_p[i], wp[ofr]);
            end
            if ((acc_k[i] & ((19'(1) << (16 + MS[i])) - 1)) !== (19'(expk) & ((19'(1) << (16 + MS[i])) - 1))) begin
              failures++; $display("inst %0d frame %0d: kP %h expected %h (P=%0d)", i, ofr, acc_k[i], 19'(expk), wp[ofr]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
