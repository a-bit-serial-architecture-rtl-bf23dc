// tb_fwd_bindct: self-checking testbench of the bit-serial forward binDCT core.
//
// Drives eight serial lanes with random 16-bit words, one 8-word vector per
// 19-cycle frame, back to back (the first vectors are small values, the
// rest full-range with wrap-around). Every output frame is collected
// assuming a latency of exactly 12 cycles and compared word by word with
// the word-level model; the three guard slots of every output frame must
// be zero. A wrong latency or throughput shows up as mismatches. A second
// copy with 24-bit words (27-cycle frames) runs alongside and is checked the
// same way against the model at that width.
module tb_fwd_bindct;
  import bindct_pkg::*;
  import bindct_model_pkg::*;

  localparam int NFRAMES = 200;
  localparam int LAT     = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  pos_t pos;
  logic xs [LANES];
  logic ys [LANES];
  int checks = 0, failures = 0;
  vec8_t vin [NFRAMES];
  w16_t  acc [LANES];

  fwd_bindct dut (.clk, .rst_n, .pos, .x(xs), .y(ys));

  always #5 clk = ~clk;

  // Second copy at another word length (frames of W2 + 3 cycles), checked
  // against the same model at that width; it runs alongside the first.
  localparam int W2 = 24;
  localparam int F2 = W2 + GUARD;
  pos_t pos2;
  logic in2 [LANES];
  logic out2 [LANES];
  bit   done2 = 1'b0;
  int   checks2 = 0, failures2 = 0;
  fwd_bindct #(.WL(W2)) dut2 (.clk, .rst_n, .pos(pos2), .x(in2), .y(out2));

  initial begin : run2
    int cyc, opos, ofr;
    lvec8_t v2 [NFRAMES];
    lvec8_t exp2;
    longint acc2 [LANES];
    for (int f = 0; f < NFRAMES; f++)
      for (int l = 0; l < LANES; l++)
        v2[f][l] = wrapw(longint'({$urandom, $urandom}), W2);
    pos2 = '0;
    foreach (in2[l]) in2[l] = 1'b0;
    wait (rst_n);
    for (cyc = 0; cyc < NFRAMES * F2 + LAT + 1; cyc++) begin
      @(posedge clk); #1;
      pos2 = pos_t'(cyc % F2);
      for (int l = 0; l < LANES; l++)
        in2[l] = (cyc / F2 < NFRAMES && pos2 >= GUARD) ? v2[cyc / F2][l][pos2 - GUARD] : 1'b0;
      @(negedge clk);
      if (cyc >= LAT) begin
        opos = (cyc - LAT) % F2;
        ofr  = (cyc - LAT) / F2;
        for (int l = 0; l < LANES; l++) begin
          if (opos < GUARD) begin
            if (out2[l] !== 1'b0) failures2++;
          end else acc2[l][opos - GUARD] = out2[l];
        end
        if (opos == F2 - 1 && ofr < NFRAMES) begin
          exp2 = fwd8w(v2[ofr], W2);
          for (int l = 0; l < LANES; l++) begin
            checks2++;
            if (wrapw(acc2[l], W2) != exp2[l]) begin
              failures2++;
              if (failures2 < 10) $display("W2 frame %0d lane %0d: got %0d expected %0d", ofr, l, wrapw(acc2[l], W2), exp2[l]);
            end
          end
        end
      end
    end
    done2 = 1'b1;
  end

  initial begin : watchdog
    repeat (NFRAMES * (W2 + GUARD) + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, opos, ofr;
    vec8_t exp_v;
    for (int f = 0; f < NFRAMES; f++)
      for (int l = 0; l < LANES; l++)
        vin[f][l] = (f < 40) ? w16_t'($signed($urandom_range(0, 8191)) - 4096)
                             : w16_t'($urandom);
    pos = '0;
    foreach (xs[l]) xs[l] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < NFRAMES * FRAME + LAT + 1; cyc++) begin
      @(posedge clk); #1;
      pos = pos_t'(cyc % FRAME);
      for (int l = 0; l < LANES; l++)
        xs[l] = (cyc / FRAME < NFRAMES && pos >= GUARD) ? vin[cyc / FRAME][l][pos - GUARD] : 1'b0;
      @(negedge clk);
      if (cyc >= LAT) begin
        opos = (cyc - LAT) % FRAME;
        ofr  = (cyc - LAT) / FRAME;
        for (int l = 0; l < LANES; l++) begin
          if (opos < GUARD) begin
            if (ys[l] !== 1'b0) begin
              failures++;
              $display("guard bit not zero: frame %0d lane %0d pos %0d", ofr, l, opos);
            end
          end else acc[l][opos - GUARD] = ys[l];
        end
        if (opos == FRAME - 1 && ofr < NFRAMES) begin
          exp_v = fwd8(vin[ofr]);
          for (int l = 0; l < LANES; l++) begin
            checks++;
            if (acc[l] !== exp_v[l]) begin
              failures++;
              if (failures < 10) $display("frame %0d lane %0d: got %0d expected %0d", ofr, l, acc[l], exp_v[l]);
            end
          end
        end
      end
    end
    wait (done2);
    checks += checks2;
    failures += failures2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
