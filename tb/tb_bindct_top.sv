// tb_bindct_top: end-to-end testbench of the 2-D forward and reverse binDCT.
//
// Sends NBLK 8x8 pixel blocks (random, constant, extreme checkerboards) to
// the top at its default parameters. During the first blocks rows are
// sometimes withheld, so the forward engine sends empty frames (stalls);
// the later blocks arrive back to back. Checks:
//   - every coefficient column equals the word-level model of the two
//     passes (scaling, row transform, transpose, column transform);
//   - every reconstructed row equals the model of the reverse engine and
//     lies close to the pixel values (the reconstruction error is reported
//     as a mean square error in pixel units, Eq. 7 style);
//   - with rows back to back, a block of coefficients follows the previous
//     one after exactly 17 frames (323 cycles) and the first coefficient
//     column appears 10 frames + 13 cycles after its first row was taken;
//   - stalls, bubble frames, reverse-engine waits and both transposes each
//     happened at least once.
module tb_bindct_top;
  import bindct_pkg::*;
  import bindct_model_pkg::*;

  localparam int NBLK       = 8;
  localparam int STALL_BLKS = 3;          // blocks that see withheld rows
  localparam int BLK_CYC    = 17 * FRAME;
  localparam int FIRST_LAT  = 10 * FRAME + 12 + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_valid, pix_ready;
  logic signed [7:0] pix [LANES];
  logic coef_valid, rec_valid;
  logic [2:0] coef_index, rec_index;
  word_t coef [LANES], rec [LANES];
  logic fwd_stall, fwd_bubble, inv_stall, inv_bubble;

  bindct_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [7:0] px [NBLK][8][8];
  vec8_t ycol [NBLK][8];       // expected coefficient columns
  vec8_t rrow [NBLK][8];       // expected reconstructed rows
  int n_stall = 0, n_fbub = 0, n_iwait = 0, n_ibub = 0, n_coef = 0, n_rec = 0;
  longint cyc = 0;
  longint t_row0 [NBLK];
  longint t_coef0 [NBLK];
  real sq_err = 0.0;
  int  n_err = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fwd_stall)  n_stall++;
    if (fwd_bubble) n_fbub++;
    if (inv_stall)  n_iwait++;
    if (inv_bubble) n_ibub++;
  end

  initial begin : watchdog
    repeat (NBLK * BLK_CYC * 3 + 3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic w16_t fwd_pre(w16_t w);  return w >>> 2; endfunction
  function automatic w16_t fwd_post(w16_t w); return w >>> 1; endfunction
  function automatic w16_t inv_pre(w16_t w);  return w16_t'(w <<< 1); endfunction

  task automatic build_model(int b);
    vec8_t v, r [8], rr [8];
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) v[j] = fwd_pre(w16_t'(px[b][i][j]) <<< 7);
      v = fwd8(v);
      for (int j = 0; j < 8; j++) r[i][j] = fwd_post(v[j]);
    end
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 8; i++) v[i] = fwd_pre(r[i][c]);
      v = fwd8(v);
      for (int i = 0; i < 8; i++) ycol[b][c][i] = fwd_post(v[i]);
    end
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 8; i++) v[i] = inv_pre(ycol[b][c][i]);
      rr[c] = inv8(v);
    end
    for (int k = 0; k < 8; k++) begin
      for (int c = 0; c < 8; c++) v[c] = inv_pre(rr[c][k]);
      v = inv8(v);
      for (int j = 0; j < 8; j++)
        rrow[b][k][j] = (v[j] > 16383) ? 16'sd32767 : (v[j] < -16384) ? -16'sd32768 : w16_t'(v[j] <<< 1);
    end
  endtask

  // ---------------- stimulus
  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          case (b)
            1:       px[b][i][j] = -8'sd128;
            2:       px[b][i][j] = ((i + j) % 2) ? 8'sd127 : -8'sd128;
            3:       px[b][i][j] = 8'sd127;
            default: px[b][i][j] = 8'($urandom);
          endcase
    for (int b = 0; b < NBLK; b++) build_model(b);
    pix_valid = 1'b0;
    foreach (pix[l]) pix[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 8; i++) begin
        // withhold some rows in the first blocks
        if (b < STALL_BLKS && (i == 3 || $urandom_range(0, 3) == 0)) begin
          do @(posedge clk); while (!pix_ready);
        end
        #1;
        pix_valid = 1'b1;
        for (int j = 0; j < 8; j++) pix[j] = px[b][i][j];
        do @(posedge clk); while (!pix_ready);
        if (i == 0) t_row0[b] = cyc;
        #1 pix_valid = 1'b0;
      end
    end
  end

  // ---------------- checking
  initial begin
    int cb = 0, rb = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (coef_valid) begin
        if (coef_index == 3'd0) t_coef0[cb] = cyc;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (coef[i] !== ycol[cb][coef_index][i]) begin
            failures++;
            if (failures < 10) $display("block %0d coef col %0d [%0d]: got %0d expected %0d",
                                        cb, coef_index, i, coef[i], ycol[cb][coef_index][i]);
          end
        end
        n_coef++;
        if (coef_index == 3'd7) cb++;
      end
      if (rec_valid) begin
        for (int j = 0; j < 8; j++) begin
          real e;
          int  rv, pv;
          checks++;
          if (rec[j] !== rrow[rb][rec_index][j]) begin
            failures++;
            if (failures < 10) $display("block %0d rec row %0d [%0d]: got %0d expected %0d",
                                        rb, rec_index, j, rec[j], rrow[rb][rec_index][j]);
          end
          rv = int'(rec[j]);
          pv = int'(px[rb][rec_index][j]);
          e  = $itor(rv) / 256.0 - $itor(pv);
          sq_err += e * e;
          n_err++;
        end
        n_rec++;
        if (rec_index == 3'd7) begin
          rb++;
          if (rb == NBLK) break;
        end
      end
    end
    // timing of the back-to-back blocks
    for (int b = STALL_BLKS + 1; b < NBLK; b++) begin
      checks++;
      if (t_coef0[b] - t_coef0[b-1] != BLK_CYC) begin
        failures++;
        $display("block period %0d, expected %0d", t_coef0[b] - t_coef0[b-1], BLK_CYC);
      end
      checks++;
      if (t_coef0[b] - t_row0[b] != FIRST_LAT) begin
        failures++;
        $display("first-column latency %0d, expected %0d", t_coef0[b] - t_row0[b], FIRST_LAT);
      end
    end
    // reconstruction quality
    checks++;
    if (sq_err / n_err > 0.01) begin
      failures++;
      $display("reconstruction MSE too large");
    end
    $display("reconstruction MSE = %f (pixel units; %f at the halved scale), %0d pixels",
             sq_err / n_err, sq_err / n_err / 4.0, n_err);
    $display("events: stalls=%0d fwd_bubbles=%0d inv_waits=%0d inv_bubbles=%0d coef_cols=%0d rec_rows=%0d",
             n_stall, n_fbub, n_iwait, n_ibub, n_coef, n_rec);
    checks += 6;
    if (n_stall == 0) begin failures++; $display("no stall happened"); end
    if (n_fbub  == 0) begin failures++; $display("no forward bubble"); end
    if (n_iwait == 0) begin failures++; $display("reverse engine never waited"); end
    if (n_ibub  == 0) begin failures++; $display("no reverse bubble"); end
    if (n_coef != 8 * NBLK) begin failures++; $display("coefficient columns missing"); end
    if (n_rec  != 8 * NBLK) begin failures++; $display("reconstructed rows missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
