// tb_word_length: word-length sweep of the complete forward + reverse
// 2-D binDCT (bindct_top), the precision study of the design.
//
// Five copies of bindct_top run side by side with word lengths of 10, 12,
// 16, 24 and 32 bits (2, 4, 8, 16 and 24 fractional bits). Each one gets the
// same 16 blocks of random 8-bit pixels, offered back to back. For each
// word length the testbench measures the reconstruction error in pixel
// units (rec / 2^(WL-8) against the pixel) and checks:
//   - every coefficient and reconstructed pixel equals the model;
//   - every block comes back, with rows 0..7 in order;
//   - the block period is 17 frames of WL + 3 cycles;
//   - the mean squared error falls as the word grows;
//   - it is below 0.01 at 16 bits and below 1e-8 at 24 fractional bits, the
//     size from which the error becomes negligible.
// Every coefficient and every reconstructed pixel is also compared with the
// word-level model at the same width. The MSE of each word length is
// printed. A watchdog ends the run if the blocks do not all come back.
module tb_word_length;
  import bindct_model_pkg::*;

  localparam int NW   = 5;
  localparam int WLS [NW] = '{10, 12, 16, 24, 32};
  localparam int NBLK = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Shared stimulus: pixels of every block.
  logic signed [7:0] px [NBLK][8][8];

  real mse [NW];
  bit  fin [NW];

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int W  = WLS[g];
    localparam int FB = W - 8;
    localparam longint PER = 17 * (longint'(W) + 64'sd3);   // block period in cycles

    logic pix_valid, pix_ready, coef_valid, rec_valid;
    logic [2:0] coef_index, rec_index;
    logic signed [7:0] pix [8];
    logic signed [W-1:0] coef [8];
    logic signed [W-1:0] rec [8];
    logic fwd_stall, fwd_bubble, inv_stall, inv_bubble;

    bindct_top #(.WL(W)) dut (.*);

    // Rows go in back to back, block by block.
    int in_row = 0;
    assign pix_valid = (in_row < NBLK * 8);
    always_comb
      for (int l = 0; l < 8; l++)
        pix[l] = (in_row < NBLK * 8) ? px[in_row / 8][in_row % 8][l] : '0;
    always_ff @(posedge clk)
      if (rst_n && pix_valid && pix_ready) in_row <= in_row + 1;

    int gchecks = 0, gfailures = 0;

    // Expected coefficients and reconstruction of every block, from the
    // word-level model at this width, with the engines' scaling.
    longint ycol [NBLK][8][8];
    longint rrow [NBLK][8][8];
    initial begin
      lvec8_t v, r [8], rr [8];
      wait (rst_n);
      for (int b = 0; b < NBLK; b++) begin
        for (int i = 0; i < 8; i++) begin
          for (int j = 0; j < 8; j++) v[j] = (longint'(px[b][i][j]) <<< (FB - 1)) >>> 2;
          v = fwd8w(v, W);
          for (int j = 0; j < 8; j++) r[i][j] = v[j] >>> 1;
        end
        for (int c = 0; c < 8; c++) begin
          for (int i = 0; i < 8; i++) v[i] = r[i][c] >>> 2;
          v = fwd8w(v, W);
          for (int i = 0; i < 8; i++) ycol[b][c][i] = v[i] >>> 1;
        end
        for (int c = 0; c < 8; c++) begin
          for (int i = 0; i < 8; i++) v[i] = wrapw(ycol[b][c][i] <<< 1, W);
          rr[c] = inv8w(v, W);
        end
        for (int k = 0; k < 8; k++) begin
          for (int c = 0; c < 8; c++) v[c] = wrapw(rr[c][k] <<< 1, W);
          v = inv8w(v, W);
          for (int j = 0; j < 8; j++)
            rrow[b][k][j] = (v[j] >= (longint'(1) <<< (W - 2))) ? (longint'(1) <<< (W - 1)) - 1
                          : (v[j] < -(longint'(1) <<< (W - 2))) ? -(longint'(1) <<< (W - 1))
                          : v[j] <<< 1;
        end
      end
    end

    // Coefficient columns: compare with the model.
    int coef_col = 0;
    always @(posedge clk)
      if (rst_n && coef_valid) begin
        for (int i = 0; i < 8; i++) begin
          gchecks++;
          if (longint'(coef[i]) != ycol[coef_col / 8][coef_col % 8][i]) begin
            gfailures++;
            if (gfailures < 10)
              $display("W=%0d: coefficient %0d of column %0d differs", W, i, coef_col);
          end
        end
        coef_col <= coef_col + 1;
      end

    // Reconstructed rows come back; compare against the model and the pixels.
    int out_row = 0;
    real sq = 0.0;
    longint cyc = 0, last_start = -1;
    always @(posedge clk) begin
      cyc <= cyc + 1;
      if (rst_n && rec_valid) begin
        gchecks++;
        if (rec_index != 3'(out_row % 8)) begin
          gfailures++;
          $display("W=%0d: row index %0d, expected %0d", W, rec_index, out_row % 8);
        end
        if (rec_index == 3'd0) begin
          if (last_start >= 0) begin
            gchecks++;
            if (cyc - last_start != PER) begin
              gfailures++;
              $display("W=%0d: block period %0d, expected %0d", W, cyc - last_start, PER);
            end
          end
          last_start <= cyc;
        end
        for (int l = 0; l < 8; l++) begin
          real e;
          gchecks++;
          if (longint'(rec[l]) != rrow[out_row / 8][out_row % 8][l]) begin
            gfailures++;
            if (gfailures < 10) $display("W=%0d: reconstructed row %0d lane %0d differs", W, out_row, l);
          end
          e = real'(rec[l]) / real'(longint'(1) << FB) - real'(px[out_row / 8][out_row % 8][l]);
          sq += e * e;
        end
        out_row <= out_row + 1;
        if (out_row == NBLK * 8 - 1) begin
          mse[g] = sq / real'(NBLK * 64);
          fin[g] = 1'b1;
        end
      end
    end
  end

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          px[b][r][c] = 8'($urandom);
    for (int g = 0; g < NW; g++) fin[g] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin.and() == 1'b1);
    checks += g_w[0].gchecks + g_w[1].gchecks + g_w[2].gchecks + g_w[3].gchecks + g_w[4].gchecks;
    failures += g_w[0].gfailures + g_w[1].gfailures + g_w[2].gfailures + g_w[3].gfailures
              + g_w[4].gfailures;
    for (int g = 0; g < NW; g++)
      $display("word length %0d (%0d fractional bits): reconstruction MSE %g",
               WLS[g], WLS[g] - 8, mse[g]);
    for (int g = 1; g < NW; g++) begin
      checks++;
      if (!(mse[g] < mse[g-1])) begin
        failures++;
        $display("MSE does not fall from %0d to %0d bits", WLS[g-1], WLS[g]);
      end
    end
    checks++;
    if (!(mse[2] < 0.01)) begin failures++; $display("MSE at 16 bits too large"); end
    checks++;
    if (!(mse[4] < 1.0e-8)) begin failures++; $display("MSE at 32 bits too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 16 blocks plus the pipeline at the longest frame.
  initial begin
    repeat ((NBLK + 4) * 17 * 35 * 2) @(posedge clk);
    failures++;
    $display("watchdog: not all word lengths finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
