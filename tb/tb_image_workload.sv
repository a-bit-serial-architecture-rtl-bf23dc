// tb_image_workload: runs whole grey-scale images through the top, block
// by block, at the top's default parameters.
//
// Two image sizes are processed one after the other, 128x128 and 512x512
// pixels. The pixels come from a smooth synthetic pattern with a little
// pseudo-random texture (p = 90 sin(x/23) cos(y/31) + 30 sin((x+2y)/7) +
// noise in -4..4, clipped to -128..127), generated here. Blocks are sent in
// raster order with rows back to back. Checks: every coefficient and every
// reconstructed pixel equals the word-level model; the forward engine keeps
// one block per 17 frames (323 cycles); the reconstruction error stays
// small (MSE below 0.05). It reports the MSE in pixel units, the same MSE
// at the halved scale (between the pixels halved at the input and the
// reverse output before its final doubling, where the error is half as
// large), and the time an image would take at a 4 MHz clock.
module tb_image_workload;
  import bindct_pkg::*;
  import bindct_model_pkg::*;

  localparam int NSIZES  = 2;
  localparam int SIZES [NSIZES] = '{128, 512};
  localparam int BLK_CYC = 17 * FRAME;

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
  logic signed [7:0] img [512][512];
  int size;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (4700 * BLK_CYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [7:0] pattern(int x, int y);
    real v;
    int  n;
    v = 90.0 * $sin(x / 23.0) * $cos(y / 31.0) + 30.0 * $sin((x + 2 * y) / 7.0);
    n = int'($rtoi(v)) + $signed($urandom_range(0, 8)) - 4;
    if (n > 127) n = 127;
    if (n < -128) n = -128;
    return 8'(n);
  endfunction

  function automatic w16_t fpre(w16_t w);  return w >>> 2; endfunction
  function automatic w16_t fpost(w16_t w); return w >>> 1; endfunction
  function automatic w16_t ipre(w16_t w);  return w16_t'(w <<< 1); endfunction

  // expected coefficient columns and reconstructed rows of block (bx, by)
  task automatic model(int bx, int by, output vec8_t ycol [8], output vec8_t rrow [8]);
    vec8_t v, r [8], rr [8];
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) v[j] = fpre(w16_t'(img[by*8+i][bx*8+j]) <<< 7);
      v = fwd8(v);
      for (int j = 0; j < 8; j++) r[i][j] = fpost(v[j]);
    end
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 8; i++) v[i] = fpre(r[i][c]);
      v = fwd8(v);
      for (int i = 0; i < 8; i++) ycol[c][i] = fpost(v[i]);
    end
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 8; i++) v[i] = ipre(ycol[c][i]);
      rr[c] = inv8(v);
    end
    for (int k = 0; k < 8; k++) begin
      for (int c = 0; c < 8; c++) v[c] = ipre(rr[c][k]);
      v = inv8(v);
      for (int j = 0; j < 8; j++)
        rrow[k][j] = (v[j] > 16383) ? 16'sd32767 : (v[j] < -16384) ? -16'sd32768 : w16_t'(v[j] <<< 1);
    end
  endtask

  initial begin
    pix_valid = 1'b0;
    foreach (pix[l]) pix[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSIZES; s++) begin
      size = SIZES[s];
      for (int y = 0; y < size; y++)
        for (int x = 0; x < size; x++) img[y][x] = pattern(x, y);
      fork
        // ---- driver
        begin
          for (int by = 0; by < size / 8; by++)
            for (int bx = 0; bx < size / 8; bx++)
              for (int i = 0; i < 8; i++) begin
                #1;
                pix_valid = 1'b1;
                for (int j = 0; j < 8; j++) pix[j] = img[by*8+i][bx*8+j];
                do @(posedge clk); while (!pix_ready);
              end
          #1 pix_valid = 1'b0;
        end
        // ---- checker
        begin
          vec8_t ycol [8], rrow [8], ycol_r [8], rrow_r [8];
          int cb, rb, nblk;
          longint t_first, t_last;
          real sq;
          cb = 0; rb = 0; nblk = (size / 8) * (size / 8);
          t_first = 0; t_last = 0; sq = 0.0;
          model(0, 0, ycol, rrow);
          model(0, 0, ycol_r, rrow_r);
          while (rb < nblk) begin
            @(negedge clk);
            if (coef_valid) begin
              if (coef_index == 3'd0) begin
                if (cb == 0) t_first = cyc;
                t_last = cyc;
              end
              for (int i = 0; i < 8; i++) begin
                checks++;
                if (coef[i] !== ycol[coef_index][i]) begin
                  failures++;
                  if (failures < 10) $display("size %0d block %0d coef mismatch", size, cb);
                end
              end
              if (coef_index == 3'd7) begin
                cb++;
                if (cb < nblk) model(cb % (size / 8), cb / (size / 8), ycol, rrow);
              end
            end
            if (rec_valid) begin
              for (int j = 0; j < 8; j++) begin
                real e;
                int  pv, rv;
                checks++;
                if (rec[j] !== rrow_r[rec_index][j]) begin
                  failures++;
                  if (failures < 10) $display("size %0d block %0d rec mismatch", size, rb);
                end
                rv = int'(rec[j]);
                pv = int'(img[(rb / (size / 8)) * 8 + rec_index][(rb % (size / 8)) * 8 + j]);
                e  = $itor(rv) / 256.0 - $itor(pv);
                sq += e * e;
              end
              if (rec_index == 3'd7) begin
                rb++;
                if (rb < nblk) model(rb % (size / 8), rb / (size / 8), ycol_r, rrow_r);
              end
            end
          end
          checks++;
          if (t_last - t_first != longint'(nblk - 1) * BLK_CYC) begin
            failures++;
            $display("size %0d: %0d cycles between first and last block, expected %0d",
                     size, t_last - t_first, (nblk - 1) * BLK_CYC);
          end
          checks++;
          if (sq / (size * size) > 0.05) begin
            failures++;
            $display("size %0d: reconstruction MSE too large", size);
          end
          $display("image %0dx%0d: %0d blocks, forward rate %0d cycles/block, %.2f ms per image at 4 MHz, MSE %f (%f at the halved scale)",
                   size, size, nblk, BLK_CYC, real'(nblk) * BLK_CYC / 4.0e3, sq / (size * size),
                   sq / (size * size) / 4.0);
        end
      join
      repeat (2 * BLK_CYC) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
