// tb_dct2d_engine: self-checking testbench of the 2-D engine, in both its
// forward and its reverse form.
//
// The forward engine gets blocks of random words in the range of halved
// pixels (pixel * 128), with some rows withheld; every output column must
// equal the word-level model (/4, 1-D forward, /2, transpose, /4, 1-D
// forward, /2). The reverse engine gets random coefficient vectors; every
// output must equal the model (x2, 1-D reverse, transpose, x2, 1-D
// reverse). The testbench also checks the frame schedule: in_ready comes
// once per 19 cycles during the row phase, exactly eight rows are taken per
// block, nine frames pass without in_ready (bubble and columns), and the
// columns leave one per frame with indexes 0..7.
module tb_dct2d_engine;
  import bindct_pkg::*;
  import bindct_model_pkg::*;

  localparam int NBLK = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic iv [2], ir [2], ov [2], es [2], eb [2];
  logic [2:0] oi [2];
  word_t id [2][LANES], od [2][LANES];
  int checks = 0, failures = 0;

  dct2d_engine #(.INVERSE(1'b0)) dut_f (.clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]),
    .in_data(id[0]), .out_valid(ov[0]), .out_index(oi[0]), .out_data(od[0]),
    .ev_stall(es[0]), .ev_bubble(eb[0]));
  dct2d_engine #(.INVERSE(1'b1)) dut_i (.clk, .rst_n, .in_valid(iv[1]), .in_ready(ir[1]),
    .in_data(id[1]), .out_valid(ov[1]), .out_index(oi[1]), .out_data(od[1]),
    .ev_stall(es[1]), .ev_bubble(eb[1]));

  always #5 clk = ~clk;

  int    nblk_done [2] = '{0, 0};
  vec8_t blk [2][NBLK][8];
  vec8_t expv [2][NBLK][8];

  initial begin : watchdog
    repeat (NBLK * 40 * FRAME + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic w16_t pre(int e, w16_t w);  return e ? w16_t'(w <<< 1) : (w >>> 2); endfunction
  function automatic w16_t post(int e, w16_t w); return e ? w : (w >>> 1); endfunction
  function automatic vec8_t t1(int e, vec8_t v);
    vec8_t u, r;
    for (int i = 0; i < 8; i++) u[i] = pre(e, v[i]);
    u = e ? inv8(u) : fwd8(u);
    for (int i = 0; i < 8; i++) r[i] = post(e, u[i]);
    return r;
  endfunction

  task automatic model(int e, int b);
    vec8_t r [8], v;
    for (int i = 0; i < 8; i++) r[i] = t1(e, blk[e][b][i]);
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 8; i++) v[i] = r[i][c];
      expv[e][b][c] = t1(e, v);
    end
  endtask

  // drivers, one per engine
  for (genvar e = 0; e < 2; e++) begin : g_drv
    initial begin
      iv[e] = 1'b0;
      foreach (id[e][l]) id[e][l] = '0;
      @(posedge rst_n);
      for (int b = 0; b < NBLK; b++)
        for (int i = 0; i < 8; i++) begin
          if ($urandom_range(0, 4) == 0) begin
            do @(posedge clk); while (!ir[e]);
          end
          #1;
          iv[e] = 1'b1;
          id[e] = blk[e][b][i];
          do @(posedge clk); while (!ir[e]);
          #1 iv[e] = 1'b0;
        end
    end
  end

  // checker and schedule monitor, one per engine
  for (genvar e = 0; e < 2; e++) begin : g_chk
    initial begin
      int b = 0, expect_idx = 0, taken = 0, last_rdy = -1, last_out = -1, cyc = 0;
      @(posedge rst_n);
      while (b < NBLK) begin
        @(negedge clk);
        cyc++;
        if (ir[e]) begin
          if (last_rdy >= 0 && cyc - last_rdy != FRAME && cyc - last_rdy != 10 * FRAME) begin
            failures++;
            $display("engine %0d: in_ready gap %0d", e, cyc - last_rdy);
          end
          checks++;
          last_rdy = cyc;
        end
        if (ov[e]) begin
          if (oi[e] != 3'(expect_idx)) begin
            failures++; $display("engine %0d: column index %0d expected %0d", e, oi[e], expect_idx);
          end
          if (expect_idx != 0 && cyc - last_out != FRAME) begin
            failures++; $display("engine %0d: output gap %0d", e, cyc - last_out);
          end
          last_out = cyc;
          for (int i = 0; i < 8; i++) begin
            checks++;
            if (od[e][i] !== expv[e][b][expect_idx][i]) begin
              failures++;
              if (failures < 10) $display("engine %0d block %0d col %0d [%0d]: got %0d expected %0d",
                                          e, b, expect_idx, i, od[e][i], expv[e][b][expect_idx][i]);
            end
          end
          expect_idx++;
          if (expect_idx == 8) begin expect_idx = 0; b++; nblk_done[e] = b; end
        end
      end
    end
  end

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          blk[0][b][i][j] = w16_t'(($signed($urandom_range(0, 255)) - 128) * 128);
          blk[1][b][i][j] = w16_t'($signed($urandom_range(0, 16383)) - 8192);
        end
    for (int e = 0; e < 2; e++) for (int b = 0; b < NBLK; b++) model(e, b);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (nblk_done[0] == NBLK && nblk_done[1] == NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
