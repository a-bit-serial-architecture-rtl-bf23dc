// tb_transpose_ram: self-checking testbench of the 8x8 transpose memory.
//
// Writes eight random rows, one per cycle, then reads every column and
// checks that column c holds word c of every row in row order. Repeats
// with fresh data and also checks that a write with we low changes nothing.
module tb_transpose_ram;
  logic clk = 1'b0;
  logic we;
  logic [2:0] wrow, rcol;
  logic signed [15:0] wdata [8], rdata [8];
  logic signed [15:0] ref_m [8][8];
  int checks = 0, failures = 0;

  transpose_ram dut (.clk, .we, .wrow, .wdata, .rcol, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; wrow = '0; rcol = '0;
    foreach (wdata[j]) wdata[j] = '0;
    for (int rep = 0; rep < 20; rep++) begin
      for (int r = 0; r < 8; r++) begin
        @(negedge clk);
        we = 1'b1; wrow = 3'(r);
        for (int j = 0; j < 8; j++) begin
          wdata[j] = 16'($urandom);
          ref_m[r][j] = wdata[j];
        end
      end
      @(negedge clk);
      we = 1'b0; wrow = 3'($urandom);
      foreach (wdata[j]) wdata[j] = 16'($urandom);   // must not be written
      @(negedge clk);
      for (int c = 0; c < 8; c++) begin
        rcol = 3'(c);
        #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (rdata[i] !== ref_m[i][c]) begin
            failures++;
            $display("rep %0d col %0d row %0d: got %h expected %h", rep, c, i, rdata[i], ref_m[i][c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
