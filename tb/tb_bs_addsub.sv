// tb_bs_addsub: self-checking testbench of the bit-serial adder/subtractor.
//
// Feeds random 16-bit word pairs LSB first in 19-cycle frames (three zero
// guard slots, then 16 data bits) to an adder and a subtractor, marking
// frame position 0 as the first bit. Each result word must equal a + b or
// a - b modulo 2^16 with no latency, and the guard slots must stay zero,
// which also shows that the carry is re-initialised for every word.
module tb_bs_addsub;
  localparam int NFRAMES = 300, FRAME = 19, GUARD = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic first, a, b, s_add, s_sub;
  int checks = 0, failures = 0;
  logic [15:0] wa [NFRAMES], wb [NFRAMES];
  logic [15:0] acc_add, acc_sub;

  bs_addsub #(.SUB(1'b0)) dut_add (.clk, .rst_n, .first, .a, .b, .s(s_add));
  bs_addsub #(.SUB(1'b1)) dut_sub (.clk, .rst_n, .first, .a, .b, .s(s_sub));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NFRAMES * FRAME + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos;
    for (int f = 0; f < NFRAMES; f++) begin
      wa[f] = 16'($urandom); wb[f] = 16'($urandom);
      if (f == 0) begin wa[f] = 16'hFFFF; wb[f] = 16'h0001; end   // carry out of the top
      if (f == 1) begin wa[f] = 16'h0000; wb[f] = 16'h0001; end
    end
    first = 1'b0; a = 1'b0; b = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NFRAMES * FRAME; cyc++) begin
      @(posedge clk); #1;
      pos = cyc % FRAME;
      first = (pos == 0);
      a = (pos >= GUARD) ? wa[cyc / FRAME][pos - GUARD] : 1'b0;
      b = (pos >= GUARD) ? wb[cyc / FRAME][pos - GUARD] : 1'b0;
      @(negedge clk);
      if (pos < GUARD) begin
        checks++;
        if (s_add !== 1'b0 || s_sub !== 1'b0) begin
          failures++; $display("guard bit set at frame %0d", cyc / FRAME);
        end
      end else begin
        acc_add[pos - GUARD] = s_add;
        acc_sub[pos - GUARD] = s_sub;
      end
      if (pos == FRAME - 1) begin
        checks += 2;
        if (acc_add !== 16'(wa[cyc / FRAME] + wb[cyc / FRAME])) begin
          failures++; $display("add frame %0d: %h + %h gave %h", cyc / FRAME, wa[cyc / FRAME], wb[cyc / FRAME], acc_add);
        end
        if (acc_sub !== 16'(wa[cyc / FRAME] - wb[cyc / FRAME])) begin
          failures++; $display("sub frame %0d: %h - %h gave %h", cyc / FRAME, wa[cyc / FRAME], wb[cyc / FRAME], acc_sub);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
