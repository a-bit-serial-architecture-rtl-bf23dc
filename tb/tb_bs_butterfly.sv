// tb_bs_butterfly: self-checking testbench of the bit-serial butterfly.
//
// Random 16-bit word pairs are sent in 19-cycle frames; the outputs are
// collected one cycle later (the butterfly's register) and compared with
// a + b and a - b modulo 2^16. Guard slots of the output must be zero.
module tb_bs_butterfly;
  import bindct_pkg::*;
  localparam int NFRAMES = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  pos_t pos;
  logic a, b, s, d;
  int checks = 0, failures = 0;
  logic [15:0] wa [NFRAMES], wb [NFRAMES];
  logic [15:0] acc_s, acc_d;

  bs_butterfly dut (.clk, .rst_n, .pos, .a, .b, .s, .d);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NFRAMES * FRAME + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int opos, ofr;
    for (int f = 0; f < NFRAMES; f++) begin
      wa[f] = 16'($urandom); wb[f] = 16'($urandom);
    end
    pos = '0; a = 1'b0; b = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NFRAMES * FRAME + 1; cyc++) begin
      @(posedge clk); #1;
      pos = pos_t'(cyc % FRAME);
      a = (cyc / FRAME < NFRAMES && pos >= GUARD) ? wa[cyc / FRAME][pos - GUARD] : 1'b0;
      b = (cyc / FRAME < NFRAMES && pos >= GUARD) ? wb[cyc / FRAME][pos - GUARD] : 1'b0;
      @(negedge clk);
      if (cyc >= 1) begin
        opos = (cyc - 1) % FRAME;
        ofr  = (cyc - 1) / FRAME;
        if (opos < GUARD) begin
          checks++;
          if (s !== 1'b0 || d !== 1'b0) begin failures++; $display("guard bit set"); end
        end else begin
          acc_s[opos - GUARD] = s;
          acc_d[opos - GUARD] = d;
        end
        if (opos == FRAME - 1) begin
          checks += 2;
          if (acc_s !== 16'(wa[ofr] + wb[ofr]) || acc_d !== 16'(wa[ofr] - wb[ofr])) begin
            failures++;
            $display("frame %0d: a=%h b=%h s=%h d=%h", ofr, wa[ofr], wb[ofr], acc_s, acc_d);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
