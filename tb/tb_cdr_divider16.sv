`timescale 1ns/1ps
// tb_cdr_divider16: the count must advance by one per clock and phase p must
// be high exactly while (count - p) mod 16 < 8, giving 16 1 MHz clocks one
// reference period apart.
module tb_cdr_divider16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] cnt;
  logic [15:0] phases;
  int checks = 0, failures = 0;

  cdr_divider16 #(.NPH(16)) dut (.*);

  always #31.25 clk = ~clk;

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (n = 1; n <= 100; n++) begin
      @(negedge clk);
      checks++;
      if (cnt != 4'(n)) begin failures++; $display("FAIL count %0d at %0d", cnt, n); end
      for (int p = 0; p < 16; p++) begin
        checks++;
        if (phases[p] != (((n - p) % 16 + 16) % 16 < 8)) begin
          failures++; $display("FAIL phase %0d at %0d", p, n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
