`timescale 1ns/1ps
// tb_ma_lowpass: drives random codes, some cycles with the enable low, and
// compares the output with the sum of the last four accepted codes kept in
// a queue. Latency of one clock.
module tb_ma_lowpass;
  localparam int SW = 6, LEN = 4, OW = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [SW-1:0] din = '0;
  logic [OW-1:0] dout;
  int checks = 0, failures = 0;
  int hist [$];

  ma_lowpass #(.SW(SW), .LEN(LEN), .OW(OW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4) hist.push_back(0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      int exp_sum;
      en  = ($urandom_range(0, 3) != 0);
      din = SW'($urandom);
      @(negedge clk);
      if (en) begin
        hist.push_back(int'(din));
        void'(hist.pop_front());
      end
      exp_sum = hist[0] + hist[1] + hist[2] + hist[3];
      checks++;
      if (int'(dout) != exp_sum) begin
        failures++;
        $display("FAIL i=%0d dout=%0d exp=%0d", i, dout, exp_sum);
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
