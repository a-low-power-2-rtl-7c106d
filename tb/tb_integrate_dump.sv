`timescale 1ns/1ps
// tb_integrate_dump: random decisions with random enables. A reference model
// groups the enabled decisions in windows of three and takes the majority;
// the output must equal it after each window, the glitch flag must mark
// windows that were not unanimous, and a 12-decision bit with single-decision
// glitches must come out clean.
module tb_integrate_dump;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, raw = 1'b0;
  logic data, glitch;
  int checks = 0, failures = 0;

  integrate_dump #(.LEN(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    int ones, n, nglitch;
    logic exp_data;
    ones = 0; n = 0; exp_data = 0; nglitch = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      logic exp_glitch;
      en  = ($urandom_range(0, 3) != 0);
      raw = (i < 300) ? 1'($urandom) : ((i / 12) % 2 == 1) ^ (i % 12 == 5);
      exp_glitch = 1'b0;
      if (en) begin
        ones += raw; n++;
        if (n == 3) begin
          exp_data = (ones >= 2);
          exp_glitch = (ones != 0 && ones != 3);
          ones = 0; n = 0;
        end
      end
      @(negedge clk);
      chk(data === exp_data, $sformatf("data i=%0d", i));
      chk(glitch === exp_glitch, $sformatf("glitch i=%0d", i));
      if (glitch) nglitch++;
    end
    chk(nglitch > 0, "no glitch seen");
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
