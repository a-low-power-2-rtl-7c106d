`timescale 1ns/1ps
// tb_threshold_generator: two parts.
// 1) A random walk is fed in; every cycle the peak and valley flags are
//    compared with the rule evaluated by the testbench on its own copy of
//    the last eight samples (M0 newest).
// 2) A scenario like a received packet: an alternating preamble (triangle
//    100..140, extremes 12 samples apart) must generate the threshold 120
//    after four extremes (122 once its last valley, 104, is seen); long runs of equal bits (extremes 48 samples apart)
//    must not change it; a later alternating burst shifted by +10 (drift)
//    must update it to 130.
// 3) After a long run, a ripple of 8 between 140 and 148 must leave the
//    threshold alone; a burst between 140 and 152 (swing 12, above
//    MIN_SWING = 10) must move it to 146.
module tb_threshold_generator;
  localparam int DW = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [DW-1:0] m_in = '0;
  logic [DW-1:0] threshold;
  logic thr_valid, peak, valley, gen, upd;
  int checks = 0, failures = 0;
  int n_gen = 0, n_upd = 0, n_pk = 0, n_vl = 0;

  threshold_generator #(.DW(DW), .ALT_GEN(4), .MAX_GAP(18), .MIN_SWING(10)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (gen) n_gen++;
    if (upd) n_upd++;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int h [$];   // h[0] = newest

  function automatic bit is_valley();
    if (h.size() < 8) return 0;
    for (int i = 7; i >= 3; i--) if (!(h[i] >= h[i-1])) return 0;
    return h[2] < h[1] && h[1] <= h[0];
  endfunction
  function automatic bit is_peak();
    if (h.size() < 8) return 0;
    for (int i = 7; i >= 3; i--) if (!(h[i] <= h[i-1])) return 0;
    return h[2] > h[1] && h[1] >= h[0];
  endfunction

  task automatic push(input int v);
    m_in = DW'(v);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    h.push_front(v);
    if (h.size() > 8) void'(h.pop_back());
  endtask

  task automatic triangle(input int lo, input int hi, input int n_half);
    for (int k = 0; k < n_half; k++)
      for (int j = 0; j < 12; j++)
        push((k % 2 == 0) ? lo + (hi - lo) * j / 12 : hi - (hi - lo) * j / 12);
  endtask

  initial begin
    int v, dir, thr_before;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // part 1: flags
    v = 128; dir = 1;
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 9) == 0) dir = -dir;
      v += dir * int'($urandom_range(0, 3));
      if (v < 10) begin v = 10; dir = 1; end
      if (v > 245) begin v = 245; dir = -1; end
      push(v);
      chk(peak == is_peak() && valley == is_valley(), $sformatf("flags at %0d", i));
      if (peak) n_pk++;
      if (valley) n_vl++;
    end
    chk(n_pk > 10 && n_vl > 10, $sformatf("peaks %0d valleys %0d", n_pk, n_vl));
    // part 2: scenario from reset
    rst_n = 1'b0; h.delete(); n_gen = 0; n_upd = 0;
    @(negedge clk) rst_n = 1'b1;
    repeat (8) push(100);
    chk(!thr_valid, "no threshold before preamble");
    triangle(100, 140, 6);
    repeat (2) @(negedge clk);
    chk(thr_valid && threshold == 8'd120 && n_gen == 1, $sformatf("generated %0d valid %b", threshold, thr_valid));
    // the preamble's last valley is only seen once the signal rises again
    repeat (48) push(140);
    chk(threshold == 8'd122, $sformatf("after last preamble valley %0d", threshold));
    n_upd = 0;
    repeat (48) push(100);
    repeat (4) begin
      repeat (48) push(140);
      repeat (48) push(100);
    end
    chk(threshold == 8'd122 && n_upd == 0, $sformatf("long runs changed threshold to %0d (%0d updates)", threshold, n_upd));
    triangle(110, 150, 6);
    repeat (2) @(negedge clk);
    chk(threshold == 8'd130 && n_upd > 0 && n_gen == 1, $sformatf("updated to %0d, %0d updates", threshold, n_upd));
    // part 3: a ripple of 8 (below MIN_SWING = 10) must be ignored, a swing
    // of 12 must update the threshold to its middle
    repeat (48) push(144);
    thr_before = int'(threshold);
    n_upd = 0;
    triangle(140, 148, 8);
    repeat (2) @(negedge clk);
    chk(int'(threshold) == thr_before && n_upd == 0, $sformatf("ripple changed threshold to %0d (%0d updates)", threshold, n_upd));
    triangle(140, 152, 6);
    repeat (2) @(negedge clk);
    chk(threshold == 8'd146 && n_upd > 0, $sformatf("swing of 12 gave %0d, %0d updates", threshold, n_upd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
