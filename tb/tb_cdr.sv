`timescale 1ns/1ps
// tb_cdr: random 1 Mb/s data with a random start phase is sent to the CDR,
// at first exactly at 1 MHz, then 0.2% fast so that the sampling phase must
// follow. Checks: the first transition makes one direct (jump) phase change;
// afterwards only steps of one phase occur, and some do; the recovered clock
// is 1 MHz (16 reference periods between rising edges); the sampling instant
// stays in the middle part of the bit (0.3 to 0.95 of it after the nominal
// boundary, which includes the synchroniser delay); the retimed data,
// read at the recovered clock, equal the sent bits at a fixed lag.
module tb_cdr;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b1, din = 1'b0;
  logic rx_clock, rx_data, locked, jump, step;
  logic [3:0] phase_sel;
  int checks = 0, failures = 0;
  int n_jump = 0, n_step = 0;

  cdr #(.NPH(16), .VOTE(3)) dut (.*);

  always #31.25 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  bit sent [$];
  bit got [$];
  realtime last_tx_edge, last_rx_edge;
  real bit_ns = 1000.0;
  real t_nom;
  bit  tx_done = 0;
  logic [3:0] prev_sel;
  bit started = 0;

  always @(posedge clk) begin
    if (rst_n && jump) n_jump++;
    if (rst_n && step) begin
      n_step++;
      chk(phase_sel == prev_sel + 4'd1 || phase_sel == prev_sel - 4'd1, "adjacent step");
    end
    prev_sel <= phase_sel;
  end

  always @(posedge rx_clock) if (started) begin
    real frac;
    if (got.size() > 20) chk(($realtime - last_rx_edge) > 999.0 - 63.0 && ($realtime - last_rx_edge) < 1001.0 + 63.0, "clock period");
    last_rx_edge = $realtime;
    got.push_back(rx_data);
    // sampling point inside the bit: recovered clock edge is about 2.5
    // reference periods after the synchroniser sees the data
    frac = ($realtime - last_tx_edge) / bit_ns;
    if (locked && got.size() > 40 && !tx_done) chk(frac > 0.3 && frac < 0.95, $sformatf("sampling at %f of the bit", frac));
  end

  initial begin
    #($urandom_range(0, 999));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    restart = 1'b0;
    started = 1;
    t_nom = $realtime;
    for (int i = 0; i < 600; i++) begin
      bit b;
      real u;
      if (i == 300) bit_ns = 998.0;
      b = (i < 8) ? bit'(i % 2) : bit'($urandom);
      sent.push_back(b);
      // transition at the nominal boundary +- 200 ns
      u = real'($urandom_range(0, 400)) - 200.0;
      if (t_nom + u > $realtime) #(t_nom + u - $realtime);
      din = b;
      last_tx_edge = t_nom;
      t_nom += bit_ns;
      #(t_nom - 200.0 - $realtime);
    end
    tx_done = 1;
    #1000;
    chk(n_jump == 1, $sformatf("jumps %0d", n_jump));
    chk(n_step > 0, $sformatf("steps %0d", n_step));
    begin
      int best, lag_best;
      best = -1; lag_best = 0;
      for (int lag = 0; lag < 4; lag++) begin
        int ok;
        ok = 0;
        for (int i = 50; i < 550; i++) if (i + lag < got.size() && got[i + lag] == sent[i]) ok++;
        if (ok > best) begin best = ok; lag_best = lag; end
      end
      chk(best == 500, $sformatf("data match %0d of 500 at lag %0d", best, lag_best));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #800000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
