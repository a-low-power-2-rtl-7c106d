`timescale 1ns/1ps
// tb_tdc_delay_line: measures, for several trim codes, the delay from an
// edge of the multiplexer output to taps C[0], C[1] and C[N-1], and checks
// them against dT1*f and dT1*f + k*dT2*f with f = (96 - trim)/64. Also checks
// the multiplexer select and that every edge of a 6 MHz signal reaches the
// last tap even though the line is longer than a pulse.
module tb_tdc_delay_line;
  localparam int N = 64;
  logic if2 = 1'b0, fref = 1'b0, sel_ref = 1'b0;
  logic [5:0] itrim = 6'd32;
  logic mux_out;
  logic [N-1:0] c;
  int checks = 0, failures = 0;

  tdc_delay_line #(.N_TAPS(N)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  realtime t_edge, t0, t1, tl;
  int n_last;
  always @(posedge c[0])   t0 = $realtime;
  always @(posedge c[1])   t1 = $realtime;
  always @(posedge c[N-1]) begin tl = $realtime; n_last++; end

  initial begin
    int trims [4] = '{32, 0, 63, 17};
    n_last = 0;
    #300;
    foreach (trims[i]) begin
      real f, e0, e1, el;
      itrim = 6'(trims[i]);
      #400;
      f  = real'(96 - trims[i]) / 64.0;
      e0 = 141.0 * f;
      e1 = e0 + 1.15 * f;
      el = e0 + 63.0 * 1.15 * f;
      if2 = 1'b1; t_edge = $realtime;
      #400;
      chk((t0 - t_edge) > e0 - 0.01 && (t0 - t_edge) < e0 + 0.01, $sformatf("C0 trim %0d: %f vs %f", trims[i], t0 - t_edge, e0));
      chk((t1 - t_edge) > e1 - 0.01 && (t1 - t_edge) < e1 + 0.01, $sformatf("C1 trim %0d: %f vs %f", trims[i], t1 - t_edge, e1));
      chk((tl - t_edge) > el - 0.01 && (tl - t_edge) < el + 0.01, $sformatf("CN-1 trim %0d: %f vs %f", trims[i], tl - t_edge, el));
      if2 = 1'b0;
      #400;
    end
    // multiplexer and edge preservation: 20 periods of 6 MHz through FREF
    itrim = 6'd32;
    sel_ref = 1'b1;
    chk(mux_out == fref, "mux selects fref");
    n_last = 0;
    repeat (20) begin
      #83.333 fref = 1'b1;
      #0.01;
      chk(mux_out == 1'b1, "mux follows fref");
      #83.333 fref = 1'b0;
    end
    #400;
    chk(n_last == 20, $sformatf("edges at last tap: %0d", n_last));
    sel_ref = 1'b0;
    if2 = 1'b1;
    #1;
    chk(mux_out == 1'b1, "mux selects if2");
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
