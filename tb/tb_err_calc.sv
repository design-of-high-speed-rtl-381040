// tb_err_calc: random test of the error calculation and its 2D delays.
// Checks e(n) = sat(d(n-2) - y(n)), its registered copy and the error
// delayed by two samples, with random tick spacing and full-scale values
// that force saturation both ways.
module tb_err_calc;
  timeunit 1ns; timeprecision 100ps;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0, tick = 0;
  logic signed [DW-1:0] d_cur = 0, y = 0, e, e_q, em;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  longint dh[$], eh[$];

  err_calc #(.DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    longint ee, hi, lo;
    hi = 32767; lo = -32768;
    dh = '{0, 0}; eh = '{0, 0};   // [0] = older
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      tick  = $urandom % 2;
      d_cur = DW'($urandom);
      y     = DW'($urandom);
      #1;
      ee = dh[0] - longint'(y);
      if (ee > hi) begin ee = hi; n_pos++; end
      if (ee < lo) begin ee = lo; n_neg++; end
      checks++;
      if (longint'(e) != ee) begin
        failures++;
        if (failures < 5) $display("FAIL %0d: e=%0d exp %0d", i, e, ee);
      end
      @(posedge clk);
      if (tick) begin
        void'(dh.pop_front()); dh.push_back(longint'(d_cur));
        void'(eh.pop_front()); eh.push_back(ee);
      end
      #1;
      checks++;
      if (longint'(e_q) != eh[1] || longint'(em) != eh[0]) begin
        failures++;
        if (failures < 5) $display("FAIL %0d: e_q=%0d/%0d em=%0d/%0d", i, e_q, eh[1], em, eh[0]);
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin failures++; $display("FAIL: saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
