// tb_coef_update: random test of the shared coefficient-update slice.
// The model applies w += (em * x') >>> SHIFT with saturation, the x' line
// shift and the clear, and checks both weights and both x' stages each cycle.
// Large errors are used in bursts so the weights reach saturation.
module tb_coef_update;
  timeunit 1ns; timeprecision 100ps;
  localparam int DW = 16, WW = 24, SS = 7;
  localparam int SHIFT = (2 * DW - 2) - (WW - 1) + SS;
  logic clk = 0, rst_n = 0, en = 0, slot = 0, clr = 0, xl_shift = 0;
  logic signed [DW-1:0] em = 0, xl_in0 = 0, xl_in1 = 0, xf0, xf1;
  logic signed [WW-1:0] w0, w1;
  int checks = 0, failures = 0, n_sat = 0, n_clr = 0;
  longint mx[2], mu[2], mw[2];

  coef_update #(.DW(DW), .WW(WW), .STEP_SHIFT(SS)) dut (.*);
  always #5 clk = ~clk;

  function automatic longint sat(longint v);
    longint hi = (64'sd1 <<< (WW - 1)) - 1, lo = -(64'sd1 <<< (WW - 1));
    return v > hi ? hi : v < lo ? lo : v;
  endfunction

  initial begin
    longint nx0, nx1, raw;
    mx = '{0, 0}; mu = '{0, 0}; mw = '{0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      en       = ($urandom % 4) != 0;
      slot     = $urandom % 2;
      clr      = ($urandom % 3000) == 0;
      xl_shift = $urandom % 2;
      em       = ((i / 2000) % 2) ? DW'($urandom) : DW'($signed(DW'($urandom)) >>> 6);
      xl_in0   = DW'($urandom);
      xl_in1   = DW'($urandom);
      if ((i / 1000) % 4 == 3) begin   // same-sign burst: drives the weights to the limit
        em = em & 16'h7fff; xl_in0 = xl_in0 & 16'h7fff; xl_in1 = xl_in1 & 16'h7fff;
      end
      @(posedge clk);
      nx0 = xl_shift ? longint'(xl_in0) : mx[0];
      nx1 = xl_shift ? longint'(xl_in1) : mx[1];
      if (clr) begin
        mu = '{0, 0}; mw = '{0, 0}; n_clr++;
      end else if (en) begin
        raw = mw[slot] + (mu[slot] >>> SHIFT);
        mw[slot] = sat(raw);
        if (mw[slot] != raw) n_sat++;
        mu[slot] = longint'(em) * mx[slot];
      end
      mx[0] = nx0; mx[1] = nx1;
      #1;
      checks++;
      if (longint'(w0) != mw[0] || longint'(w1) != mw[1] ||
          longint'(xf0) != mx[0] || longint'(xf1) != mx[1]) begin
        failures++;
        if (failures < 5) $display("FAIL %0d: w0=%0d/%0d w1=%0d/%0d", i, w0, mw[0], w1, mw[1]);
      end
    end
    checks += 2;
    if (n_sat == 0) begin failures++; $display("FAIL: no saturation"); end
    if (n_clr == 0) begin failures++; $display("FAIL: no clear"); end
    $display("saturations=%0d clears=%0d", n_sat, n_clr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
