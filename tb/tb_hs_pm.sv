// tb_hs_pm: random test of one processing module (two shared taps).
// A model of its three rows (adaptive filter, coefficient update, secondary
// path) plus the s' registers predicts every output each cycle, with random
// enables and slots, s' writes, commits and full-scale data. It checks that
// the adaptive-filter row multiplies by the weight the update row holds and
// the secondary-path row by s'.
module tb_hs_pm;
  timeunit 1ns; timeprecision 100ps;
  localparam int DW = 16, CW = 16, WW = 24, N = 8, SS = 7;
  localparam int AAW = DW + WW + 3, SAW = DW + CW + 3;
  localparam int SHIFT = (2 * DW - 2) - (WW - 1) + SS;

  logic clk = 0, rst_n = 0, en = 0, slot = 0;
  logic signed [DW-1:0] x = 0;
  logic signed [AAW-1:0] af_in = 0, af_cur, af_g0, af_g1;
  logic signed [SAW-1:0] sp_in = 0, sp_cur, sp_g0, sp_g1;
  logic signed [DW-1:0] em = 0, xl_in0 = 0, xl_in1 = 0, xf0, xf1;
  logic xl_shift = 0, s_we0 = 0, s_we1 = 0, commit = 0;
  logic signed [CW-1:0] s_wdata = 0, s0, s1;
  logic signed [WW-1:0] w0, w1;

  hs_pm #(.DW(DW), .CW(CW), .WW(WW), .N(N), .STEP_SHIFT(SS)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_commit = 0, n_we = 0;
  longint ap[2], aa[2], sp[2], sa[2], xf[2], up[2], w[2], sc[2];

  function automatic longint satw(longint v);
    longint hi = (64'sd1 <<< (WW - 1)) - 1, lo = -(64'sd1 <<< (WW - 1));
    return v > hi ? hi : v < lo ? lo : v;
  endfunction
  function automatic longint wrap(longint v, int bits);
    return (v <<< (64 - bits)) >>> (64 - bits);
  endfunction

  initial begin
    longint nxf0, nxf1;
    ap = '{0,0}; aa = '{0,0}; sp = '{0,0}; sa = '{0,0};
    xf = '{0,0}; up = '{0,0}; w = '{0,0}; sc = '{0,0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      en       = ($urandom % 4) != 0;
      slot     = $urandom % 2;
      x        = DW'($urandom);
      af_in    = AAW'({$urandom, $urandom}) >>> ($urandom % 16);
      sp_in    = SAW'({$urandom, $urandom}) >>> ($urandom % 16);
      em       = DW'($urandom);
      xl_shift = $urandom % 2;
      xl_in0   = DW'($urandom);
      xl_in1   = DW'($urandom);
      s_we0    = ($urandom % 50) == 0;
      s_we1    = ($urandom % 50) == 0;
      s_wdata  = CW'($urandom);
      commit   = ($urandom % 1500) == 0;
      @(posedge clk);
      nxf0 = xl_shift ? longint'(xl_in0) : xf[0];
      nxf1 = xl_shift ? longint'(xl_in1) : xf[1];
      if (en) begin
        aa[slot] = wrap(longint'(af_in) + ap[slot], AAW);
        ap[slot] = w[slot] * longint'(x);
        sa[slot] = wrap(longint'(sp_in) + sp[slot], SAW);
        sp[slot] = sc[slot] * longint'(x);
      end
      if (commit) begin
        sc[0] = w[0] >>> (WW - CW); sc[1] = w[1] >>> (WW - CW);
        w = '{0,0}; up = '{0,0};
        n_commit++;
      end else begin
        if (en) begin
          w[slot]  = satw(w[slot] + (up[slot] >>> SHIFT));
          up[slot] = longint'(em) * xf[slot];
        end
        if (s_we0) begin sc[0] = longint'(s_wdata); n_we++; end
        if (s_we1) begin sc[1] = longint'(s_wdata); n_we++; end
      end
      xf[0] = nxf0; xf[1] = nxf1;
      #1;
      checks++;
      if (longint'(af_g0) != aa[0] || longint'(af_g1) != aa[1] || longint'(af_cur) != aa[slot] ||
          longint'(sp_g0) != sa[0] || longint'(sp_g1) != sa[1] || longint'(sp_cur) != sa[slot] ||
          longint'(xf0) != xf[0] || longint'(xf1) != xf[1] ||
          longint'(w0) != w[0] || longint'(w1) != w[1] ||
          longint'(s0) != sc[0] || longint'(s1) != sc[1]) begin
        failures++;
        if (failures < 5)
          $display("FAIL %0d: af %0d/%0d sp %0d/%0d w %0d/%0d s %0d/%0d", i, af_g0, aa[0],
                   sp_g0, sa[0], w0, w[0], s0, sc[0]);
      end
    end
    checks += 2;
    if (n_commit == 0) begin failures++; $display("FAIL: no commit"); end
    if (n_we == 0)     begin failures++; $display("FAIL: no s' write"); end
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
