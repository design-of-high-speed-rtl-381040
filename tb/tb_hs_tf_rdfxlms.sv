// tb_hs_tf_rdfxlms: end-to-end test of the hardware-shared transposed FxLMS
// filter at its default size (8 taps, 16-bit samples).
//
// A sample-level reference model (unfolded: every tap updated once per
// sample, all from the previous sample's state) predicts y and e for every
// sample; the folded RTL must match it bit for bit. On top of that:
//   1. random full-scale traffic with random s', random input gaps (idle
//      cycles) and saturation of error, output and weights;
//   2. secondary-path estimation: plain delayed LMS identifies a known FIR
//      path, its weights are checked against that path and committed to s';
//   3. FxLMS noise cancellation of a sinusoid plus white noise at 15 dB SNR
//      through a known primary path, checking that the error power falls by at least 10 dB.
// Also checked: one sample per two cycles when streaming, outputs three
// cycles after a sample is taken, and that every mechanism (idle gaps,
// back-to-back streaming, both sharing slots, saturation, estimation mode,
// commit, coefficient writes) happened.
module tb_hs_tf_rdfxlms;
  timeunit 1ns;
  timeprecision 100ps;
  localparam int N  = 8;
  localparam int DW = 16;
  localparam int CW = 16;
  localparam int WW = 24;
  localparam int SS = 7;
  localparam int SHIFT = (2 * DW - 2) - (WW - 1) + SS;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  logic signed [DW-1:0] x_in = 0, d_in = 0, y_out, e_out;
  logic sp_est = 0, sp_commit = 0, s_we = 0;
  logic [$clog2(N)-1:0] s_addr = 0, rd_addr = 0;
  logic signed [CW-1:0] s_data = 0, s_rdata;
  logic signed [WW-1:0] w_rdata;

  hs_tf_rdfxlms dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- reference model
  longint P[N], A[N], Q[N], B[N], U[N], W[N], XL[N], S[N];
  longint xs_q, x_prev, d1, d2, eq, ed2;
  int n_sat_e = 0, n_sat_w = 0, n_sat_y = 0;

  function automatic longint sat(longint v, int w);
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    longint lo = -(64'sd1 <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic void m_reset();
    for (int k = 0; k < N; k++) begin
      P[k] = 0; A[k] = 0; Q[k] = 0; B[k] = 0; U[k] = 0; W[k] = 0; XL[k] = 0; S[k] = 0;
    end
    xs_q = 0; x_prev = 0; d1 = 0; d2 = 0; eq = 0; ed2 = 0;
  endfunction

  // one sample; returns predicted y and e
  function automatic void m_step(longint xh, longint dh, bit est, output longint y, output longint e);
    longint nP[N], nA[N], nQ[N], nB[N], nU[N], nW[N];
    longint raw_y, raw_w, xs;
    for (int k = 0; k < N; k++) begin
      nP[k] = W[k] * xh;
      nA[k] = ((k < N - 1) ? A[k+1] : 0) + P[k];
      nQ[k] = S[k] * xh;
      nB[k] = ((k < N - 1) ? B[k+1] : 0) + Q[k];
      nU[k] = ed2 * XL[k];
      raw_w = W[k] + (U[k] >>> SHIFT);
      nW[k] = sat(raw_w, WW);
      if (nW[k] != raw_w) n_sat_w++;
    end
    P = nP; A = nA; Q = nQ; B = nB; U = nU; W = nW;
    raw_y = A[0] >>> (WW - 1);
    y = sat(raw_y, DW);
    if (y != raw_y) n_sat_y++;
    e = sat(d2 - y, DW);
    if (e != d2 - y) n_sat_e++;
    xs = sat(B[0] >>> (CW - 1), DW);
    ed2 = eq; eq = e;
    d2 = d1; d1 = dh;
    for (int k = N - 1; k > 0; k--) XL[k] = XL[k-1];
    XL[0] = xs_q;
    xs_q = est ? x_prev : xs;
    x_prev = xh;
  endfunction

  // ---------------- driver and scoreboard
  longint exp_y[$], exp_e[$], exp_t[$];
  longint last_take = -10;
  int n_b2b = 0, n_gap = 0, n_out = 0, n_slot1 = 0, n_est = 0, n_commit = 0, n_swr = 0;
  int n_rate_bad = 0, n_lat_bad = 0;
  longint last_y, last_e;

  always @(posedge clk) if (dut.en && dut.slot) n_slot1++;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (exp_y.size() == 0) begin
        failures++; $display("FAIL: output with nothing expected");
      end else begin
        longint ey, ee, et;
        ey = exp_y.pop_front(); ee = exp_e.pop_front(); et = exp_t.pop_front();
        last_y = y_out; last_e = e_out;
        if (longint'(y_out) != ey || longint'(e_out) != ee) begin
          failures++;
          if (failures < 10) $display("FAIL: cycle %0d y=%0d/%0d e=%0d/%0d", cycle, y_out, ey, e_out, ee);
        end
        checks++;
        if (cycle != et + 3) begin
          failures++; n_lat_bad++;
          if (n_lat_bad < 5) $display("FAIL: latency %0d", cycle - et);
        end
      end
    end
  end

  // present a sample; returns after the edge that takes it
  task automatic send(longint x, longint d, int gap);
    longint y, e;
    repeat (gap) @(posedge clk);
    if (gap > 0) n_gap++;
    #1;
    in_valid = 1; x_in = DW'(x); d_in = DW'(d);
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    if (cycle - last_take == 2) n_b2b++;
    if (gap == 0 && last_take >= 0) begin
      checks++;
      if (cycle - last_take != 2) begin
        n_rate_bad++; failures++;
        if (n_rate_bad < 5) $display("FAIL: sample spacing %0d", cycle - last_take);
      end
    end
    last_take = cycle;
    m_step(x, d, sp_est, y, e);
    exp_y.push_back(y); exp_e.push_back(e); exp_t.push_back(cycle);
    #1 in_valid = 0;
  endtask

  task automatic drain();
    repeat (6) @(posedge clk);
    #1;
  endtask

  task automatic do_reset();
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    m_reset();
    last_take = -10;
  endtask

  task automatic write_s(int k, longint v);
    #1 s_we = 1; s_addr = k[$clog2(N)-1:0]; s_data = CW'(v);
    @(posedge clk);
    #1 s_we = 0;
    S[k] = v; n_swr++;
  endtask

  task automatic check_coefs(string what);
    for (int k = 0; k < N; k++) begin
      #1 rd_addr = k[$clog2(N)-1:0];
      #1;
      checks++;
      if (longint'(w_rdata) != W[k] || longint'(s_rdata) != S[k]) begin
        failures++;
        $display("FAIL: %s tap %0d w=%0d/%0d s=%0d/%0d", what, k, w_rdata, W[k], s_rdata, S[k]);
      end
    end
  endtask

  function automatic longint rnd(int bits);
    return longint'($signed(DW'($urandom))) >>> (DW - bits);
  endfunction

  function automatic real gauss();
    real s = 0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  // plant histories
  longint xh_hist[$];

  initial begin
    longint x, d, y, e;
    real p_first, p_last, blk;
    int t10;
    int ok;
    m_reset();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---- 1. random full-scale traffic
    for (int k = 0; k < N; k++) write_s(k, rnd(16));
    check_coefs("after s' write");
    for (int i = 0; i < 3000; i++) begin
      int gap = ($urandom % 4 == 0) ? int'($urandom % 3) + 1 : 0;
      x = rnd(16); d = rnd(16);
      send(x, d, gap);
    end
    drain();
    check_coefs("after random traffic");

    // ---- 2. secondary-path estimation of h = [0.5, -0.3, 0.2, 0.1]
    do_reset();
    sp_est = 1;
    xh_hist.delete();
    p_first = 0; p_last = 0; blk = 0; t10 = -1;
    for (int i = 0; i < 12000; i++) begin
      real hv;
      x = rnd(15);   // uniform, |x| < 0.5
      xh_hist.push_front(x);
      if (xh_hist.size() > 4) void'(xh_hist.pop_back());
      hv = 0.5 * xh_hist[0];
      if (xh_hist.size() > 1) hv += -0.3 * xh_hist[1];
      if (xh_hist.size() > 2) hv += 0.2 * xh_hist[2];
      if (xh_hist.size() > 3) hv += 0.1 * xh_hist[3];
      d = longint'(hv);
      send(x, d, 0);
      n_est++;
      @(negedge clk);
    end
    drain();
    check_coefs("after estimation");
    begin
      real h[N] = '{0.0, 0.5, -0.3, 0.2, 0.1, 0.0, 0.0, 0.0};
      for (int k = 0; k < N; k++) begin
        real wk;
        wk = real'(W[k]) / real'(64'sd1 <<< (WW - 1));
        checks++;
        if (wk - h[k] > 0.02 || h[k] - wk > 0.02) begin
          failures++; $display("FAIL: identified w[%0d]=%f expected %f", k, wk, h[k]);
        end
      end
    end
    // commit the identified path into s'
    #1 sp_commit = 1;
    @(posedge clk);
    #1 sp_commit = 0;
    n_commit++;
    for (int k = 0; k < N; k++) begin
      S[k] = W[k] >>> (WW - CW); W[k] = 0; U[k] = 0;
    end
    check_coefs("after commit");
    sp_est = 0;

    // ---- 3. FxLMS cancellation: sinusoid + white noise (15 dB SNR),
    //         primary path p = [0.6, 0.25, -0.15], model s' = identity
    do_reset();
    write_s(0, 32767);
    xh_hist.delete();
    for (int i = 0; i < 6000; i++) begin
      real sig, xr, pv;
      sig = 0.3 * $sin(2.0 * 3.14159265358979 * 0.05 * i);
      xr  = sig + 0.3 / $sqrt(2.0) * 0.1778 * gauss();   // noise 15 dB below
      x = longint'(xr * 32768.0);
      xh_hist.push_front(x);
      if (xh_hist.size() > 3) void'(xh_hist.pop_back());
      pv = 0.6 * xh_hist[0];
      if (xh_hist.size() > 1) pv += 0.25 * xh_hist[1];
      if (xh_hist.size() > 2) pv += -0.15 * xh_hist[2];
      d = longint'(pv);
      send(x, d, 0);
      @(negedge clk);
      if (i >= 10 && i < 210)  p_first += real'(last_e) * real'(last_e);
      if (i >= 5800)            p_last  += real'(last_e) * real'(last_e);
      // 200-sample block power, to report when the error has dropped by 10 dB
      if (i >= 210) begin
        blk += real'(last_e) * real'(last_e);
        if ((i - 210) % 200 == 199) begin
          if (t10 < 0 && blk < 0.1 * p_first) t10 = i;
          blk = 0;
        end
      end
    end
    $display("FxLMS error power 10 dB below its start after %0d samples", t10);
    drain();
    checks++;
    $display("FxLMS error power: first %e last %e (ratio %f dB)", p_first / 200, p_last / 200,
             10.0 * $log10((p_last + 1.0) / (p_first + 1.0)));
    if (!(p_last < 0.1 * p_first)) begin
      failures++; $display("FAIL: error power did not fall by 10 dB");
    end

    // ---- mechanisms
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_y.size()); end
    $display("events: outputs=%0d back_to_back=%0d gaps=%0d slot1_cycles=%0d sat_e=%0d sat_y=%0d sat_w=%0d est=%0d commit=%0d s_writes=%0d",
             n_out, n_b2b, n_gap, n_slot1, n_sat_e, n_sat_y, n_sat_w, n_est, n_commit, n_swr);
    checks += 8;
    if (n_b2b == 0)   begin failures++; $display("FAIL: no back-to-back samples"); end
    if (n_gap == 0)   begin failures++; $display("FAIL: no idle gaps"); end
    if (n_slot1 == 0) begin failures++; $display("FAIL: slot 1 never ran"); end
    if (n_sat_e == 0) begin failures++; $display("FAIL: error never saturated"); end
    if (n_sat_y == 0) begin failures++; $display("FAIL: output never saturated"); end
    if (n_est == 0)   begin failures++; $display("FAIL: estimation mode never ran"); end
    if (n_commit == 0) begin failures++; $display("FAIL: no commit"); end
    if (n_swr == 0)   begin failures++; $display("FAIL: no s' write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
