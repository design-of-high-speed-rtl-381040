// hs_tf_rdfxlms: hardware-shared, retimed, transposed-form delayed FxLMS filter.
//
// An N-tap feed-forward FxLMS active-noise-control filter built for a short
// critical path (one multiplier) and for area: N/2 processing modules
// (hs_pm) each serve two taps, group 0 (taps 0..N/2-1) on even cycles and
// group 1 (taps N/2..N-1) on odd cycles, so one sample is processed every two
// clock cycles. Every PM holds three rows that run side by side:
//   * adaptive filter (transposed FIR)  y(n)  = sum_k w_k * x(n-1-k)
//   * secondary-path model (transposed) x'(n) = sum_k s'_k * x(n-1-k)
//   * coefficient update                w_k  += 2^-STEP_SHIFT * e(n-2) * x'(n-2-k)
// (the weight in each product is the one the tap held when that product was
// formed). The error calculation forms e(n) = d(n-2) - y(n). The output y is
// the anti-noise sample for the loudspeaker.
//
// Secondary-path estimation: with sp_est=1 the secondary-path model is
// bypassed (x' = the reference x itself), so the same hardware runs plain
// delayed LMS and its weights converge to a model of the path from x to d.
// A pulse on sp_commit copies the weights (top CW bits) into the s'
// coefficients and clears the weights, ready for FxLMS operation with
// sp_est=0. s' can also be written directly via s_we/s_addr/s_data.
//
// Interface: valid/ready input of one (x_in, d_in) pair per sample; outputs
// y_out (filter output) and e_out (error) of each sample with out_valid. A
// read port (rd_addr) shows one weight and one s' coefficient.
// Timing: throughput one sample per 2 cycles; y_out/e_out of a sample appear
// 3 cycles after it is taken (out_valid). The first filter tap acts on the
// previous sample, so y(n) depends on x(n-1) and older.
// Follows the paper: the filter length, the transposed adaptive filter and
// secondary-path rows, the 2D delays on d and e, the power-of-two step, the
// two-group hardware sharing. This design's choice: word widths, saturation,
// the handshake, the ordering of the two groups, the x' delay line feeding
// each tap, the estimation mode controls and the read port.
module hs_tf_rdfxlms
  import fxlms_pkg::*;
#(
  parameter int N          = 8,    // filter length (taps)
  parameter int DW         = 16,   // sample width, Q1.15
  parameter int CW         = 16,   // secondary-path coefficient width, Q1.15
  parameter int WW         = 24,   // adaptive weight width, Q1.23
  parameter int STEP_SHIFT = 7     // 2*mu = 2^-STEP_SHIFT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // sample input
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [DW-1:0]   x_in,
  input  logic signed [DW-1:0]   d_in,
  // sample output
  output logic                   out_valid,
  output logic signed [DW-1:0]   y_out,
  output logic signed [DW-1:0]   e_out,
  // secondary path
  input  logic                   sp_est,
  input  logic                   sp_commit,
  input  logic                   s_we,
  input  logic [$clog2(N)-1:0]   s_addr,
  input  logic signed [CW-1:0]   s_data,
  // coefficient read port
  input  logic [$clog2(N)-1:0]   rd_addr,
  output logic signed [WW-1:0]   w_rdata,
  output logic signed [CW-1:0]   s_rdata
);
  localparam int H   = N / 2;
  localparam int AAW = DW + WW + $clog2(N);
  localparam int SAW = DW + CW + $clog2(N);

  // ---------------- sharing controller
  logic take, en, slot, tick;
  hs_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .take, .en, .slot, .tick, .out_valid
  );

  // ---------------- per-sample registers
  logic signed [DW-1:0] x_hold, d_hold, x_prev, xs_q, y_q;
  logic signed [DW-1:0] y_now, xs_now, em;

  // ---------------- PM array
  logic signed [AAW-1:0] af_in [H], af_cur [H], af_g0 [H], af_g1 [H];
  logic signed [SAW-1:0] sp_in [H], sp_cur [H], sp_g0 [H], sp_g1 [H];
  logic signed [DW-1:0]  xl_in0 [H], xl_in1 [H], xf0 [H], xf1 [H];
  logic signed [WW-1:0]  w0 [H], w1 [H];
  logic signed [CW-1:0]  s0 [H], s1 [H];

  for (genvar j = 0; j < H; j++) begin : g_pm
    // Transposed chains run from tap N-1 down to tap 0. The top of group 0
    // (tap N/2-1) reads the bottom of group 1 (tap N/2, held in PM0 slot 1);
    // the top of group 1 (tap N-1) reads zero.
    if (j < H - 1) begin : g_mid
      assign af_in[j] = af_cur[j+1];
      assign sp_in[j] = sp_cur[j+1];
    end else begin : g_top
      assign af_in[j] = slot ? '0 : af_g1[0];
      assign sp_in[j] = slot ? '0 : sp_g1[0];
    end
    // The x' delay line runs from tap 0 up to tap N-1.
    if (j == 0) begin : g_first
      assign xl_in0[j] = xs_q;
      assign xl_in1[j] = xf0[H-1];
    end else begin : g_next
      assign xl_in0[j] = xf0[j-1];
      assign xl_in1[j] = xf1[j-1];
    end

    hs_pm #(.DW(DW), .CW(CW), .WW(WW), .N(N), .STEP_SHIFT(STEP_SHIFT)) u_pm (
      .clk, .rst_n, .en, .slot, .x(x_hold),
      .af_in(af_in[j]), .af_cur(af_cur[j]), .af_g0(af_g0[j]), .af_g1(af_g1[j]),
      .sp_in(sp_in[j]), .sp_cur(sp_cur[j]), .sp_g0(sp_g0[j]), .sp_g1(sp_g1[j]),
      .em, .xl_shift(tick), .xl_in0(xl_in0[j]), .xl_in1(xl_in1[j]),
      .xf0(xf0[j]), .xf1(xf1[j]),
      .s_we0(s_we && (int'(s_addr) == j)),
      .s_we1(s_we && (int'(s_addr) == j + H)),
      .s_wdata(s_data), .commit(sp_commit),
      .w0(w0[j]), .w1(w1[j]), .s0(s0[j]), .s1(s1[j])
    );
  end

  // ---------------- filter and model outputs (tap 0 partial sums)
  always_comb begin
    y_now  = DW'(sat64(64'(af_g0[0]) >>> (WW - 1), DW));
    xs_now = DW'(sat64(64'(sp_g0[0]) >>> (CW - 1), DW));
  end

  // ---------------- error calculation
  err_calc #(.DW(DW)) u_err (
    .clk, .rst_n, .tick, .d_cur(d_hold), .y(y_now), .e(), .e_q(e_out), .em
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_hold <= '0; d_hold <= '0; x_prev <= '0; xs_q <= '0; y_q <= '0;
    end else begin
      if (tick) begin
        x_prev <= x_hold;
        // "end PE" switch: filtered reference, or the reference itself while
        // the secondary path is being estimated
        xs_q   <= sp_est ? x_prev : xs_now;
        y_q    <= y_now;
      end
      if (take) begin
        x_hold <= x_in;
        d_hold <= d_in;
      end
    end
  end

  assign y_out = y_q;

  // ---------------- coefficient read port
  always_comb begin
    w_rdata = '0;
    s_rdata = '0;
    for (int j = 0; j < H; j++) begin
      if (int'(rd_addr) == j)     begin w_rdata = w0[j]; s_rdata = s0[j]; end
      if (int'(rd_addr) == j + H) begin w_rdata = w1[j]; s_rdata = s1[j]; end
    end
  end

  initial begin
    assert (N % 2 == 0 && N >= 4) else $error("N must be even and at least 4");
  end

  // Coefficient writes and commits belong between samples: in the middle of
  // a sample the two groups would see different secondary-path models.
  a_commit_idle: assert property (@(posedge clk) disable iff (!rst_n) sp_commit |-> !en);
  a_swrite_idle: assert property (@(posedge clk) disable iff (!rst_n) s_we |-> !en);
endmodule
