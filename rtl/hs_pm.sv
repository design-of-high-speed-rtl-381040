// hs_pm: processing module (PM) of the hardware-shared transposed FxLMS filter.
//
// One PM carries two logical taps of the N-tap filter: tap j in slot 0 and
// tap j+N/2 in slot 1. It is built from three slices that share their
// arithmetic between the two taps:
//   * adaptive-filter row  : tf_tap with coefficient w     (products w*x)
//   * coefficient update   : coef_update                   (w += 2mu*e*x')
//   * secondary-path row   : tf_tap with coefficient s'    (products s'*x)
// so a PM has three multipliers, three adders and one register per tap for
// every product, partial sum and weight. The weights are updated locally, so
// a longer filter is obtained by adding PMs without lengthening the critical
// path. The two secondary-path coefficients s' live here too: they are
// written through s_we/s_wdata, or, on commit, replaced by the weights that
// were just identified (top CW bits of w) while the weights are cleared.
//
// Interface: the *_in / *_cur / *_g1 ports chain the PMs together (see
// tf_tap, coef_update). en/slot come from the sharing controller.
// Timing: each slot's registers change on the cycle its slot is enabled.
// Follows the architecture: three rows with one multiplier and one adder
// each, locally updated weights, two taps per PM. This design's choice: the
// s' write port, the commit path and its truncation of w to CW bits.
module hs_pm #(
  parameter int DW         = 16,
  parameter int CW         = 16,
  parameter int WW         = 24,
  parameter int N          = 8,
  parameter int STEP_SHIFT = 7,
  parameter int AAW        = DW + WW + $clog2(N),   // adaptive-filter chain width
  parameter int SAW        = DW + CW + $clog2(N)    // secondary-path chain width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  slot,
  input  logic signed [DW-1:0]  x,
  // adaptive-filter chain
  input  logic signed [AAW-1:0] af_in,
  output logic signed [AAW-1:0] af_cur,
  output logic signed [AAW-1:0] af_g0,
  output logic signed [AAW-1:0] af_g1,
  // secondary-path chain
  input  logic signed [SAW-1:0] sp_in,
  output logic signed [SAW-1:0] sp_cur,
  output logic signed [SAW-1:0] sp_g0,
  output logic signed [SAW-1:0] sp_g1,
  // coefficient update
  input  logic signed [DW-1:0]  em,
  input  logic                  xl_shift,
  input  logic signed [DW-1:0]  xl_in0,
  input  logic signed [DW-1:0]  xl_in1,
  output logic signed [DW-1:0]  xf0,
  output logic signed [DW-1:0]  xf1,
  // secondary-path coefficients
  input  logic                  s_we0,
  input  logic                  s_we1,
  input  logic signed [CW-1:0]  s_wdata,
  input  logic                  commit,
  // observation
  output logic signed [WW-1:0]  w0,
  output logic signed [WW-1:0]  w1,
  output logic signed [CW-1:0]  s0,
  output logic signed [CW-1:0]  s1
);
  logic signed [CW-1:0] sc [2];
  logic signed [WW-1:0] w_sel;
  logic signed [CW-1:0] s_sel;

  assign w_sel = slot ? w1 : w0;
  assign s_sel = slot ? sc[1] : sc[0];

  tf_tap #(.DW(DW), .CW(WW), .AW(AAW)) u_af (
    .clk, .rst_n, .en, .slot, .x, .coef(w_sel),
    .acc_in(af_in), .acc_cur(af_cur), .acc_g0(af_g0), .acc_g1(af_g1)
  );

  tf_tap #(.DW(DW), .CW(CW), .AW(SAW)) u_sp (
    .clk, .rst_n, .en, .slot, .x, .coef(s_sel),
    .acc_in(sp_in), .acc_cur(sp_cur), .acc_g0(sp_g0), .acc_g1(sp_g1)
  );

  coef_update #(.DW(DW), .WW(WW), .STEP_SHIFT(STEP_SHIFT)) u_cu (
    .clk, .rst_n, .en, .slot, .clr(commit), .em,
    .xl_shift, .xl_in0, .xl_in1, .xf0, .xf1, .w0, .w1
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sc[0] <= '0; sc[1] <= '0;
    end else if (commit) begin
      sc[0] <= CW'(w0 >>> (WW - CW));
      sc[1] <= CW'(w1 >>> (WW - CW));
    end else begin
      if (s_we0) sc[0] <= s_wdata;
      if (s_we1) sc[1] <= s_wdata;
    end
  end

  assign s0 = sc[0];
  assign s1 = sc[1];
endmodule
