// err_calc: error-calculation module with the two adaptive delays.
//
// The desired signal d passes a two-sample delay ("2D") so that it lines up
// with the adaptive-filter output y, which leaves the transposed filter two
// register stages after its input. The subtractor forms
//     e(n) = sat( d(n-2) - y(n) )
// and the error passes a second two-sample delay before it reaches the
// coefficient updates: em(n) = e(n-2). These are the two adaptive delays of
// the delayed FxLMS recursion w(n+1) = w(n) + 2mu e(n-2) x'(n-2).
//
// Interface: tick marks the last cycle of a sample period; d_cur is the held
// desired sample of the current period and y the filter output of that
// period. e is e(n) of the current period (combinational, saturated to DW
// bits), e_q the registered error of the last finished sample and em the
// doubly-delayed error.
// Timing: every delay register moves only on tick, once per sample.
// Saturation and the use of tick are this design's choice.
module err_calc #(
  parameter int DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,
  input  logic signed [DW-1:0] d_cur,
  input  logic signed [DW-1:0] y,
  output logic signed [DW-1:0] e,
  output logic signed [DW-1:0] e_q,
  output logic signed [DW-1:0] em
);
  import fxlms_pkg::*;

  logic signed [DW-1:0] d_d1, d_d2;   // 2D on the desired signal
  logic signed [DW-1:0] e_d2;         // second stage of the 2D on the error

  assign e = DW'(sat64(64'(d_d2) - 64'(y), DW));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_d1 <= '0; d_d2 <= '0; e_q <= '0; e_d2 <= '0;
    end else if (tick) begin
      d_d1 <= d_cur;
      d_d2 <= d_d1;
      e_q  <= e;
      e_d2 <= e_q;
    end
  end

  assign em = e_d2;
endmodule
