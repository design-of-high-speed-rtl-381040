// coef_update: hardware-shared coefficient-update slice of a processing module.
//
// Serves two adaptive weights (slot 0 = tap j, slot 1 = tap j+N/2) with ONE
// multiplier and ONE adder. Per visit of a slot:
//     upd[slot] <= em * xf[slot]                           (multiplier, delay)
//     w  [slot] <= sat(w[slot] + (upd[slot] >>> SHIFT))    (accumulator = weight)
// em is the error after the two adaptive delays, xf[slot] the filtered
// reference x' aligned with that tap. The step size is a power of two, so
// 2*mu is applied as the arithmetic shift SHIFT instead of a multiplier.
// SHIFT = (2*DW-2 - WFRAC) + STEP_SHIFT converts the Q2.30 product to the
// Q1.23 weight and scales it by 2^-STEP_SHIFT.
//
// The slice also holds this PM's two stages of the filtered-reference delay
// line: on xl_shift both xf registers load xl_in0/xl_in1 at once, so the
// line moves one place per sample no matter which slot is active.
// clr zeroes both weights and both pending updates.
// Update rule w += 2mu*e*x' follows the delayed LMS the design implements;
// widths, saturation and clearing are this design's choice.
module coef_update #(
  parameter int DW         = 16,   // error / x' width (Q1.15)
  parameter int WW         = 24,   // weight width (Q1.23)
  parameter int STEP_SHIFT = 7     // 2*mu = 2^-STEP_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 slot,
  input  logic                 clr,
  input  logic signed [DW-1:0] em,
  input  logic                 xl_shift,
  input  logic signed [DW-1:0] xl_in0,
  input  logic signed [DW-1:0] xl_in1,
  output logic signed [DW-1:0] xf0,
  output logic signed [DW-1:0] xf1,
  output logic signed [WW-1:0] w0,
  output logic signed [WW-1:0] w1
);
  import fxlms_pkg::*;

  localparam int PW    = 2 * DW;
  localparam int SHIFT = (2 * DW - 2) - (WW - 1) + STEP_SHIFT;

  logic signed [DW-1:0] xf  [2];
  logic signed [PW-1:0] upd [2];
  logic signed [WW-1:0] w   [2];
  logic signed [PW-1:0] mult;
  logic signed [WW-1:0] wnext;
  logic signed [63:0]   wsum;

  always_comb begin
    mult  = PW'(em * xf[slot]);
    wsum  = 64'(w[slot]) + (64'(upd[slot]) >>> SHIFT);
    wnext = WW'(sat64(wsum, WW));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xf[0] <= '0; xf[1] <= '0;
    end else if (xl_shift) begin
      xf[0] <= xl_in0;
      xf[1] <= xl_in1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd[0] <= '0; upd[1] <= '0;
      w[0]   <= '0; w[1]   <= '0;
    end else if (clr) begin
      upd[0] <= '0; upd[1] <= '0;
      w[0]   <= '0; w[1]   <= '0;
    end else if (en) begin
      upd[slot] <= mult;
      w[slot]   <= wnext;
    end
  end

  assign xf0 = xf[0];
  assign xf1 = xf[1];
  assign w0  = w[0];
  assign w1  = w[1];
endmodule
