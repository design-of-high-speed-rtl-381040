// tf_tap: one hardware-shared tap of a transposed-form FIR filter.
//
// Two copies of this slice sit in every processing module (PM): one forms the
// adaptive filter row (coefficient = adaptive weight w), the other the
// secondary-path model row (coefficient = s'). Each copy owns ONE multiplier
// and ONE adder, shared between the two logical taps the PM serves, plus one
// product register and one partial-sum register per tap (slot):
//     prod[slot] <= coef * x                (multiplier, then a delay)
//     acc [slot] <= acc_in + prod[slot]     (adder, then a delay)
// acc_in is the partial sum of the next tap up the chain, so the longest
// register-to-register path is one multiplier (or one adder), as in the
// retimed transposed structure. Both registers of a slot change only on a
// cycle where en=1 and slot selects them; a slot is visited once per sample.
//
// Interface: coef is the coefficient already selected for the active slot;
// acc_cur is acc[slot] (for the neighbour below), acc_g0/acc_g1 are the two
// partial sums (the filter output is acc_g0 of PM0, and the chain
// wraps from the bottom of group 1, acc_g1, into the top of group 0).
// Timing: one update per enabled cycle, results visible the cycle after.
// The product width and the chain width are this design's choice.
module tf_tap #(
  parameter int DW = 16,               // sample width
  parameter int CW = 16,               // coefficient width
  parameter int AW = DW + CW + 3       // chain width (product + log2 N guard bits)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 slot,
  input  logic signed [DW-1:0] x,
  input  logic signed [CW-1:0] coef,
  input  logic signed [AW-1:0] acc_in,
  output logic signed [AW-1:0] acc_cur,
  output logic signed [AW-1:0] acc_g0,
  output logic signed [AW-1:0] acc_g1
);
  localparam int PW = DW + CW;

  logic signed [PW-1:0] prod [2];
  logic signed [AW-1:0] acc  [2];
  logic signed [PW-1:0] mult;
  logic signed [AW-1:0] sum;

  // The one shared multiplier and adder of this slice.
  always_comb begin
    mult = PW'(coef * x);
    sum  = acc_in + AW'(prod[slot]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod[0] <= '0; prod[1] <= '0;
      acc[0]  <= '0; acc[1]  <= '0;
    end else if (en) begin
      prod[slot] <= mult;
      acc[slot]  <= sum;
    end
  end

  assign acc_cur = acc[slot];
  assign acc_g0  = acc[0];
  assign acc_g1  = acc[1];
endmodule
