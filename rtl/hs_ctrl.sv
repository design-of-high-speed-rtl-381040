// hs_ctrl: schedule of the two-way hardware sharing.
//
// The N taps are split into two groups of N/2: group 0 (taps 0..N/2-1) is
// computed on even cycles and group 1 (taps N/2..N-1) on odd cycles, so the
// N/2 physical processing modules finish one sample every two clock cycles.
// Group 0 runs first: its transposed chain reads the top of group 1 before
// group 1 has moved, which keeps the folded filter equal to the unfolded one.
//
// Handshake: a sample (x, d) is taken when in_valid && in_ready. in_ready is
// high while idle and in the second (last) cycle of a sample, so back-to-back
// samples stream at one per two cycles and gaps in in_valid simply idle the
// datapath (no register moves). take tells the datapath to load the sample;
// en/slot drive the PMs; tick marks the last cycle of a sample, on which the
// per-sample registers move; out_valid is high the cycle after tick, when
// the outputs of that sample are registered.
// The valid/ready handshake and the idle state are this design's choice.
module hs_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic take,
  output logic en,
  output logic slot,
  output logic tick,
  output logic out_valid
);
  import fxlms_pkg::*;

  typedef enum logic [1:0] {IDLE = 2'd0, G0 = 2'd1, G1 = 2'd2} state_e;
  state_e state, state_nx;

  always_comb begin
    in_ready = (state == IDLE) || (state == G1);
    take     = in_valid && in_ready;
    en       = (state == G0) || (state == G1);
    slot     = (state == G1) ? SLOT_G1 : SLOT_G0;
    tick     = (state == G1);
    unique case (state)
      IDLE:    state_nx = take ? G0 : IDLE;
      G0:      state_nx = G1;
      G1:      state_nx = take ? G0 : IDLE;
      default: state_nx = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      out_valid <= 1'b0;
    end else begin
      state     <= state_nx;
      out_valid <= tick;
    end
  end

  // A sample period is always exactly two busy cycles.
  a_g0_then_g1: assert property (@(posedge clk) disable iff (!rst_n)
                                 state == G0 |=> state == G1);
endmodule
