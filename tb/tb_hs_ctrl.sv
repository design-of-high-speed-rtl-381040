// tb_hs_ctrl: test of the two-phase sharing schedule and its handshake.
// With random in_valid it checks, every cycle, that a taken sample is
// followed by exactly one slot-0 cycle and then one slot-1 cycle with tick,
// that out_valid follows tick by one cycle, that the datapath is idle
// otherwise, and that back-to-back samples are taken every two cycles.
module tb_hs_ctrl;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, take, en, slot, tick, out_valid;
  int checks = 0, failures = 0, n_b2b = 0, n_idle = 0;

  hs_ctrl dut (.*);
  always #5 clk = ~clk;

  // expected phase: 0 idle, 1 slot 0, 2 slot 1
  int ph = 0, ph_nx;
  bit exp_ov = 0, took_prev = 0;
  int since_take = 99;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid = (i % 400 < 200) ? 1'b1 : (($urandom % 3) == 0);
      #1;
      checks++;
      if (in_ready != (ph == 0 || ph == 2) || take != (in_valid && in_ready) ||
          en != (ph != 0) || (en && slot != (ph == 2)) || tick != (ph == 2) ||
          out_valid != exp_ov) begin
        failures++;
        if (failures < 5) $display("FAIL %0d: ph=%0d rdy=%b en=%b slot=%b tick=%b ov=%b", i, ph,
                                   in_ready, en, slot, tick, out_valid);
      end
      if (ph == 0) n_idle++;
      ph_nx  = (ph == 1) ? 2 : (take ? 1 : 0);
      exp_ov = (ph == 2);
      if (take) begin
        if (since_take == 2) n_b2b++;
        since_take = 0;
      end
      @(posedge clk);
      since_take++;
      ph = ph_nx;
    end
    checks += 2;
    if (n_b2b == 0)  begin failures++; $display("FAIL: never streamed"); end
    if (n_idle == 0) begin failures++; $display("FAIL: never idle"); end
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
