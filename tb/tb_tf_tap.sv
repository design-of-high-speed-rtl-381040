// tb_tf_tap: random test of one hardware-shared transposed-FIR tap.
// A model keeps the two product and two partial-sum registers and predicts
// every output each cycle, with random enables, slots, coefficients and
// chain inputs (including full-scale values).
module tb_tf_tap;
  timeunit 1ns; timeprecision 100ps;
  localparam int DW = 16, CW = 24, AW = DW + CW + 3;
  logic clk = 0, rst_n = 0, en = 0, slot = 0;
  logic signed [DW-1:0] x = 0;
  logic signed [CW-1:0] coef = 0;
  logic signed [AW-1:0] acc_in = 0, acc_cur, acc_g0, acc_g1;
  int checks = 0, failures = 0;
  longint mp[2], ma[2];

  tf_tap #(.DW(DW), .CW(CW), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    mp = '{0, 0}; ma = '{0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en     = ($urandom % 4) != 0;
      slot   = $urandom % 2;
      x      = DW'($urandom);
      coef   = CW'($urandom);
      acc_in = AW'({$urandom, $urandom}) >>> ($urandom % 8);
      if (i % 97 == 0) begin x = -(2 ** (DW - 1)); coef = -(2 ** (CW - 1)); end
      @(posedge clk);
      if (en) begin
        ma[slot] = longint'(acc_in) + mp[slot];
        mp[slot] = longint'(coef) * longint'(x);
        // the model wraps the sum to AW bits as the register does
        ma[slot] = longint'(AW'(ma[slot]));
      end
      #1;
      checks++;
      if (longint'(acc_g0) != ma[0] || longint'(acc_g1) != ma[1] ||
          longint'(acc_cur) != ma[slot]) begin
        failures++;
        if (failures < 5) $display("FAIL %0d: g0=%0d/%0d g1=%0d/%0d", i, acc_g0, ma[0], acc_g1, ma[1]);
      end
    end
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
