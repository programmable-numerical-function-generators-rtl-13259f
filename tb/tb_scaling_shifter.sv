// Unit test of the scaling shifter, registered and combinational versions:
// random products and exponents giving both left and right shifts, compared
// with p * 2^(l + BIAS) floored, computed in real arithmetic.
module tb_scaling_shifter;
  localparam int IW = 30, OW = 40, LW = 7, BIAS = -10;

  logic clk = 1'b0;
  logic signed [IW-1:0] p;
  logic signed [LW-1:0] l;
  logic signed [OW-1:0] y_reg, y_comb;
  int checks = 0, failures = 0, n_left = 0, n_right = 0;

  scaling_shifter #(.IW(IW), .OW(OW), .LW(LW), .BIAS(BIAS), .REGISTERED(1'b1))
    dut_r (.clk, .p, .l, .y(y_reg));
  scaling_shifter #(.IW(IW), .OW(OW), .LW(LW), .BIAS(BIAS), .REGISTERED(1'b0))
    dut_c (.clk, .p, .l, .y(y_comb));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 2000; j++) begin
      real e;
      int sh;
      @(negedge clk);
      p = IW'($urandom);
      // Shifts from -54 (all bits gone) to +9 (result still fits OW bits).
      l = LW'(int'($urandom % 64) - 44);
      sh = int'(l) + BIAS;
      if (sh >= 0) n_left++; else n_right++;
      e = $floor(real'(p) * 2.0 ** sh);
      #1;
      checks++;
      if (real'(y_comb) != e) begin failures++; $display("comb: p=%0d l=%0d y=%0d e=%f", p, l, y_comb, e); end
      @(negedge clk);
      checks++;
      if (real'(y_reg) != e) begin failures++; $display("reg: p=%0d l=%0d y=%0d e=%f", p, l, y_reg, e); end
    end
    checks++;
    if (n_left == 0 || n_right == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
