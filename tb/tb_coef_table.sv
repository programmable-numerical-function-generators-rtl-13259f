// Unit test of the coefficients table: writes random words to all 2^K
// entries, then reads entries in random order and checks that every field
// (-q, c2 mantissa and exponent, c'1 mantissa and exponent, c'0) comes out of
// its place in the word one cycle after the index is presented.
module tb_coef_table;
  localparam int K = 4, DW = 26, C2W = 20, C1W = 26, LW = 7, C0W = 29;
  localparam int WW = DW + C2W + LW + C1W + LW + C0W;

  logic clk = 1'b0;
  logic [K-1:0] idx, wr_addr;
  logic signed [DW-1:0] neg_q;
  logic signed [C2W-1:0] m2;
  logic signed [LW-1:0] l2, l1;
  logic signed [C1W-1:0] m1;
  logic signed [C0W-1:0] c0;
  logic wr_en;
  logic [WW-1:0] wr_data;
  logic [WW-1:0] model [2**K];
  int checks = 0, failures = 0;

  coef_table #(.K(K), .DW(DW), .C2W(C2W), .C1W(C1W), .LW(LW), .C0W(C0W)) dut (
    .clk, .idx, .neg_q, .m2, .l2, .m1, .l1, .c0, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; idx = '0; wr_addr = '0; wr_data = '0;
    for (int i = 0; i < 2**K; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = K'(i);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      model[i] = wr_data;
    end
    @(negedge clk); wr_en = 1'b0;
    for (int j = 0; j < 300; j++) begin
      int a;
      logic [WW-1:0] w;
      a = $urandom % (2**K);
      @(negedge clk); idx = K'(a);
      @(negedge clk);
      w = model[a];
      checks++;
      if (c0    !== w[0 +: C0W] ||
          l1    !== w[C0W +: LW] ||
          m1    !== w[C0W + LW +: C1W] ||
          l2    !== w[C0W + LW + C1W +: LW] ||
          m2    !== w[C0W + 2*LW + C1W +: C2W] ||
          neg_q !== w[C0W + 2*LW + C1W + C2W +: DW]) begin
        failures++;
        $display("entry %0d fields wrong", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
