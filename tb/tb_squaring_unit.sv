// Unit test of the squaring unit, in two configurations: exact (all 2*DF
// fractional bits kept) and truncating (8 bits dropped). Random signed inputs,
// including the most negative, are compared with the square computed in real
// arithmetic and floored to the kept fraction, one cycle after the input.
module tb_squaring_unit;
  localparam int DW = 26, DF = 23;
  localparam int SQF_A = 2 * DF, SQF_B = 2 * DF - 8;
  localparam int SQW_A = 2 * (DW - DF - 1) + 1 + SQF_A;
  localparam int SQW_B = 2 * (DW - DF - 1) + 1 + SQF_B;

  logic clk = 1'b0;
  logic signed [DW-1:0] d;
  logic [SQW_A-1:0] sq_a;
  logic [SQW_B-1:0] sq_b;
  int checks = 0, failures = 0;

  squaring_unit #(.DW(DW), .DF(DF), .SQF(SQF_A)) dut_a (.clk, .d, .sq(sq_a));
  squaring_unit #(.DW(DW), .DF(DF), .SQF(SQF_B)) dut_b (.clk, .d, .sq(sq_b));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 2000; j++) begin
      real dr, ea, eb;
      @(negedge clk);
      case (j)
        0: d = {1'b1, {(DW-1){1'b0}}};
        1: d = '0;
        2: d = '1;
        default: d = (j % 2) ? DW'($urandom % 4096) - DW'(2048) : DW'($urandom);
      endcase
      dr = real'(d) / 2.0 ** DF;
      ea = dr * dr * 2.0 ** SQF_A;
      eb = $floor(dr * dr * 2.0 ** SQF_B);
      @(negedge clk);
      checks += 2;
      if (real'(sq_a) != ea) begin failures++; $display("exact: d=%f sq=%0d expected %f", dr, sq_a, ea); end
      if (real'(sq_b) != eb) begin failures++; $display("trunc: d=%f sq=%0d expected %f", dr, sq_b, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
