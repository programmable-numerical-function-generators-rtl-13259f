// Unit test of the registered signed multiplier: random operands, including
// the most negative values, compared with the real-valued product one cycle
// later; operands change every cycle to check the pipelining.
module tb_pipelined_multiplier;
  localparam int AW = 20, BW = 26;

  logic clk = 1'b0;
  logic signed [AW-1:0] a;
  logic signed [BW-1:0] b;
  logic signed [AW+BW-1:0] p;
  int checks = 0, failures = 0;
  real expected [$];

  pipelined_multiplier #(.AW(AW), .BW(BW)) dut (.clk, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int j = 0; j < 3000; j++) begin
      case (j)
        0: begin a = {1'b1, {(AW-1){1'b0}}}; b = {1'b1, {(BW-1){1'b0}}}; end
        1: begin a = {1'b1, {(AW-1){1'b0}}}; b = {1'b0, {(BW-1){1'b1}}}; end
        default: begin a = AW'($urandom); b = BW'($urandom); end
      endcase
      expected.push_back(real'(a) * real'(b));
      @(negedge clk);
      checks++;
      if (real'(p) != expected.pop_front()) begin
        failures++;
        $display("product %0d wrong", j);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
