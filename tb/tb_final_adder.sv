// Unit test of the final adder: random signed terms, compared with their
// real-valued sum rounded to nearest (half up) at GUARD bits below the
// internal LSB, one cycle later. Sums falling exactly on a half are forced
// now and then to check the rounding direction.
module tb_final_adder;
  localparam int ACCW = 40, GUARD = 4, YW = 25;

  logic clk = 1'b0;
  logic signed [ACCW-1:0] t2, t1, t0;
  logic signed [YW-1:0] y;
  int checks = 0, failures = 0;

  final_adder #(.ACCW(ACCW), .GUARD(GUARD), .YW(YW)) dut (.clk, .t2, .t1, .t0, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 2000; j++) begin
      real s, e;
      @(negedge clk);
      t2 = ACCW'(signed'($urandom)) >>> 7;
      t1 = ACCW'(signed'($urandom)) >>> 7;
      t0 = ACCW'(signed'($urandom)) >>> 7;
      if (j % 4 == 0) t0 = t0 - ((t2 + t1 + t0) & ACCW'(15)) + ACCW'(8);  // exact half
      s = (real'(t2) + real'(t1) + real'(t0)) / 2.0 ** GUARD;
      e = $floor(s + 0.5);
      @(negedge clk);
      checks++;
      if (real'(y) != e) begin failures++; $display("sum %f gave %0d expected %f", s, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
