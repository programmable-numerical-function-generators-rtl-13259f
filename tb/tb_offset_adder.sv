// Unit test of the x + (-q) adder: random signed inputs, -q within the range
// of x as a segment midpoint is, including the extremes of both operands, compared with the real-valued difference
// x - q (x with XF fractional bits, -q and the result with XF+1), one cycle
// after the inputs.
module tb_offset_adder;
  localparam int N = 24, XF = 22, DW = N + 2;

  logic clk = 1'b0;
  logic signed [N-1:0] x;
  logic signed [DW-1:0] neg_q, d;
  int checks = 0, failures = 0;

  offset_adder #(.N(N)) dut (.clk, .x, .neg_q, .d);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 2000; j++) begin
      real xr, qr, dr;
      @(negedge clk);
      case (j)
        0: begin x = {1'b1, {(N-1){1'b0}}}; neg_q = {3'b001, {(DW-3){1'b0}}}; end
        1: begin x = {1'b0, {(N-1){1'b1}}}; neg_q = {3'b111, {(DW-3){1'b0}}}; end
        default: begin x = N'($urandom); neg_q = DW'(signed'(DW'($urandom)) >>> 1); end
      endcase
      xr = real'(x) / 2.0 ** XF;
      qr = real'(neg_q) / 2.0 ** (XF + 1);
      @(negedge clk);
      dr = real'(d) / 2.0 ** (XF + 1);
      checks++;
      if (dr != xr + qr) begin
        failures++;
        $display("x=%f -q=%f d=%f", xr, qr, dr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
