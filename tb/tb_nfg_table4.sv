// End-to-end test of the quadratic NFG at 24 fractional bits (26-bit signed
// input, 13 LUTs of 2 bits, a 256-word table) on the functions used to
// compare with uniform-segmentation generators: sin(pi x) on [0,1/4],
// exp(x) and 2^x - 1 on [0,1], and sin(pi x/4) on [0,1). Tables are built for
// an approximation error of 2^-27 and every output is checked to 2^-24.
module tb_nfg_table4;
  logic done;
  int   checks, failures;

  nfg_bench #(.N(26), .XF(24), .K(8), .NCAS(13), .R(9), .AAE_EXP(27),
              .FUNC_MASK(32'h3c000)) u_bench (.done, .checks, .failures);

  initial begin
    #200ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
