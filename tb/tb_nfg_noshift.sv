// End-to-end test of the quadratic NFG built without the scaling shifter
// stage (latency N_CAS + 5), at 16-bit precision. Only functions whose
// coefficients all fit the mantissas without scaling are loaded: 2^x, 1/x,
// 1/sqrt(x), log2(x), ln(x), the sigmoid and the Gaussian.
module tb_nfg_noshift;
  logic done;
  int   checks, failures;

  nfg_bench #(.N(16), .XF(14), .K(6), .NCAS(4), .R(7), .AAE_EXP(17),
              .HAS_SHIFTER(1'b0), .FUNC_MASK(14'h303b)) u_bench (.done, .checks, .failures);

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
