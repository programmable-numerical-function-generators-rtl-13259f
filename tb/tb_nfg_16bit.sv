// End-to-end test of the quadratic NFG in its 16-bit precision configuration
// (14 fractional bits, 4 LUTs of 4 input bits, a 64-word coefficients table),
// with all fourteen functions of the evaluation set segmented for an
// approximation error of 2^-17. x - q is narrowed from 18 to 14 bits
// (|x - q| < 1/4), which every segment of these functions allows after
// halving, so the squaring unit and the c'1 multiplier are built smaller.
module tb_nfg_16bit;
  logic done;
  int   checks, failures;

  nfg_bench #(.N(16), .XF(14), .K(6), .NCAS(4), .R(7), .AAE_EXP(17),
              .D_DROP(4)) u_bench (.done, .checks, .failures);

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
