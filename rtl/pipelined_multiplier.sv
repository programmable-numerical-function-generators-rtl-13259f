// Signed multiplier with a registered product.
//
// Used twice, in parallel, in the NFG datapath: c2 mantissa times (x-q)^2 and
// c'1 mantissa times (x-q). The product is exact (AW + BW bits). A single
// pipeline stage for the two multipliers follows the architecture; the
// operand widths are set by the instantiating module.
//
// Timing: p is registered, valid one rising edge after a and b.
module pipelined_multiplier #(
  parameter int unsigned AW = 18,
  parameter int unsigned BW = 18
) (
  input  logic                    clk,
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);

  always_ff @(posedge clk) p <= a * b;

endmodule
