// Scaling shifter: applies the exponent of a scaled coefficient to a product.
//
// A coefficient c is stored as a mantissa m and an exponent l, c = m * 2^l, so
// that a narrow multiplier serves both large and small coefficients. The
// product p = m * operand has a fixed number of fractional bits; this unit
// returns p * 2^(l + BIAS) truncated to OW bits, where the constant BIAS turns
// the product's fraction into the final adder's. A positive shift moves left,
// a negative one moves right with sign extension (rounding towards minus
// infinity). The scaling method and an optional stage for it follow the
// architecture; the signed exponent and the truncation are this
// implementation's choice.
//
// Timing: with REGISTERED = 1 the result is registered (one pipeline stage);
// with REGISTERED = 0 it is combinational, for a generator built without a
// shifter stage, which then ties l to zero.
module scaling_shifter #(
  parameter int unsigned IW         = 48,
  parameter int unsigned OW         = 40,
  parameter int unsigned LW         = 6,
  parameter int          BIAS       = 0,
  parameter bit          REGISTERED = 1'b1
) (
  input  logic                 clk,
  input  logic signed [IW-1:0] p,
  input  logic signed [LW-1:0] l,
  output logic signed [OW-1:0] y
);

  // Wide enough that no bit of p is lost before the final truncation.
  localparam int unsigned EW = IW + OW + 2 ** LW + ((BIAS < 0) ? -BIAS : BIAS);

  logic signed [EW-1:0] p_ext;
  logic signed [31:0]   sh;
  logic signed [EW-1:0] shifted;
  logic signed [OW-1:0] y_comb;

  always_comb begin
    p_ext = EW'(p);
    sh    = 32'(l) + BIAS;
    if (sh >= 0) shifted = p_ext <<< sh;
    else         shifted = p_ext >>> (-sh);
    y_comb = shifted[OW-1:0];
  end

  if (REGISTERED) begin : g_reg
    always_ff @(posedge clk) y <= y_comb;
  end else begin : g_comb
    assign y = y_comb;
  end

endmodule
