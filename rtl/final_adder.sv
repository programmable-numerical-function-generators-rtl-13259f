// Final adder: y = c2*(x-q)^2 + c'1*(x-q) + c'0, rounded to the output format.
//
// The three terms arrive aligned, signed ACCW bits with GUARD fractional bits
// more than the output. Their sum is rounded to nearest (half up) by adding
// half an output LSB and dropping the GUARD bits, then truncated to YW bits;
// the design assumes the result fits, as it does when the tables hold a
// function whose values lie in the output range. The adder and its pipeline
// stage follow the architecture; guard bits and rounding are this
// implementation's choice.
//
// Timing: y is registered, valid one rising edge after the terms.
module final_adder #(
  parameter int unsigned ACCW  = nfg_pkg::ACCW_DEF,
  parameter int unsigned GUARD = nfg_pkg::GUARD_DEF,
  parameter int unsigned YW    = nfg_pkg::YI_DEF + nfg_pkg::XF_DEF
) (
  input  logic                   clk,
  input  logic signed [ACCW-1:0] t2,
  input  logic signed [ACCW-1:0] t1,
  input  logic signed [ACCW-1:0] t0,
  output logic signed [YW-1:0]   y
);

  initial assert (GUARD >= 1 && ACCW >= YW + GUARD) else $fatal(1, "bad final adder widths");

  logic signed [ACCW-1:0] sum;
  logic signed [ACCW-1:0] rounded;

  always_comb begin
    sum     = t2 + t1 + t0 + (ACCW'(1) <<< (GUARD - 1));
    rounded = sum >>> GUARD;
  end

  always_ff @(posedge clk) y <= rounded[YW-1:0];

endmodule
