// Squaring unit: computes (x - q_i)^2 for the c2 term.
//
// The input d is signed, DW bits with DF fractional bits. The square has 2*DF
// fractional bits; the low 2*DF - SQF of them are dropped (truncation), so the
// unsigned result has SQF fractional bits and SQW = 2*(DW-DF-1) + 1 + SQF
// bits, enough for the largest square, (-2^(DW-DF-1))^2. DW may be smaller
// than DF when |d| is known to be below 1/2. The default keeps
// the square exact: a large c2 would otherwise magnify the truncation error.
// A dedicated squaring unit of one pipeline stage follows the architecture;
// the truncation point is this implementation's choice.
//
// Timing: sq is registered, valid one rising edge after d.
module squaring_unit #(
  parameter int unsigned DW  = nfg_pkg::N_DEF + 2,
  parameter int unsigned DF  = nfg_pkg::XF_DEF + 1,
  parameter int unsigned SQF = 2 * (nfg_pkg::XF_DEF + 1),
  localparam int unsigned SQW = unsigned'(2 * (int'(DW) - int'(DF) - 1) + 1 + int'(SQF))
) (
  input  logic                 clk,
  input  logic signed [DW-1:0] d,
  output logic [SQW-1:0]       sq
);

  initial assert (2 * DF >= SQF) else $fatal(1, "SQF exceeds the square's fraction");

  logic [DW-1:0]   mag;        // |d|, fits in DW bits unsigned
  logic [2*DW-1:0] sq_full;

  assign mag     = d[DW-1] ? DW'(-d) : DW'(d);
  assign sq_full = mag * mag;

  always_ff @(posedge clk) sq <= sq_full[2*DF-SQF +: SQW];

endmodule
