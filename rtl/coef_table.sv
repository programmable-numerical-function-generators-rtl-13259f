// Coefficients table of the quadratic NFG.
//
// One word per segment index i, 2^K words in all, each holding the values the
// datapath needs for segment i:
//   neg_q : -q_i, the negated segment midpoint, in the format of x - q
//           (DW bits, DF fractional bits)
//   m2,l2 : c2_i = m2 * 2^l2, m2 a signed C2W-bit mantissa with C2W-2
//           fractional bits, l2 a signed LW-bit exponent
//   m1,l1 : c'1_i = m1 * 2^l1, in the same way with C1W bits
//   c0    : c'0_i, signed C0W bits with AF fractional bits
// The list of stored values (-q, c2, c'1, c'0 and the scaling exponents) and
// the single synchronous memory follow the architecture; the field widths, the
// mantissa/exponent encoding and the write port are this implementation's.
//
// Timing: idx presented before a rising edge gives the word's fields after
// that edge (one pipeline stage). wr_en writes wr_data to word wr_addr at the
// edge; the word layout is {neg_q, m2, l2, m1, l1, c0}, neg_q in the MSBs.
module coef_table #(
  parameter int unsigned K   = nfg_pkg::K_DEF,
  parameter int unsigned DW  = nfg_pkg::N_DEF + 2,
  parameter int unsigned C2W = nfg_pkg::C2W_DEF,
  parameter int unsigned C1W = nfg_pkg::C1W_DEF,
  parameter int unsigned LW  = nfg_pkg::LW_DEF,
  parameter int unsigned C0W = nfg_pkg::YI_DEF + nfg_pkg::XF_DEF + nfg_pkg::GUARD_DEF,
  localparam int unsigned WW = DW + C2W + LW + C1W + LW + C0W
) (
  input  logic                  clk,
  input  logic [K-1:0]          idx,
  output logic signed [DW-1:0]  neg_q,
  output logic signed [C2W-1:0] m2,
  output logic signed [LW-1:0]  l2,
  output logic signed [C1W-1:0] m1,
  output logic signed [LW-1:0]  l1,
  output logic signed [C0W-1:0] c0,
  input  logic                  wr_en,
  input  logic [K-1:0]          wr_addr,
  input  logic [WW-1:0]         wr_data
);

  typedef struct packed {
    logic signed [DW-1:0]  neg_q;
    logic signed [C2W-1:0] m2;
    logic signed [LW-1:0]  l2;
    logic signed [C1W-1:0] m1;
    logic signed [LW-1:0]  l1;
    logic signed [C0W-1:0] c0;
  } coef_word_t;

  coef_word_t mem [2**K];
  coef_word_t word;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= coef_word_t'(wr_data);
    word <= mem[idx];
  end

  assign neg_q = word.neg_q;
  assign m2    = word.m2;
  assign l2    = word.l2;
  assign m1    = word.m1;
  assign l1    = word.l1;
  assign c0    = word.c0;

endmodule
