// Adder for x + (-q_i): moves the input to the centre of its segment.
//
// x is signed with XF fractional bits; neg_q and the result d are signed with
// one more fractional bit (a segment midpoint may fall on half an input LSB)
// and two more bits in all, DW = N + 2, so the sum cannot overflow when -q
// lies in the range of x, as a segment midpoint does. The adder and its single pipeline stage follow the
// architecture; the formats are this implementation's choice.
//
// Timing: d is registered, valid one rising edge after x and neg_q.
module offset_adder #(
  parameter int unsigned N  = nfg_pkg::N_DEF,
  localparam int unsigned DW = N + 2
) (
  input  logic                 clk,
  input  logic signed [N-1:0]  x,
  input  logic signed [DW-1:0] neg_q,
  output logic signed [DW-1:0] d
);

  logic signed [DW-1:0] x_ext;

  // Sign-extend by one bit and append one fractional bit.
  assign x_ext = {x[N-1], x, 1'b0};

  always_ff @(posedge clk) d <= x_ext + neg_q;

endmodule
