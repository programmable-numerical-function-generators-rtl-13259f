// Segment index encoder: maps the n-bit input x to the index i of the segment
// that contains it, using a pipelined LUT cascade.
//
// The input bits are cut into N_CAS groups of G = N/N_CAS bits, most
// significant group first. LUT 0 is addressed by the first group alone; LUT j
// (j > 0) by the R rails from LUT j-1 followed by group j. Every LUT but the
// last drives R rails, the last drives the K-bit segment index. Each LUT is a
// synchronous memory, so the cascade is an N_CAS-stage pipeline: x is delayed
// alongside it so that every LUT sees the bits of the same sample. An LUT
// cascade, one LUT per pipeline stage and the index as the last LUT's output
// follow the architecture; the equal group widths, the write port and the
// valid signal are this implementation's choices.
//
// Rails: a monotone segment index function with t segments has, at any cut,
// at most t constant sub-functions plus one non-constant one per segment
// boundary, so R = ceil(log2 t) + 1 rails always suffice.
//
// Timing: x and in_valid presented before a rising edge give idx, x_out and
// out_valid N_CAS edges later; one new x may enter every cycle.
// Loading: wr_en writes wr_data to word wr_addr of LUT wr_lut (the low bits
// of wr_addr and wr_data are used where a LUT is narrower).
module seg_index_encoder #(
  parameter int unsigned N     = nfg_pkg::N_DEF,
  parameter int unsigned N_CAS = nfg_pkg::NCAS_DEF,
  parameter int unsigned K     = nfg_pkg::K_DEF,
  parameter int unsigned R     = nfg_pkg::K_DEF + 1,
  localparam int unsigned G    = N / N_CAS,
  localparam int unsigned SW   = (N_CAS > 1) ? $clog2(N_CAS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  output logic           out_valid,
  output logic [K-1:0]   idx,
  output logic [N-1:0]   x_out,
  input  logic           wr_en,
  input  logic [SW-1:0]  wr_lut,
  input  logic [R+G-1:0] wr_addr,
  input  logic [R-1:0]   wr_data
);

  initial begin
    assert (N % N_CAS == 0) else $fatal(1, "N must be a multiple of N_CAS");
    assert (R >= K) else $fatal(1, "R must be at least K");
  end

  logic [N-1:0]     xp [N_CAS+1];   // xp[j]: x delayed j cycles
  logic [N_CAS:0]   vp;             // valid delayed j cycles
  logic [R-1:0]     rail [N_CAS];   // rails out of LUT j (index for the last)

  assign xp[0] = x;
  assign vp[0] = in_valid;

  for (genvar j = 0; j < N_CAS; j++) begin : g_stage
    localparam int unsigned AWJ = (j == 0) ? G : R + G;
    localparam int unsigned DWJ = (j == N_CAS - 1) ? K : R;
    logic [AWJ-1:0] addr;
    logic [DWJ-1:0] rd;
    logic           we;

    if (j == 0) begin : g_first
      assign addr = xp[0][N-1 -: G];
    end else begin : g_next
      assign addr = {rail[j-1], xp[j][N-1-j*G -: G]};
    end

    assign we = wr_en && (wr_lut == SW'(j));

    cascade_lut #(.AW(AWJ), .DW(DWJ)) u_lut (
      .clk  (clk),
      .addr (addr),
      .rdata(rd),
      .we   (we),
      .waddr(wr_addr[AWJ-1:0]),
      .wdata(wr_data[DWJ-1:0])
    );

    assign rail[j] = R'(rd);

    always_ff @(posedge clk) xp[j+1] <= xp[j];

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) vp[j+1] <= 1'b0;
      else        vp[j+1] <= vp[j];
  end

  assign idx       = rail[N_CAS-1][K-1:0];
  assign x_out     = xp[N_CAS];
  assign out_valid = vp[N_CAS];

endmodule
