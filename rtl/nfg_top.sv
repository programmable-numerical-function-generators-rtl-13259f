// Programmable numerical function generator (NFG) based on piecewise
// quadratic approximation.
//
// The domain of f(x) is cut into non-uniform segments; on segment i the
// function is approximated by g_i(x) = c2_i*(x-q_i)^2 + c'1_i*(x-q_i) + c'0_i,
// q_i being the segment's midpoint. The datapath follows the architecture's
// seven units:
//   1. segment index encoder (LUT cascade, N_CAS stages)  x -> i
//   2. coefficients table (1 stage)                       i -> -q, c2, c'1, c'0
//   3. adder (1 stage)                                    d = x + (-q)
//   4. squaring unit (1 stage)                            d^2
//   5. two multipliers in parallel (1 stage)              c2*d^2, c'1*d
//   6. scaling shifters (1 stage, optional)               * 2^l2, * 2^l1
//   7. final adder (1 stage)                              y
// so the latency is N_CAS + 6 cycles with the shifters (HAS_SHIFTER = 1) and
// N_CAS + 5 without, and one new x is accepted every cycle. Without the
// shifter stage the exponents read from the table are ignored.
//
// What function is generated depends only on the memory contents: the LUTs
// of the cascade and the coefficient words are loaded through one write port
// (wr_sel 0..N_CAS-1 selects an LUT, wr_sel = N_CAS the coefficients table).
// The write port, the valid signal, the reset of the valid pipeline only, and
// all word widths are this implementation's choices; the unit list, their
// order and the stage counts are the architecture's.
//
// Formats: x is signed N bits with XF fractional bits; y is signed
// YI + XF bits with XF fractional bits (same accuracy in and out).
//
// Narrowing x - q: with the midpoint as expansion point, |x - q| is at most
// half the widest segment, so the high bits of x - q are copies of its sign.
// D_DROP removes that many of them before the squaring unit and the c'1
// multiplier, shrinking both; the tables must then keep every segment
// narrower than 2^(N+1-D_DROP-XF). The default keeps all bits, so that any
// function can be loaded.
module nfg_top #(
  parameter int unsigned N           = nfg_pkg::N_DEF,
  parameter int unsigned XF          = nfg_pkg::XF_DEF,
  parameter int unsigned K           = nfg_pkg::K_DEF,
  parameter int unsigned N_CAS       = nfg_pkg::NCAS_DEF,
  parameter int unsigned R           = nfg_pkg::K_DEF + 1,
  parameter int unsigned C2W         = nfg_pkg::C2W_DEF,
  parameter int unsigned C1W         = nfg_pkg::C1W_DEF,
  parameter int unsigned LW          = nfg_pkg::LW_DEF,
  parameter int unsigned YI          = nfg_pkg::YI_DEF,
  parameter int unsigned GUARD       = nfg_pkg::GUARD_DEF,
  parameter int unsigned ACCW        = nfg_pkg::ACCW_DEF,
  parameter bit          HAS_SHIFTER = 1'b1,
  parameter int unsigned SQ_TRUNC    = 0,    // low bits dropped from (x-q)^2
  parameter int unsigned D_DROP      = 0,    // high bits dropped from x-q
  // Derived sizes; not meant to be overridden.
  localparam int unsigned G      = N / N_CAS,        // input bits per LUT
  localparam int unsigned DF     = XF + 1,           // fraction of x - q
  localparam int unsigned DW     = N + 2,            // width of x - q
  localparam int unsigned AF     = XF + GUARD,       // fraction inside
  localparam int unsigned C0W    = YI + AF,          // width of c'0
  localparam int unsigned YW     = YI + XF,          // width of y
  localparam int unsigned DN     = DW - D_DROP,      // x - q after narrowing
  localparam int unsigned SQF    = 2 * DF - SQ_TRUNC, // fraction of (x-q)^2
  localparam int unsigned SQW    = unsigned'(2 * (int'(DN) - int'(DF) - 1) + 1 + int'(SQF)),
  localparam int unsigned CWW    = DW + C2W + LW + C1W + LW + C0W,
  localparam int unsigned WAW    = (R + G > K) ? R + G : K,
  localparam int unsigned WDW    = (CWW > R) ? CWW : R,
  localparam int unsigned SELW   = $clog2(N_CAS + 1),
  localparam int unsigned LATENCY = N_CAS + (HAS_SHIFTER ? 6 : 5)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Function evaluation.
  input  logic                 in_valid,
  input  logic signed [N-1:0]  x,
  output logic                 out_valid,
  output logic signed [YW-1:0] y,
  // Table loading.
  input  logic                 wr_en,
  input  logic [SELW-1:0]      wr_sel,
  input  logic [WAW-1:0]       wr_addr,
  input  logic [WDW-1:0]       wr_data
);

  localparam int unsigned SSW  = (N_CAS > 1) ? $clog2(N_CAS) : 1;
  localparam int unsigned M2F  = C2W - 2;   // mantissa fractions
  localparam int unsigned M1F  = C1W - 2;
  localparam int unsigned P2W  = C2W + SQW + 1;
  localparam int unsigned P1W  = C1W + DN;
  // p2 has M2F + SQF fractional bits, p1 has M1F + DF; the sum has AF.
  localparam int          BIAS2 = int'(AF) - int'(M2F) - int'(SQF);
  localparam int          BIAS1 = int'(AF) - int'(M1F) - int'(DF);

  // ---------------------------------------------------------------- loading
  logic wr_lut_en, wr_coef_en;
  assign wr_lut_en  = wr_en && (wr_sel < SELW'(N_CAS));
  assign wr_coef_en = wr_en && (wr_sel == SELW'(N_CAS));

  // ------------------------------------------ stage 1: segment index encoder
  logic          v_enc;
  logic [K-1:0]  idx;
  logic [N-1:0]  x_enc;

  seg_index_encoder #(.N(N), .N_CAS(N_CAS), .K(K), .R(R)) u_encoder (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .out_valid(v_enc),
    .idx      (idx),
    .x_out    (x_enc),
    .wr_en    (wr_lut_en),
    .wr_lut   (wr_sel[SSW-1:0]),
    .wr_addr  (wr_addr[R+G-1:0]),
    .wr_data  (wr_data[R-1:0])
  );

  // --------------------------------------------- stage 2: coefficients table
  logic signed [DW-1:0]  neg_q;
  logic signed [C2W-1:0] m2_t;
  logic signed [LW-1:0]  l2_t, l1_t;
  logic signed [C1W-1:0] m1_t;
  logic signed [C0W-1:0] c0_t;
  logic signed [N-1:0]   x_t;

  coef_table #(.K(K), .DW(DW), .C2W(C2W), .C1W(C1W), .LW(LW), .C0W(C0W)) u_table (
    .clk    (clk),
    .idx    (idx),
    .neg_q  (neg_q),
    .m2     (m2_t),
    .l2     (l2_t),
    .m1     (m1_t),
    .l1     (l1_t),
    .c0     (c0_t),
    .wr_en  (wr_coef_en),
    .wr_addr(wr_addr[K-1:0]),
    .wr_data(wr_data[CWW-1:0])
  );

  always_ff @(posedge clk) x_t <= x_enc;

  // ------------------------------------------------ stage 3: x + (-q) adder
  logic signed [DW-1:0]  d_a;
  logic signed [C2W-1:0] m2_a;
  logic signed [C1W-1:0] m1_a;
  logic signed [LW-1:0]  l2_a, l1_a;
  logic signed [C0W-1:0] c0_a;

  offset_adder #(.N(N)) u_offset (
    .clk  (clk),
    .x    (x_t),
    .neg_q(neg_q),
    .d    (d_a)
  );

  always_ff @(posedge clk) begin
    m2_a <= m2_t; m1_a <= m1_t; l2_a <= l2_t; l1_a <= l1_t; c0_a <= c0_t;
  end

  // ------------------------------------------------- stage 4: squaring unit
  logic [SQW-1:0]        sq_s;
  logic signed [DN-1:0]  d_n;   // x - q with the unused high bits dropped
  logic signed [DN-1:0]  d_s;
  logic signed [C2W-1:0] m2_s;
  logic signed [C1W-1:0] m1_s;
  logic signed [LW-1:0]  l2_s, l1_s;
  logic signed [C0W-1:0] c0_s;

  assign d_n = d_a[DN-1:0];

  squaring_unit #(.DW(DN), .DF(DF), .SQF(SQF)) u_square (
    .clk(clk),
    .d  (d_n),
    .sq (sq_s)
  );

  always_ff @(posedge clk) begin
    d_s <= d_n; m2_s <= m2_a; m1_s <= m1_a; l2_s <= l2_a; l1_s <= l1_a; c0_s <= c0_a;
  end

  // ----------------------------------------- stage 5: multipliers (parallel)
  logic signed [P2W-1:0] p2_m;
  logic signed [P1W-1:0] p1_m;
  logic signed [LW-1:0]  l2_m, l1_m;
  logic signed [C0W-1:0] c0_m;

  pipelined_multiplier #(.AW(C2W), .BW(SQW + 1)) u_mul2 (
    .clk(clk),
    .a  (m2_s),
    .b  ({1'b0, sq_s}),
    .p  (p2_m)
  );

  pipelined_multiplier #(.AW(C1W), .BW(DN)) u_mul1 (
    .clk(clk),
    .a  (m1_s),
    .b  (d_s),
    .p  (p1_m)
  );

  always_ff @(posedge clk) begin
    l2_m <= l2_s; l1_m <= l1_s; c0_m <= c0_s;
  end

  // -------------------------------------- stage 6: scaling shifters (option)
  logic signed [ACCW-1:0] t2_h, t1_h, t0_h;
  logic signed [LW-1:0]   l2_h, l1_h;

  assign l2_h = HAS_SHIFTER ? l2_m : '0;
  assign l1_h = HAS_SHIFTER ? l1_m : '0;

  scaling_shifter #(.IW(P2W), .OW(ACCW), .LW(LW), .BIAS(BIAS2), .REGISTERED(HAS_SHIFTER))
    u_shift2 (.clk(clk), .p(p2_m), .l(l2_h), .y(t2_h));

  scaling_shifter #(.IW(P1W), .OW(ACCW), .LW(LW), .BIAS(BIAS1), .REGISTERED(HAS_SHIFTER))
    u_shift1 (.clk(clk), .p(p1_m), .l(l1_h), .y(t1_h));

  if (HAS_SHIFTER) begin : g_c0_delay
    always_ff @(posedge clk) t0_h <= ACCW'(c0_m);
  end else begin : g_c0_direct
    assign t0_h = ACCW'(c0_m);
  end

  // --------------------------------------------------- stage 7: final adder
  final_adder #(.ACCW(ACCW), .GUARD(GUARD), .YW(YW)) u_final (
    .clk(clk),
    .t2 (t2_h),
    .t1 (t1_h),
    .t0 (t0_h),
    .y  (y)
  );

  // ------------------------------------------------- valid after the encoder
  localparam int unsigned VTAIL = LATENCY - N_CAS;
  logic [VTAIL-1:0] v_tail;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v_tail <= '0;
    else        v_tail <= {v_tail[VTAIL-2:0], v_enc};

  assign out_valid = v_tail[VTAIL-1];

endmodule
