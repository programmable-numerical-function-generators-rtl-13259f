// End-to-end test of the quadratic NFG at its default sizes (24-bit
// precision). For each of the fourteen functions of the evaluation set, the
// table generator segments the domain for an approximation error of 2^-25,
// the LUT cascade and coefficients table are loaded through the write port
// (a reload switches the function), and inputs are streamed back to back:
// every segment end, its neighbour, and random codes of the domain.
// Each output is checked
//   - against the real quadratic of its segment: |y - g(x)| <= 2^-XF
//     (datapath arithmetic, rounding included), and
//   - against f(x) itself: |y - f(x)| <= 2^-XF (m-bit accuracy), for
//     segments whose error bound the segmentation met and away from the
//     singular end of sqrt(-ln x) at x = 1 (the error there is reported),
// and its latency against N_CAS + 6 cycles. The mechanisms exercised are
// counted: non-zero scaling exponents, negative x - q, segment halving,
// function reloads, back-to-back issue and idle gaps. A never-seen mechanism
// is a failure.
module tb_nfg_top;
  import nfg_tb_pkg::*;

  localparam int N     = nfg_pkg::N_DEF;
  localparam int XF    = nfg_pkg::XF_DEF;
  localparam int K     = nfg_pkg::K_DEF;
  localparam int NCAS  = nfg_pkg::NCAS_DEF;
  localparam int R     = nfg_pkg::K_DEF + 1;
  localparam int YW    = nfg_pkg::YI_DEF + XF;
  localparam int LATENCY = NCAS + 6;
  localparam int SELW  = $clog2(NCAS + 1);
  localparam int G     = N / NCAS;
  localparam int DW    = N + 2;
  localparam int CWW   = DW + nfg_pkg::C2W_DEF + 2 * nfg_pkg::LW_DEF + nfg_pkg::C1W_DEF
                         + nfg_pkg::YI_DEF + XF + nfg_pkg::GUARD_DEF;
  localparam int WAW   = (R + G > K) ? R + G : K;
  localparam int WDW   = (CWW > R) ? CWW : R;
  localparam real AAE  = 1.0 / 33554432.0;   // 2^-25

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 in_valid;
  logic signed [N-1:0]  x;
  logic                 out_valid;
  logic signed [YW-1:0] y;
  logic                 wr_en;
  logic [SELW-1:0]      wr_sel;
  logic [WAW-1:0]       wr_addr;
  logic [WDW-1:0]       wr_data;

  nfg_top dut (
    .clk, .rst_n, .in_valid, .x, .out_valid, .y,
    .wr_en, .wr_sel, .wr_addr, .wr_data
  );

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  nfg_gen gen;
  longint q_x[$];
  longint q_edge[$];
  real    max_err_g, max_err_f, max_err_sing = 0.0;
  int     n_scaled = 0, n_neg_d = 0, n_split = 0, n_reload = 0;
  int     n_b2b = 0, n_gap = 0, n_funcs = 0, run_len = 0, n_outputs = 0;
  bit     checking = 1'b0;

  function automatic real y2real(logic signed [YW-1:0] v);
    return real'(longint'(v)) * $pow(2.0, -real'(XF));
  endfunction

  // Output monitor: sampled at the falling edge, after the rising edge that
  // produced the output.
  always @(negedge clk) begin
    if (out_valid) begin
      longint xc, e0;
      real xr, err;
      n_outputs++;
      run_len++;
      if (run_len == 32) n_b2b++;
      if (q_x.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        xc = q_x.pop_front();
        e0 = q_edge.pop_front();
        xr = gen.code2real(xc);
        checks++;
        if (cycle - e0 + 1 != LATENCY) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e0 + 1, LATENCY);
        end
        checks++;
        err = y2real(y) - gen.g_eval(xc);
        if (err < 0) err = -err;
        if (err > max_err_g) max_err_g = err;
        if (err > $pow(2.0, -real'(XF))) begin
          failures++;
          if (failures < 20)
            $display("%s x=%f y=%f g=%f", f_name(gen.fid), xr, y2real(y), gen.g_eval(xc));
        end
        if (f_near_singularity(gen.fid, xr)) begin
          err = y2real(y) - f_eval(gen.fid, xr);
          if (err < 0) err = -err;
          if (err > max_err_sing) max_err_sing = err;
        end else if (!gen.forced[gen.seg_of_u(xc)]) begin
          checks++;
          err = y2real(y) - f_eval(gen.fid, xr);
          if (err < 0) err = -err;
          if (err > max_err_f) max_err_f = err;
          if (err > $pow(2.0, -real'(XF))) begin
            failures++;
            if (failures < 20)
              $display("%s x=%f y=%f f=%f", f_name(gen.fid), xr, y2real(y), f_eval(gen.fid, xr));
          end
        end
      end
    end else begin
      if (run_len > 0 && checking) n_gap++;
      run_len = 0;
    end
  end

  task automatic load_tables();
    for (int i = 0; i < gen.lut_sel.size(); i++) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_sel  = SELW'(gen.lut_sel[i]);
      wr_addr = WAW'(gen.lut_addr[i]);
      wr_data = WDW'(gen.lut_data[i]);
    end
    for (int i = 0; i < gen.ends.size(); i++) begin
      logic [511:0] wv;
      wv = gen.coef_word(i);
      @(negedge clk);
      wr_en   = 1'b1;
      wr_sel  = SELW'(NCAS);
      wr_addr = WAW'(i);
      wr_data = wv[WDW-1:0];
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic issue(longint xc);
    int si;
    si = gen.seg_of_u(xc);
    if (gen.l2[si] != 0 || gen.l1[si] != 0) n_scaled++;
    if (2 * xc + gen.neg_q[si] < 0) n_neg_d++;
    @(negedge clk);
    in_valid = 1'b1;
    x        = N'(xc);
    q_x.push_back(xc);
    q_edge.push_back(cycle + 1);
  endtask

  task automatic idle(int n);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (n - 1) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    wr_en = 1'b0; wr_sel = '0; wr_addr = '0; wr_data = '0;
    gen = new(N, XF, K, NCAS, R, nfg_pkg::C2W_DEF, nfg_pkg::C1W_DEF, nfg_pkg::LW_DEF,
              nfg_pkg::YI_DEF, nfg_pkg::GUARD_DEF, 1'b1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // No output may appear before anything is issued.
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("output without input"); end

    for (int f = 0; f < NUM_FUNCS; f++) begin
      func_e fid;
      fid = func_e'(f);
      checks++;
      if (!gen.build(fid, AAE)) begin
        failures++;
        $display("%s: tables do not fit (%0d segments, %0d before halving): %s",
                 f_name(fid), gen.ends.size(), gen.t_raw, gen.why);
        continue;
      end
      if (gen.ends.size() > gen.t_raw) n_split++;
      if (n_funcs > 0) n_reload++;
      n_funcs++;
      load_tables();
      max_err_g = 0.0; max_err_f = 0.0;
      checking = 1'b1;
      // Segment ends and their successors, back to back.
      for (int i = 0; i < gen.ends.size(); i++) begin
        issue(gen.ends[i]);
        if (gen.ends[i] + 1 <= gen.b_code) issue(gen.ends[i] + 1);
      end
      issue(gen.a_code);
      idle(3);
      // Random codes of the domain.
      for (int j = 0; j < 400; j++) begin
        longint span;
        span = gen.b_code - gen.a_code + 1;
        issue(gen.a_code + longint'({$urandom, $urandom} % 64'(span)));
        if (j % 97 == 96) idle(2);
      end
      idle(LATENCY + 4);
      checking = 1'b0;
      checks++;
      if (q_x.size() != 0) begin
        failures++;
        $display("%s: %0d outputs missing", f_name(fid), q_x.size());
        q_x.delete(); q_edge.delete();
      end
      $display("%-14s segments %4d (before halving %4d, published %4s), max classes %4d, tailored memory %7d bits, max|y-g| = 2^%0.1f, max|y-f| = 2^%0.1f",
               f_name(fid), gen.ends.size(), gen.t_raw, $sformatf("%0d", paper_segments(fid, 1'b1)),
               gen.max_classes, gen.tailored_bits(), $ln(max_err_g + 1e-30) / $ln(2.0), $ln(max_err_f + 1e-30) / $ln(2.0));
    end

    $display("sqrt(-ln x) within 2^-12 of x = 1: max|y-f| = 2^%0.1f", $ln(max_err_sing + 1e-30) / $ln(2.0));
    $display("mechanisms: scaled=%0d neg_d=%0d split=%0d reload=%0d back_to_back=%0d gaps=%0d",
             n_scaled, n_neg_d, n_split, n_reload, n_b2b, n_gap);
    checks++; if (n_scaled == 0) begin failures++; $display("scaling never used");    end
    checks++; if (n_neg_d == 0)  begin failures++; $display("x - q never negative");   end
    checks++; if (n_split == 0)  begin failures++; $display("no segment halved");      end
    checks++; if (n_reload == 0) begin failures++; $display("no table reload");        end
    checks++; if (n_b2b == 0)    begin failures++; $display("no back-to-back run");    end
    checks++; if (n_gap == 0)    begin failures++; $display("no idle gap");            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
