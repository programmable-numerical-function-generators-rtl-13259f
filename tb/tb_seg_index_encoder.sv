// Unit test of the segment index encoder at a reduced size (12-bit input,
// three 4-bit LUTs). For several random monotone segmentations, the LUT
// contents are generated by the table generator, loaded, and every input code
// is streamed through back to back; each index is compared with a direct
// search of the segment ends, and the latency (N_CAS cycles) and the delayed
// copy of x are checked.
module tb_seg_index_encoder;
  import nfg_tb_pkg::*;

  localparam int N = 12, NCAS = 3, K = 5, R = 6, G = N / NCAS;
  localparam int SW = $clog2(NCAS);

  logic clk = 1'b0, rst_n;
  logic in_valid, out_valid;
  logic [N-1:0] x, x_out;
  logic [K-1:0] idx;
  logic wr_en;
  logic [SW-1:0] wr_lut;
  logic [R+G-1:0] wr_addr;
  logic [R-1:0] wr_data;
  int checks = 0, failures = 0;
  longint cycle = 0;

  seg_index_encoder #(.N(N), .N_CAS(NCAS), .K(K), .R(R)) dut (
    .clk, .rst_n, .in_valid, .x, .out_valid, .idx, .x_out,
    .wr_en, .wr_lut, .wr_addr, .wr_data);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  nfg_gen gen;
  longint qx[$], qe[$];

  always @(negedge clk) if (out_valid) begin
    longint xc, e0;
    xc = qx.pop_front(); e0 = qe.pop_front();
    checks++;
    if (int'(idx) != gen.seg_of_u(xc) || x_out != N'(xc) || cycle - e0 + 1 != NCAS) begin
      failures++;
      if (failures < 10)
        $display("x=%0h idx=%0d expected %0d, x_out=%0h, latency %0d",
                 xc, idx, gen.seg_of_u(xc), x_out, cycle - e0 + 1);
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    wr_en = 1'b0; wr_lut = '0; wr_addr = '0; wr_data = '0;
    gen = new(N, 10, K, NCAS, R, 18, 18, 6, 3, 4, 1'b1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 6; trial++) begin
      int t;
      longint e;
      t = (trial == 0) ? 1 : 2 + ($urandom % ((1 << K) - 1));
      gen.ends.delete();
      e = -1;
      for (int i = 0; i < t - 1; i++) begin
        e = e + 1 + longint'($urandom % 64);
        if (e >= (1 << (N - 1)) - 1) break;
        gen.ends.push_back(e);
      end
      gen.ends.push_back((1 << (N - 1)) - 1);
      gen.ok = 1;
      gen.cascade();
      checks++;
      if (!gen.ok) begin failures++; $display("cascade needs %s", gen.why); end
      for (int i = 0; i < gen.lut_sel.size(); i++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_lut = SW'(gen.lut_sel[i]);
        wr_addr = (R+G)'(gen.lut_addr[i]); wr_data = R'(gen.lut_data[i]);
      end
      @(negedge clk); wr_en = 1'b0;
      for (longint c = 0; c < (1 << N); c++) begin
        @(negedge clk);
        in_valid = 1'b1; x = N'(c);
        qx.push_back(c); qe.push_back(cycle + 1);
      end
      @(negedge clk); in_valid = 1'b0;
      repeat (NCAS + 2) @(negedge clk);
      checks++;
      if (qx.size() != 0) begin failures++; $display("missing outputs"); qx.delete(); qe.delete(); end
      $display("trial %0d: %0d segments, %0d rail classes", trial, gen.ends.size(), gen.max_classes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
