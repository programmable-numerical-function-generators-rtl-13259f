// Unit test of one cascade LUT: fills every word through the write port,
// reads them back in random order checking the one-cycle read latency, and
// checks that a read of the word being written returns the old contents.
module tb_cascade_lut;
  localparam int AW = 6, DW = 5;

  logic clk = 1'b0;
  logic [AW-1:0] addr, waddr;
  logic [DW-1:0] rdata, wdata;
  logic we;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  cascade_lut #(.AW(AW), .DW(DW)) dut (.clk, .addr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = DW'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int j = 0; j < 500; j++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      @(negedge clk); addr = a;
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("addr %0d: read %0h expected %0h", a, rdata, model[a]);
      end
    end
    // Write and read the same word in one cycle: old value first.
    for (int j = 0; j < 50; j++) begin
      logic [AW-1:0] a;
      logic [DW-1:0] old;
      a = AW'($urandom);
      old = model[a];
      @(negedge clk);
      we = 1'b1; waddr = a; wdata = ~old; addr = a; model[a] = ~old;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata !== old) begin failures++; $display("read during write wrong"); end
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("write lost"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
