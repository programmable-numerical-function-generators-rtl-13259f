// One LUT of the segment index encoder's LUT cascade.
//
// The LUT is a synchronous memory: the address is the concatenation of the
// rails coming from the previous LUT and a group of input bits, the data is
// the rails going to the next LUT (or the segment index, for the last LUT).
// Building the LUTs as synchronous memory blocks follows the architecture's
// FPGA mapping; the write port, through which the contents are loaded, is this
// implementation's choice (the contents depend on the function realised).
//
// Interface: addr is read on every rising clk edge and rdata holds the word
// one cycle later. A write (we high) to waddr takes effect at the same edge;
// a read of the same address in that cycle returns the old word.
module cascade_lut #(
  parameter int unsigned AW = 8,   // address bits: rails in + input bits
  parameter int unsigned DW = 4    // data bits: rails out
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
