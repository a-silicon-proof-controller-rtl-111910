// nano_dmem: data memory of the NanoController, a 16-byte standard-cell
// memory (flip-flop array).
//
// One port: combinational read of the byte at addr, synchronous write when
// we is high. A read-modify-write instruction therefore reads the old value
// and writes the new one in the same cycle. The memory has no reset; programs
// initialise the bytes they use. Size follows the published prototype; the
// port timing is this design's own choice.
module nano_dmem #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
