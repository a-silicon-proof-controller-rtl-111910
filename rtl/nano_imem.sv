// nano_imem: instruction memory of the NanoController, built as a
// standard-cell memory (an array of flip-flops with a read multiplexer).
//
// Default size is 128 nibbles of 4 bits = 64 B, one instruction nibble per
// word, as in the published prototype. Reading is combinational (the
// multiplexer after the flip-flops), so the control unit sees the nibble at
// raddr in the same cycle. Writing is synchronous and serves program loading
// while the core is held; there is no reset (the program is always loaded
// before the core runs). The load port is this design's own choice.
module nano_imem #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
