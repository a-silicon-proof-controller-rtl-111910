// sram_sp: behavioural model of a single-port SRAM macro of the GPC domain.
//
// This is a simulation model standing in for the vendor macros, not a
// memory to be synthesised: the real parts are a 96 KiB instruction SRAM and
// a 128 KiB data SRAM with 32-bit words. Ports follow the usual macro style:
// active-low chip enable cen_n and write enable wen_n, address a, write data
// d, read data q registered at the clock edge (one cycle read latency).
// A write leaves q unchanged. Contents are undefined after power-up.
module sram_sp #(
  parameter int unsigned WORDS = 24576,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          cen_n,
  input  logic          wen_n,
  input  logic [AW-1:0] a,
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (!cen_n) begin
      if (!wen_n) mem[a] <= d;
      else        q      <= mem[a];
    end
  end

endmodule
