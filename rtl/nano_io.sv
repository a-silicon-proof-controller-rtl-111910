// nano_io: memory-mapped I/O of the NanoController.
//
// Occupies data addresses 16..31 (the core's upper half of the data space).
//   16 GPIO_IN   read   GPIO/sensor inputs, synchronised by two flip-flops
//   17 STATUS    read   bit0 shut-down request from the GPC (synchronised),
//                       bit1 GPC domain on, bit2 GPC power sequence busy
//   24 GPIO_OUT  r/w    GPIO output register
//   25 PWR_CMD   r/w    bit0 = request the GPC domain to be powered on
// Other addresses read 0 and ignore writes. Reads are combinational, writes
// take effect at the clock edge; output registers reset to 0 (GPC off).
//
// The published system lets the NanoController read sensors, receive the
// GPC's shut-down requests and send on/off commands to the power
// management; the register map is this design's own.
module nano_io
  import nano_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // bus from the core
  input  logic [DA_W-1:0] addr,
  input  logic            we,
  input  logic [DW-1:0]   wdata,
  output logic [DW-1:0]   rdata,
  // pins and system signals
  input  logic [DW-1:0]   gpio_in,        // asynchronous
  input  logic            gpc_sd_req,     // asynchronous, from the GPC domain
  input  logic            gpc_on,         // from the power handshake
  input  logic            gpc_busy,       // from the power handshake
  output logic [DW-1:0]   gpio_out,
  output logic            pwr_cmd
);

  logic [DW-1:0] gpio_in_s;
  logic          sd_req_s;

  for (genvar i = 0; i < DW; i++) begin : g_sync
    sync_2ff u_sync (.clk(clk), .rst_n(rst_n), .d(gpio_in[i]), .q(gpio_in_s[i]));
  end
  sync_2ff u_sync_sd (.clk(clk), .rst_n(rst_n), .d(gpc_sd_req), .q(sd_req_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpio_out <= '0;
      pwr_cmd  <= 1'b0;
    end else if (we) begin
      if (addr == IO_GPIO_OUT) gpio_out <= wdata;
      if (addr == IO_PWR_CMD)  pwr_cmd  <= wdata[0];
    end
  end

  always_comb begin
    unique case (addr)
      IO_GPIO_IN:  rdata = gpio_in_s;
      IO_STATUS:   rdata = {5'b0, gpc_busy, gpc_on, sd_req_s};
      IO_GPIO_OUT: rdata = gpio_out;
      IO_PWR_CMD:  rdata = {7'b0, pwr_cmd};
      default:     rdata = '0;
    endcase
  end

endmodule
