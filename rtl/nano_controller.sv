// nano_controller: the complete NanoController of the always-on domain.
//
// Ties the control unit and data path (nano_core) to a 128-nibble (64 B)
// standard-cell instruction memory, a 16-byte standard-cell data memory and
// the memory-mapped I/O block. Data addresses 0..15 select the data memory,
// 16..31 the I/O registers.
//
// Program loading: with run=0 the core is held and prog_we/prog_addr/prog_data
// write instruction nibbles; raise run to start at address 0 (after reset).
// gpio_in and gpc_sd_req may change at any time (they are synchronised);
// gpc_on/gpc_busy come from the power handshake in the same clock domain.
//
// Memory sizes and the partitioning follow the published prototype; the
// load port and address map are this design's own choices.
module nano_controller
  import nano_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  logic [IW-1:0]   prog_data,
  input  logic [DW-1:0]   gpio_in,
  input  logic            gpc_sd_req,
  input  logic            gpc_on,
  input  logic            gpc_busy,
  output logic [DW-1:0]   gpio_out,
  output logic            pwr_cmd,
  output logic            retire,
  output opcode_t         retire_op
);

  logic [PC_W-1:0] i_addr;
  logic [IW-1:0]   i_data;
  logic [DA_W-1:0] d_addr;
  logic            d_we;
  logic [DW-1:0]   d_wdata, d_rdata, dm_rdata, io_rdata;
  logic [DW-1:0]   acc;
  logic            flag_z, flag_c;
  logic            sel_io;

  assign sel_io = d_addr[DA_W-1];

  nano_core u_core (
    .clk, .rst_n, .run,
    .i_addr, .i_data,
    .d_addr, .d_we, .d_wdata, .d_rdata,
    .retire, .retire_op,
    .acc, .flag_z, .flag_c
  );

  nano_imem #(.DEPTH(IMEM_NIB), .W(IW)) u_imem (
    .clk,
    .we    (prog_we && !run),
    .waddr (prog_addr),
    .wdata (prog_data),
    .raddr (i_addr),
    .rdata (i_data)
  );

  nano_dmem #(.DEPTH(DMEM_BYTE), .W(DW)) u_dmem (
    .clk,
    .we    (d_we && !sel_io),
    .addr  (d_addr[DA_W-2:0]),
    .wdata (d_wdata),
    .rdata (dm_rdata)
  );

  nano_io u_io (
    .clk, .rst_n,
    .addr     (d_addr),
    .we       (d_we && sel_io),
    .wdata    (d_wdata),
    .rdata    (io_rdata),
    .gpio_in, .gpc_sd_req, .gpc_on, .gpc_busy,
    .gpio_out, .pwr_cmd
  );

  assign d_rdata = sel_io ? io_rdata : dm_rdata;

endmodule
