// nc_soc_top: heterogeneous controller system for energy-harvesting devices.
//
// Two power domains. The always-on domain holds the NanoController, a tiny
// programmable controller clocked slowly (32 kHz in the intended use), and
// the power-gating handshake. The on/off domain holds the general-purpose
// controller (GPC) with its 96 KiB instruction and 128 KiB data SRAMs and a
// hardware bootloader that fills them from an external SPI flash after every
// power-up. The NanoController program watches sensors and the GPC's
// shut-down request and switches the GPC domain on and off through the power
// management, so the large GPC only runs for rare, complex events.
//
// Outside this module (ports): the GPC processor core (memory ports,
// shut-down request, page-request port), the analog power switch
// (pwr_en/pwr_good), the SPI flash and the two clocks.
//
// Cross-domain signals: the GPC shut-down request is clamped to 0 while the
// domain is isolated and synchronised into the NanoController clock; the
// GPC-domain reset is released synchronously to gpc_clk. gpc_core_rst_n
// holds the core in reset until the bootloader has loaded the first page.
// SRAM access: bootloader writes take priority over the core's accesses; the
// core waits for req_done before using a page it requested.
//
// Domain split, memory sizes and the role of each part follow the published
// system; signal-level interfaces are this design's own choices.
module nc_soc_top
  import nano_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 24576,   // 96 KiB of 32-bit words
  parameter int unsigned DMEM_WORDS = 32768,   // 128 KiB of 32-bit words
  parameter int unsigned PAGE_BYTES = 256,
  parameter int unsigned HALF_DIV   = 1,
  parameter int unsigned RST_HOLD   = 2,
  localparam int unsigned MEM_AW    = $clog2((IMEM_WORDS > DMEM_WORDS) ? IMEM_WORDS : DMEM_WORDS),
  localparam int unsigned IAW       = $clog2(IMEM_WORDS),
  localparam int unsigned DAW       = $clog2(DMEM_WORDS)
) (
  // always-on domain
  input  logic            nano_clk,
  input  logic            nano_rst_n,
  input  logic            nano_run,
  input  logic            prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  logic [IW-1:0]   prog_data,
  input  logic [DW-1:0]   gpio_in,
  output logic [DW-1:0]   gpio_out,
  output logic            nano_retire,
  // power management
  output logic            pm_pwr_en,
  input  logic            pm_pwr_good,
  output logic            gpc_iso_en,
  output logic            gpc_on,
  // on/off domain: clock and reset of the GPC core
  input  logic            gpc_clk,
  output logic            gpc_core_rst_n,
  input  logic            gpc_sd_req,
  // GPC core page requests to the bootloader
  input  logic            gpc_page_req_valid,
  output logic            gpc_page_req_ready,
  input  logic            gpc_page_req_dmem,
  input  logic [8:0]      gpc_page_req_page,
  output logic            gpc_page_req_done,
  output logic            gpc_boot_done,
  // GPC core instruction SRAM port
  input  logic            gpc_imem_en,
  input  logic [IAW-1:0]  gpc_imem_addr,
  output logic [31:0]     gpc_imem_rdata,
  // GPC core data SRAM port
  input  logic            gpc_dmem_en,
  input  logic            gpc_dmem_we,
  input  logic [DAW-1:0]  gpc_dmem_addr,
  input  logic [31:0]     gpc_dmem_wdata,
  output logic [31:0]     gpc_dmem_rdata,
  // SPI flash
  output logic            flash_sck,
  output logic            flash_cs_n,
  output logic            flash_mosi,
  input  logic            flash_miso
);

  // ---------------- always-on domain ----------------
  logic pwr_cmd, pwr_busy, gpc_dom_rst_n;
  logic sd_req_iso;

  assign sd_req_iso = gpc_sd_req && !gpc_iso_en;

  nano_controller u_nano (
    .clk        (nano_clk),
    .rst_n      (nano_rst_n),
    .run        (nano_run),
    .prog_we, .prog_addr, .prog_data,
    .gpio_in,
    .gpc_sd_req (sd_req_iso),
    .gpc_on     (gpc_on),
    .gpc_busy   (pwr_busy),
    .gpio_out,
    .pwr_cmd    (pwr_cmd),
    .retire     (nano_retire),
    .retire_op  ()
  );

  gpc_pwr_ctrl #(.RST_HOLD(RST_HOLD)) u_pwr (
    .clk       (nano_clk),
    .rst_n     (nano_rst_n),
    .on_cmd    (pwr_cmd),
    .pwr_good  (pm_pwr_good),
    .pwr_en    (pm_pwr_en),
    .iso_en    (gpc_iso_en),
    .gpc_rst_n (gpc_dom_rst_n),
    .gpc_on    (gpc_on),
    .busy      (pwr_busy)
  );

  // ---------------- on/off domain ----------------
  logic gpc_rst_sync_n;

  sync_2ff u_rst_sync (.clk(gpc_clk), .rst_n(gpc_dom_rst_n), .d(1'b1), .q(gpc_rst_sync_n));

  logic              bl_we, bl_dmem;
  logic [MEM_AW-1:0] bl_addr;
  logic [31:0]       bl_wdata;
  logic              bl_busy;

  spi_flash_boot #(
    .PAGE_BYTES (PAGE_BYTES),
    .PAGE_W     (9),
    .MEM_AW     (MEM_AW),
    .HALF_DIV   (HALF_DIV),
    .DMEM_FLASH_BASE (24'(IMEM_WORDS * 4))
  ) u_boot (
    .clk       (gpc_clk),
    .rst_n     (gpc_rst_sync_n),
    .req_valid (gpc_page_req_valid),
    .req_ready (gpc_page_req_ready),
    .req_dmem  (gpc_page_req_dmem),
    .req_page  (gpc_page_req_page),
    .req_done  (gpc_page_req_done),
    .boot_done (gpc_boot_done),
    .busy      (bl_busy),
    .mem_we    (bl_we),
    .mem_dmem  (bl_dmem),
    .mem_addr  (bl_addr),
    .mem_wdata (bl_wdata),
    .spi_sck   (flash_sck),
    .spi_cs_n  (flash_cs_n),
    .spi_mosi  (flash_mosi),
    .spi_miso  (flash_miso)
  );

  assign gpc_core_rst_n = gpc_rst_sync_n && gpc_boot_done;

  // instruction SRAM: bootloader write or core read
  logic           im_wr;
  logic           im_cen_n, im_wen_n;
  logic [IAW-1:0] im_a;

  assign im_wr    = bl_we && !bl_dmem;
  assign im_cen_n = !(im_wr || gpc_imem_en);
  assign im_wen_n = !im_wr;
  assign im_a     = im_wr ? IAW'(bl_addr) : gpc_imem_addr;

  sram_sp #(.WORDS(IMEM_WORDS), .W(32)) u_imem (
    .clk   (gpc_clk),
    .cen_n (im_cen_n),
    .wen_n (im_wen_n),
    .a     (im_a),
    .d     (bl_wdata),
    .q     (gpc_imem_rdata)
  );

  // data SRAM: bootloader write or core access
  logic           dm_wr;
  logic           dm_cen_n, dm_wen_n;
  logic [DAW-1:0] dm_a;
  logic [31:0]    dm_d;

  assign dm_wr    = bl_we && bl_dmem;
  assign dm_cen_n = !(dm_wr || gpc_dmem_en);
  assign dm_wen_n = !(dm_wr || gpc_dmem_we);
  assign dm_a     = dm_wr ? DAW'(bl_addr) : gpc_dmem_addr;
  assign dm_d     = dm_wr ? bl_wdata : gpc_dmem_wdata;

  sram_sp #(.WORDS(DMEM_WORDS), .W(32)) u_dmem (
    .clk   (gpc_clk),
    .cen_n (dm_cen_n),
    .wen_n (dm_wen_n),
    .a     (dm_a),
    .d     (dm_d),
    .q     (gpc_dmem_rdata)
  );

endmodule
