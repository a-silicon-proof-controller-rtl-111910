// soc_door_lock_env: system-level test environment for nc_soc_top, shared by
// the end-to-end testbenches (tb_nc_soc_top, tb_door_lock_32k).
//
// It instantiates the top at its default (full) sizes and surrounds it with
// a power-switch model, an SPI flash model and a small behavioural stand-in
// for the GPC core. The NanoController runs the door-lock program
// (nano_app_pkg). After each power-up the GPC stand-in checks instruction
// words loaded by the bootloader, requests one data page on demand and checks
// it, writes and reads the data SRAM, and then (in two of every three
// sessions) raises its shut-down request; otherwise it stays silent and the
// NanoController's time-out must switch it off. Proximity events are
// generated by the test; the reaction time from the sensor to the power
// enable is checked against MAX_LATENCY and the powered time per session is
// reported.
//
// Counted mechanisms, each of which must occur: proximity events, power-up
// sequences, boot loads after power-up, on-demand page loads, power-off on
// shut-down request, power-off on time-out, RTC steps, and cycles in which
// the isolated domain's shut-down request was clamped.
module soc_door_lock_env #(
  parameter int NANO_HALF_NS = 160,   // always-on clock half period
  parameter int GPC_HALF_NS  = 5,     // GPC clock half period
  parameter int SESSIONS     = 6,
  parameter int TICKS        = 3,     // door-lock program: loop passes per RTC second
  parameter int MAX_LATENCY  = 60,    // proximity -> pwr_en, always-on cycles
  parameter int IDLE_CYCLES  = 300    // always-on cycles between sessions
);
  import nano_pkg::*;
  import nano_ref_pkg::*;
  import nano_app_pkg::*;

  localparam int IMEM_WORDS = 24576;
  localparam int PAGE_BYTES = 256;
  localparam logic [23:0] DBASE = 24'(IMEM_WORDS * 4);

  logic            nano_clk = 0, nano_rst_n = 0, nano_run = 0;
  logic            prog_we = 0;
  logic [PC_W-1:0] prog_addr = 0;
  logic [IW-1:0]   prog_data = 0;
  logic [DW-1:0]   gpio_in = 0, gpio_out;
  logic            nano_retire;
  logic            pm_pwr_en, pm_pwr_good = 0, gpc_iso_en, gpc_on;
  logic            gpc_clk = 0, gpc_core_rst_n, gpc_sd_req = 0;
  logic            gpc_page_req_valid = 0, gpc_page_req_ready, gpc_page_req_dmem = 0;
  logic [8:0]      gpc_page_req_page = 0;
  logic            gpc_page_req_done, gpc_boot_done;
  logic            gpc_imem_en = 0;
  logic [14:0]     gpc_imem_addr = 0;
  logic [31:0]     gpc_imem_rdata;
  logic            gpc_dmem_en = 0, gpc_dmem_we = 0;
  logic [14:0]     gpc_dmem_addr = 0;
  logic [31:0]     gpc_dmem_wdata = 0, gpc_dmem_rdata;
  logic            flash_sck, flash_cs_n, flash_mosi, flash_miso;

  int checks = 0, failures = 0;
  int n_events = 0, n_powerups = 0, n_boots = 0, n_demand = 0;
  int n_sd_off = 0, n_to_off = 0, n_rtc = 0, n_clamped = 0;

  nc_soc_top dut (.*);
  spi_flash_model flash (.sck(flash_sck), .cs_n(flash_cs_n), .mosi(flash_mosi), .miso(flash_miso));

  always #(NANO_HALF_NS * 1ns) nano_clk = ~nano_clk;
  always #(GPC_HALF_NS * 1ns)  gpc_clk  = ~gpc_clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge nano_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- power switch model: pwr_good follows pwr_en after a few cycles ----
  initial forever begin
    @(negedge nano_clk);
    if (pm_pwr_en != pm_pwr_good) begin
      repeat ($urandom_range(2, 6)) @(negedge nano_clk);
      pm_pwr_good = pm_pwr_en;
    end
  end

  // ---- monitors ----
  logic prev_en = 0, prev_boot = 0, prev_sec_valid = 0;
  logic [7:0] prev_sec = 0;
  always @(negedge nano_clk) begin
    if (!prev_en && pm_pwr_en) n_powerups++;
    prev_en = pm_pwr_en;
    if (gpc_sd_req && gpc_iso_en) n_clamped++;
    if (nano_run) begin
      if (prev_sec_valid && dut.u_nano.u_dmem.mem[1] != prev_sec) n_rtc++;
      prev_sec = dut.u_nano.u_dmem.mem[1];
      prev_sec_valid = 1;
    end
  end
  always @(negedge gpc_clk) begin
    if (!prev_boot && gpc_boot_done) n_boots++;
    prev_boot = gpc_boot_done;
    chk(!(gpc_core_rst_n && (gpc_iso_en || !pm_pwr_good)), "GPC runs only powered and connected");
  end

  function automatic logic [31:0] flash_word(logic [23:0] a);
    return {flash.flash_byte(a + 3), flash.flash_byte(a + 2), flash.flash_byte(a + 1), flash.flash_byte(a)};
  endfunction

  // ---- behavioural GPC core ----
  bit gpc_answers = 1;   // raise a shut-down request when finished
  initial forever begin
    int page, w;
    logic [31:0] v;
    @(negedge gpc_clk);
    if (gpc_core_rst_n) begin
      // instruction words of page 0, loaded at power-up
      for (int k = 0; k < 8; k++) begin
        w = $urandom_range(0, PAGE_BYTES / 4 - 1);
        gpc_imem_en = 1; gpc_imem_addr = 15'(w);
        @(negedge gpc_clk);
        gpc_imem_en = 0;
        chk(gpc_imem_rdata == flash_word(24'(w * 4)), "instruction word from boot page");
      end
      // data page on demand
      page = $urandom_range(0, 511);
      gpc_page_req_valid = 1; gpc_page_req_dmem = 1; gpc_page_req_page = 9'(page);
      while (!gpc_page_req_ready) @(negedge gpc_clk);
      @(negedge gpc_clk);
      gpc_page_req_valid = 0;
      while (!gpc_page_req_done) @(negedge gpc_clk);
      n_demand++;
      for (int k = 0; k < 8; k++) begin
        w = $urandom_range(0, PAGE_BYTES / 4 - 1);
        gpc_dmem_en = 1; gpc_dmem_addr = 15'(page * (PAGE_BYTES / 4) + w);
        @(negedge gpc_clk);
        gpc_dmem_en = 0;
        chk(gpc_dmem_rdata == flash_word(DBASE + 24'(page * PAGE_BYTES + w * 4)), "data word from demand page");
      end
      // the core's own data access
      v = $urandom;
      gpc_dmem_en = 1; gpc_dmem_we = 1; gpc_dmem_addr = 15'(32767); gpc_dmem_wdata = v;
      @(negedge gpc_clk);
      gpc_dmem_we = 0;
      @(negedge gpc_clk);
      gpc_dmem_en = 0;
      chk(gpc_dmem_rdata == v, "data SRAM write/read by the core");
      if (gpc_answers) gpc_sd_req = 1;
      while (gpc_core_rst_n) @(negedge gpc_clk);
      // the model leaves its request high while the domain is off;
      // isolation must keep it away from the NanoController
      repeat (2000) @(negedge gpc_clk);
      gpc_sd_req = 0;
    end
  end

  initial begin
    logic [3:0] p[128];
    int t, max_lat;
    realtime t_on;
    real on_ns[SESSIONS];
    max_lat = 0;
    build_door_lock(TICKS, 255);
    chk(code.size() <= 128, "program fits");
    foreach (p[i]) p[i] = (i < code.size()) ? code[i] : 4'h0;
    for (int i = 0; i < 128; i++) begin
      @(negedge nano_clk);
      prog_we = 1; prog_addr = 7'(i); prog_data = p[i];
    end
    @(negedge nano_clk);
    prog_we = 0;
    nano_rst_n = 1;
    @(negedge nano_clk);
    nano_run = 1;
    repeat (200) @(negedge nano_clk);
    chk(!pm_pwr_en && gpc_iso_en && !gpc_core_rst_n, "GPC domain off by default");
    for (int s = 0; s < SESSIONS; s++) begin
      gpc_answers = (s % 3 != 2);
      // proximity event
      gpio_in = 8'h01;
      n_events++;
      t = 0;
      while (!pm_pwr_en && t < 500) begin @(negedge nano_clk); t++; end
      chk(pm_pwr_en, "power-up after proximity event");
      chk(t <= MAX_LATENCY, "reaction time to a proximity event");
      if (t > max_lat) max_lat = t;
      t_on = $realtime;
      gpio_in = 8'h00;
      t = 0;
      while (!gpc_core_rst_n && t < 2000) begin @(negedge nano_clk); t++; end
      chk(gpc_core_rst_n, "GPC released after boot");
      t = 0;
      while ((pm_pwr_en || dut.u_pwr.busy) && t < 8000) begin @(negedge nano_clk); t++; end
      chk(!pm_pwr_en && gpc_iso_en, "GPC domain switched off");
      on_ns[s] = ($realtime - t_on) / 1ns;
      if (gpio_out == 8'h40) n_sd_off++;
      if (gpio_out == 8'h80) n_to_off++;
      chk(gpio_out == (gpc_answers ? 8'h40 : 8'h80), "power-off reason");
      repeat (IDLE_CYCLES) @(negedge nano_clk);
      chk(!pm_pwr_en, "stays off with the request clamped");
    end
    chk(dut.u_nano.u_dmem.mem[3] == 8'(SESSIONS), "events counted by the program");
    chk(n_events > 0,    "mechanism: proximity event");
    chk(n_powerups == SESSIONS, "mechanism: power-up per event");
    chk(n_boots == SESSIONS, "mechanism: boot load after each power-up");
    chk(n_demand == SESSIONS, "mechanism: on-demand page load");
    chk(n_sd_off > 0,    "mechanism: power-off on shut-down request");
    chk(n_to_off > 0,    "mechanism: power-off on time-out");
    chk(n_rtc > 0,       "mechanism: RTC advances");
    chk(n_clamped > 0,   "mechanism: isolation clamp");
    $display("events=%0d powerups=%0d boots=%0d demand=%0d sd_off=%0d timeout_off=%0d rtc=%0d clamped=%0d",
             n_events, n_powerups, n_boots, n_demand, n_sd_off, n_to_off, n_rtc, n_clamped);
    $display("worst reaction time %0d always-on cycles (%0.1f us)", max_lat, max_lat * 2.0 * NANO_HALF_NS / 1000.0);
    for (int s = 0; s < SESSIONS; s++)
      $display("session %0d: GPC domain powered for %0.1f us (%0s)", s, on_ns[s] / 1000.0,
               (s % 3 != 2) ? "shut-down request" : "time-out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
