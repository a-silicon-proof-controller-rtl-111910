// tb_spi_flash_boot: the GPC bootloader against a behavioural SPI flash.
//
// Checks that after reset instruction page 0 loads by itself and boot_done
// rises; that every word written matches the flash bytes (little-endian
// packing) at the right instruction or data word address; that requests are
// refused while busy; that each on-demand page (random page numbers, both
// memories) is read from the right flash address and signalled with
// req_done; and that one page takes (32 + 8*PAGE_BYTES)*2*HALF_DIV + 2
// clocks from acceptance to req_done. Runs with small pages and HALF_DIV=2.
module tb_spi_flash_boot;
  localparam int PAGE_BYTES = 16;
  localparam int HALF_DIV   = 2;
  localparam logic [23:0] DBASE = 24'h01_8000;
  localparam int PAGE_CYCLES = (32 + 8 * PAGE_BYTES) * 2 * HALF_DIV + 2;

  logic        clk = 0, rst_n = 0;
  logic        req_valid = 0, req_ready, req_dmem = 0, req_done, boot_done, busy;
  logic [8:0]  req_page = 0;
  logic        mem_we, mem_dmem;
  logic [14:0] mem_addr;
  logic [31:0] mem_wdata;
  logic        spi_sck, spi_cs_n, spi_mosi, spi_miso;
  int checks = 0, failures = 0;
  int words = 0;

  spi_flash_boot #(.PAGE_BYTES(PAGE_BYTES), .HALF_DIV(HALF_DIV), .DMEM_FLASH_BASE(DBASE)) dut (.*);
  spi_flash_model flash (.sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected page being loaded
  logic        exp_dmem;
  int          exp_page;

  always @(negedge clk) if (mem_we) begin
    int          widx;
    logic [23:0] fa;
    logic [31:0] ew;
    widx = int'(mem_addr) - exp_page * (PAGE_BYTES / 4);
    fa = (exp_dmem ? DBASE : 24'h0) + 24'(exp_page * PAGE_BYTES + widx * 4);
    ew = {flash.flash_byte(fa + 3), flash.flash_byte(fa + 2), flash.flash_byte(fa + 1), flash.flash_byte(fa)};
    chk(mem_dmem == exp_dmem, "target memory");
    chk(widx >= 0 && widx < PAGE_BYTES / 4, "word address inside page");
    chk(mem_wdata == ew, "word data");
    words++;
  end

  initial begin
    int t0, n;
    exp_dmem = 0;
    exp_page = 0;
    repeat (3) @(negedge clk);
    chk(spi_cs_n && !boot_done && !mem_we, "idle in reset");
    rst_n = 1;
    @(negedge clk);
    chk(!req_ready && busy, "not ready during power-up load");
    while (!boot_done) @(negedge clk);
    chk(words == PAGE_BYTES / 4, "boot page word count");
    chk(flash.reads == 1 && flash.last_addr == 24'h0, "boot page flash address");
    chk(spi_cs_n, "chip select released");
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      exp_dmem = $urandom_range(0, 1);
      exp_page = $urandom_range(0, 511);
      req_valid = 1; req_dmem = exp_dmem; req_page = 9'(exp_page);
      chk(req_ready, "ready when idle");
      @(negedge clk);
      req_valid = 0;
      t0 = $time;
      n = words;
      // requests are not accepted while loading
      chk(!req_ready && busy, "busy while loading");
      while (!req_done) @(negedge clk);
      chk(($time - t0) / 10 + 1 == PAGE_CYCLES, "cycles per page");
      chk(words - n == PAGE_BYTES / 4, "words per page");
      chk(flash.last_addr == (exp_dmem ? DBASE : 24'h0) + 24'(exp_page * PAGE_BYTES), "flash address");
      chk(boot_done, "boot_done stays high");
    end
    chk(flash.reads == 31 && flash.bad_cmds == 0, "one READ command per page");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
