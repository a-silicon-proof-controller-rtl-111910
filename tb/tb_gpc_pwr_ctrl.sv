// tb_gpc_pwr_ctrl: the power-gating handshake. A model of the power switch
// raises pwr_good a random delay after pwr_en rises and drops it a random
// delay after pwr_en falls. The test switches the domain on and off many
// times, with on_cmd sometimes dropped during power-up, and checks:
// the OFF state after reset; the order pwr_en -> isolation off -> reset
// release on the way up and reset -> isolation -> pwr_en off on the way down;
// that the GPC is never out of reset while unpowered or isolated; that
// pwr_good is waited for; that the reset is held RST_HOLD cycles after
// isolation is released; and the gpc_on and busy status bits.
module tb_gpc_pwr_ctrl;
  localparam int RST_HOLD = 2;

  logic clk = 0, rst_n = 0;
  logic on_cmd = 0, pwr_good = 0;
  logic pwr_en, iso_en, gpc_rst_n, gpc_on, busy;
  int checks = 0, failures = 0;
  int ups = 0, downs = 0;

  gpc_pwr_ctrl #(.RST_HOLD(RST_HOLD)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // power switch model
  initial begin : pm
    forever begin
      @(negedge clk);
      if (pwr_en && !pwr_good) begin
        repeat ($urandom_range(1, 8)) @(negedge clk);
        if (pwr_en) pwr_good = 1;
      end else if (!pwr_en && pwr_good) begin
        repeat ($urandom_range(1, 8)) @(negedge clk);
        if (!pwr_en) pwr_good = 0;
      end
    end
  end

  // invariant and order monitor, sampled each cycle
  logic prev_iso = 1, prev_rst_n = 0, prev_en = 0;
  int   uniso_cycles = 0;
  always @(negedge clk) if (rst_n) begin
    chk(!gpc_rst_n || (pwr_en && !iso_en && pwr_good), "running only when powered and not isolated");
    chk(gpc_on == gpc_rst_n, "gpc_on matches reset release");
    chk(!(busy && gpc_on), "not busy when on");
    chk(!(pwr_en && !gpc_on) || busy, "busy while powering up or down");
    if (prev_iso && !iso_en) begin
      chk(pwr_en && pwr_good, "isolation released only after power good");
      uniso_cycles = 0;
    end
    if (!iso_en && !gpc_rst_n) uniso_cycles++;
    if (!prev_rst_n && gpc_rst_n) begin
      ups++;
      chk(uniso_cycles == RST_HOLD + 1, "reset held after isolation release");
    end
    if (!prev_iso && iso_en) chk(!gpc_rst_n && !prev_rst_n, "reset before isolation");
    if (prev_en && !pwr_en) begin
      downs++;
      chk(iso_en && !gpc_rst_n, "isolated before power off");
    end
    if (!prev_en && pwr_en) chk(iso_en && !gpc_rst_n, "isolated during power-up");
    prev_iso = iso_en; prev_rst_n = gpc_rst_n; prev_en = pwr_en;
  end

  initial begin
    repeat (3) @(negedge clk);
    chk(!pwr_en && iso_en && !gpc_rst_n && !gpc_on && !busy, "off after reset");
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      on_cmd = 1;
      if (k % 5 == 4) begin
        repeat ($urandom_range(1, 4)) @(negedge clk);
        on_cmd = 0;          // dropped during power-up: sequence completes, then shuts down
      end
      while (!gpc_on) @(negedge clk);
      repeat ($urandom_range(1, 20)) @(negedge clk);
      on_cmd = 0;
      while (pwr_en || pwr_good || busy) @(negedge clk);
      chk(!gpc_on && iso_en && !gpc_rst_n, "off again");
    end
    chk(ups == 200 && downs == 200, "all power cycles completed");
    $display("power cycles up=%0d down=%0d", ups, downs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
