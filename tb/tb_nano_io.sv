// tb_nano_io: the NanoController's memory-mapped I/O registers.
// Checks the reset values, that GPIO inputs and the GPC shut-down request
// appear at their addresses exactly two clocks after they change
// (synchroniser latency), the status bits, write/read-back of the GPIO
// output and power command registers, and that writes to other addresses
// change nothing and unmapped addresses read 0.
module tb_nano_io;
  import nano_pkg::*;

  logic            clk = 0, rst_n = 0;
  logic [DA_W-1:0] addr = 0;
  logic            we = 0;
  logic [DW-1:0]   wdata = 0, rdata;
  logic [DW-1:0]   gpio_in = 0;
  logic            gpc_sd_req = 0, gpc_on = 0, gpc_busy = 0;
  logic [DW-1:0]   gpio_out;
  logic            pwr_cmd;
  int checks = 0, failures = 0;

  nano_io dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic rd(input logic [4:0] a, input logic [7:0] exp, input string what);
    addr = a;
    #1;
    chk(rdata, exp, what);
  endtask

  initial begin
    logic [7:0] v, vprev, out_ref;
    logic       pwr_ref;
    repeat (2) @(negedge clk);
    chk(gpio_out, 8'h00, "gpio_out reset");
    chk({7'b0, pwr_cmd}, 8'h00, "pwr_cmd reset");
    rst_n = 1;
    out_ref = 0;
    pwr_ref = 0;
    for (int k = 0; k < 300; k++) begin
      // input latency: change input, visible after exactly two rising edges
      @(negedge clk);
      vprev = gpio_in;
      v = 8'($urandom);
      gpio_in = v;
      gpc_sd_req = v[0];
      @(negedge clk);
      rd(IO_GPIO_IN, vprev, "old value after one edge");
      @(negedge clk);
      rd(IO_GPIO_IN, v, "gpio_in after two edges");
      gpc_on = v[1];
      gpc_busy = v[2];
      rd(IO_STATUS, {5'b0, v[2], v[1], v[0]}, "status");
      // writes
      addr = 5'($urandom);
      we = 1;
      wdata = 8'($urandom);
      if (addr == IO_GPIO_OUT) out_ref = wdata;
      if (addr == IO_PWR_CMD)  pwr_ref = wdata[0];
      @(negedge clk);
      we = 0;
      chk(gpio_out, out_ref, "gpio_out");
      chk({7'b0, pwr_cmd}, {7'b0, pwr_ref}, "pwr_cmd");
      rd(IO_GPIO_OUT, out_ref, "gpio_out readback");
      rd(IO_PWR_CMD, {7'b0, pwr_ref}, "pwr_cmd readback");
      rd(5'd20, 8'h00, "unmapped reads 0");
      @(negedge clk);
      we = 1; addr = IO_GPIO_OUT; wdata = 8'($urandom); out_ref = wdata;
      @(negedge clk);
      we = 0;
      chk(gpio_out, out_ref, "gpio_out direct write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
