// tb_nano_dmem: the 16-byte data memory. Random writes and reads, each read
// compared with a copy kept here; also checks that a read in the cycle of a
// write still returns the old byte (read-modify-write timing).
module tb_nano_dmem;
  logic       clk = 0;
  logic       we = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_mem[16];
  int checks = 0, failures = 0;

  nano_dmem dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr %0d got %h exp %h", what, addr, rdata, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; addr = 4'(a); wdata = 8'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      addr = 4'($urandom);
      we = $urandom_range(0, 1);
      wdata = 8'($urandom);
      #1;
      chk(ref_mem[addr], "read");
      if (we) ref_mem[addr] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      chk(ref_mem[a], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
