// tb_nano_imem: the 128 x 4-bit instruction memory. All words are written
// with random nibbles through the load port, then read back in random order
// through the combinational read port and compared with a copy kept here;
// a second pass overwrites half the words and checks again.
module tb_nano_imem;
  logic       clk = 0;
  logic       we = 0;
  logic [6:0] waddr = 0, raddr = 0;
  logic [3:0] wdata = 0, rdata;
  logic [3:0] ref_mem[128];
  int checks = 0, failures = 0;

  nano_imem dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, logic [3:0] d);
    @(negedge clk);
    we = 1; waddr = 7'(a); wdata = d;
    ref_mem[a] = d;
    @(negedge clk);
    we = 0;
  endtask

  task automatic read_all();
    for (int k = 0; k < 256; k++) begin
      int a = $urandom_range(0, 127);
      raddr = 7'(a);
      #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, rdata, ref_mem[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 128; a++) write(a, 4'($urandom));
    read_all();
    for (int a = 0; a < 128; a += 2) write(a, 4'($urandom));
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
