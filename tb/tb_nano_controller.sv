// tb_nano_controller: the complete NanoController (core, both memories, I/O).
//
// Part 1 loads random programs through the load port and runs them in
// lockstep with the reference model while GPIO inputs and status signals
// change randomly. Before each instruction the model's I/O bytes are set to
// what the hardware reads; after it the data memory, GPIO outputs, power
// command, accumulator and the instruction's cycle count are compared.
// Part 2 loads the door-lock control program and checks its behaviour:
// RTC seconds, the power-on command on a proximity event, the 0x40 exit on a
// shut-down request and the 0x80 exit on time-out.
module tb_nano_controller;
  import nano_pkg::*;
  import nano_ref_pkg::*;
  import nano_app_pkg::*;

  logic            clk = 0, rst_n = 0, run = 0;
  logic            prog_we = 0;
  logic [PC_W-1:0] prog_addr = 0;
  logic [IW-1:0]   prog_data = 0;
  logic [DW-1:0]   gpio_in = 0;
  logic            gpc_sd_req = 0, gpc_on = 0, gpc_busy = 0;
  logic [DW-1:0]   gpio_out;
  logic            pwr_cmd;
  logic            retire;
  opcode_t         retire_op;
  int checks = 0, failures = 0;

  nano_controller dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [3:0] p[128]);
    run = 0;
    rst_n = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 7'(i); prog_data = p[i];
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic random_round(int cycles);
    nano_iss iss = new();
    logic [3:0] p[128];
    int cyc = 0, len;
    bit pending = 0;
    foreach (p[i]) begin p[i] = 4'($urandom); iss.prog[i] = p[i]; end
    load(p);
    rst_n = 1;
    // the data memory is not reset: start the model from its contents
    for (int i = 0; i < 16; i++) iss.mem[i] = dut.u_dmem.mem[i];
    @(negedge clk);
    run = 1;
    for (int k = 0; k < cycles; k++) begin
      if (k % 7 == 0) begin
        gpio_in = 8'($urandom);
        gpc_sd_req = $urandom_range(0, 1);
        gpc_on = $urandom_range(0, 1);
        gpc_busy = $urandom_range(0, 1);
      end
      #1;
      if (pending) begin
        chk(dut.u_core.acc == iss.a, "accumulator");
        chk(gpio_out == iss.mem[24], "gpio_out");
        chk(pwr_cmd == iss.mem[25][0], "pwr_cmd");
        for (int i = 0; i < 16; i++) chk(dut.u_dmem.mem[i] == iss.mem[i], "data memory");
        pending = 0;
      end
      cyc++;
      if (retire) begin
        for (int i = 16; i < 32; i++) iss.mem[i] = 0;
        iss.mem[16] = dut.u_io.gpio_in_s;
        iss.mem[17] = {5'b0, gpc_busy, gpc_on, dut.u_io.sd_req_s};
        iss.mem[24] = gpio_out;
        iss.mem[25] = {7'b0, pwr_cmd};
        len = iss.step();
        chk(cyc == len, "cycles per instruction");
        cyc = 0;
        pending = 1;
      end
      @(negedge clk);
    end
    run = 0;
  endtask

  // wait for a condition with a cycle limit
  task automatic wait_for(ref logic sig, input logic val, input int lim, input string what);
    int n = 0;
    while (sig !== val && n < lim) begin @(negedge clk); n++; end
    chk(sig === val, what);
  endtask

  initial begin
    logic [3:0] p[128];
    int sec0;
    for (int r = 0; r < 20; r++) random_round(1500);

    // ---- door-lock program ----
    build_door_lock(4, 20);
    chk(code.size() <= 128, "program fits the 64 B instruction memory");
    foreach (p[i]) p[i] = (i < code.size()) ? code[i] : 4'h0;
    gpio_in = 0; gpc_sd_req = 0; gpc_on = 0; gpc_busy = 0;
    load(p);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    repeat (2000) @(negedge clk);
    chk(dut.u_dmem.mem[1] > 8'd10, "RTC seconds advance while idle");
    chk(!pwr_cmd && gpio_out == 0, "GPC stays off without an event");
    // proximity event -> power on; answer with a shut-down request
    gpio_in = 8'h01;
    wait_for(pwr_cmd, 1'b1, 200, "power-on command on proximity");
    gpio_in = 8'h00;
    chk(dut.u_dmem.mem[3] == 8'd1, "event counted");
    gpc_busy = 1; repeat (5) @(negedge clk); gpc_busy = 0; gpc_on = 1;
    repeat (20) @(negedge clk);
    chk(pwr_cmd, "stays on while the GPC works");
    gpc_sd_req = 1;
    wait_for(pwr_cmd, 1'b0, 200, "power-off after shut-down request");
    chk(gpio_out == 8'h40, "shut-down request path");
    gpc_sd_req = 0; gpc_on = 0; gpc_busy = 1;
    repeat (10) @(negedge clk);
    gpc_busy = 0;
    // second event without request -> time-out
    sec0 = dut.u_dmem.mem[1];
    repeat (300) @(negedge clk);
    chk(dut.u_dmem.mem[1] != sec0, "RTC resumes after power-off");
    gpio_in = 8'h01;
    wait_for(pwr_cmd, 1'b1, 200, "second power-on");
    gpio_in = 8'h00;
    gpc_on = 1;
    wait_for(pwr_cmd, 1'b0, 2000, "power-off on time-out");
    chk(gpio_out == 8'h80, "time-out path");
    chk(dut.u_dmem.mem[3] == 8'd2, "two events counted");
    gpc_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
