// tb_nano_core: random-program test of the NanoController control unit and
// data path against the instruction-level reference model.
//
// Each round fills the 128-nibble program with random nibbles (every nibble
// sequence is a valid program), fills the 32-byte data space with random
// bytes and runs the core while `run` is toggled randomly. After every
// executed instruction the program counter, accumulator, flags and the whole
// data space are compared with the model, and the instruction's cycle count
// (run cycles since the previous instruction) must equal 1 + its literal
// nibbles.
module tb_nano_core;
  import nano_pkg::*;
  import nano_ref_pkg::*;

  localparam int ROUNDS = 40;
  localparam int CYCLES = 600;

  logic            clk = 0;
  logic            rst_n = 0;
  logic            run = 0;
  logic [PC_W-1:0] i_addr;
  logic [IW-1:0]   i_data;
  logic [DA_W-1:0] d_addr;
  logic            d_we;
  logic [DW-1:0]   d_wdata, d_rdata;
  logic            retire;
  opcode_t         retire_op;
  logic [DW-1:0]   acc;
  logic            flag_z, flag_c;

  logic [3:0] prog[128];
  logic [7:0] mem[32];

  int checks = 0, failures = 0;
  int op_seen[16];

  nano_core dut (.*);

  always #5 clk = ~clk;

  assign i_data  = prog[i_addr];
  assign d_rdata = mem[d_addr];
  always_ff @(posedge clk) if (d_we) mem[d_addr] <= d_wdata;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (ROUNDS * (CYCLES + 20) * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    nano_iss iss;
    int cyc, len;
    bit pending;
    for (int r = 0; r < ROUNDS; r++) begin
      iss = new();
      rst_n = 0;
      run   = 0;
      for (int i = 0; i < 128; i++) begin
        prog[i] = 4'($urandom);
        iss.prog[i] = prog[i];
      end
      for (int i = 0; i < 32; i++) begin
        mem[i] = 8'($urandom);
        iss.mem[i] = mem[i];
      end
      @(negedge clk);
      @(negedge clk);
      rst_n = 1;
      cyc = 0;
      pending = 0;
      len = 0;
      for (int k = 0; k < CYCLES; k++) begin
        run = ($urandom_range(0, 7) != 0);
        #1;
        if (pending) begin
          check(dut.i_addr == iss.pc, "pc");
          check(acc == iss.a, "acc");
          check(flag_z == iss.z && flag_c == iss.c, "flags");
          for (int i = 0; i < 32; i++) check(mem[i] == iss.mem[i], "data memory");
          pending = 0;
        end
        if (run) cyc++;
        if (retire) begin
          check(retire_op == opcode_t'(iss.prog[iss.pc]), "retired opcode");
          op_seen[iss.prog[iss.pc]]++;
          len = iss.step();
          check(cyc == len, "cycles per instruction");
          cyc = 0;
          pending = 1;
        end
        @(negedge clk);
      end
    end
    for (int o = 0; o < 16; o++) check(op_seen[o] > 0, "every opcode executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
