// tb_sram_sp: the single-port SRAM model at the instruction-SRAM size
// (24576 x 32). Random writes and reads over the whole address range; each
// read returns the data one clock after the request and is compared with a
// sparse copy kept here. Writes must not change q.
module tb_sram_sp;
  localparam int WORDS = 24576;
  logic        clk = 0;
  logic        cen_n = 1, wen_n = 1;
  logic [14:0] a = 0;
  logic [31:0] d = 0, q;
  logic [31:0] ref_mem[int];
  int checks = 0, failures = 0;

  sram_sp #(.WORDS(WORDS), .W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addrs[$];
    logic [31:0] qprev;
    int ad;
    for (int k = 0; k < 2000; k++) begin
      ad = $urandom_range(0, WORDS - 1);
      @(negedge clk);
      cen_n = 0; wen_n = 0; a = 15'(ad); d = $urandom;
      ref_mem[ad] = d;
      addrs.push_back(ad);
    end
    chk_spread: begin
      int distinct[int];
      foreach (addrs[i]) distinct[addrs[i]] = 1;
      checks++;
      if (distinct.size() < 1000) failures++;
    end
    for (int k = 0; k < 4000; k++) begin
      ad = addrs[$urandom_range(0, addrs.size() - 1)];
      @(negedge clk);
      cen_n = 0; wen_n = 1; a = 15'(ad);
      @(negedge clk);
      cen_n = 1;
      checks++;
      if (q !== ref_mem[ad]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", ad, q, ref_mem[ad]);
      end
      // a write leaves q alone
      qprev = q;
      cen_n = 0; wen_n = 0; a = 15'(ad); d = ref_mem[ad];
      @(negedge clk);
      cen_n = 1; wen_n = 1;
      checks++;
      if (q !== qprev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
