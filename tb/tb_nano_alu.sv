// tb_nano_alu: exhaustive check of the 8-bit NanoController ALU.
// Every operation is applied to all 65536 operand pairs and y, z and c are
// compared with values computed here with plain integer arithmetic.
module tb_nano_alu;
  import nano_pkg::*;

  alu_op_t    op;
  logic [7:0] a, b, y;
  logic       z, c;
  int checks = 0, failures = 0;

  nano_alu dut (.*);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ey, ec;
    for (int o = 0; o < 7; o++) begin
      op = alu_op_t'(o);
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          a = 8'(i);
          b = 8'(j);
          #1;
          case (o)
            0: begin ey = j;               ec = 0; end
            1: begin ey = (i + j) % 256;   ec = (i + j) > 255; end
            2: begin ey = (i - j + 256) % 256; ec = i < j; end
            3: begin ey = (j + 1) % 256;   ec = (j == 255); end
            4: begin ey = (j + 255) % 256; ec = (j == 0); end
            5: begin ey = i & j;           ec = 0; end
            default: begin ey = i | j;     ec = 0; end
          endcase
          checks++;
          if (y !== 8'(ey) || c !== 1'(ec) || z !== (ey == 0)) begin
            failures++;
            if (failures < 10) $display("FAIL op=%0d a=%0d b=%0d y=%0d c=%0d", o, i, j, y, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
