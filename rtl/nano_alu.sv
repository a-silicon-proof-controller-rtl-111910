// nano_alu: 8-bit combinational ALU of the NanoController.
//
// Operand a is the accumulator, operand b the instruction's operand (an
// immediate or a data-memory byte). Operations: pass b, a+b, a-b (used for
// compare), b+1, b-1, a&b, a|b. Outputs the result y, the zero flag z (y==0)
// and the carry flag c: carry out for add and increment, borrow for subtract
// and decrement (so after a-b, c means a<b unsigned); 0 for the logic ops.
// The operation set follows the published instruction classes (load/store,
// increment/decrement, comparison); the exact flag rules are this design's own.
module nano_alu
  import nano_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  alu_op_t      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         z,
  output logic         c
);

  logic [W:0] wide;

  always_comb begin
    wide = '0;
    unique case (op)
      ALU_PASS_B: wide = {1'b0, b};
      ALU_ADD:    wide = {1'b0, a} + {1'b0, b};
      ALU_SUB:    wide = {1'b0, a} - {1'b0, b};
      ALU_INC_B:  wide = {1'b0, b} + 1'b1;
      ALU_DEC_B:  wide = {1'b0, b} - 1'b1;
      ALU_AND:    wide = {1'b0, a & b};
      ALU_OR:     wide = {1'b0, a | b};
      default:    wide = '0;
    endcase
    y = wide[W-1:0];
    c = wide[W];
    z = (wide[W-1:0] == '0);
  end

endmodule
