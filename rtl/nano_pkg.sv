// nano_pkg: types and constants shared by the NanoController modules.
//
// The NanoController is a one-operand accumulator/flag processor with an
// 8-bit data path and 16 instructions encoded in 4 bits. Operands (immediates,
// data addresses and branch targets) follow the opcode as variable-length
// literals built from 4-bit nibbles: bit 3 of each nibble says "another nibble
// follows", bits 2:0 carry three value bits, most significant group first.
// A value 0..7 therefore costs one nibble, 0..63 two and 0..511 three.
//
// The ISA class, widths, instruction count and memory sizes follow the
// published architecture; the individual opcodes, their encoding, the literal
// format and the I/O address map are this design's own choices.
package nano_pkg;

  localparam int unsigned DW        = 8;    // data path width
  localparam int unsigned IW        = 4;    // instruction nibble width
  localparam int unsigned PC_W      = 7;    // 128 nibbles = 64 B instruction memory
  localparam int unsigned DA_W      = 5;    // data address space: 16 B SCM + I/O
  localparam int unsigned LIT_W     = 9;    // literal accumulator: three 3-bit groups
  localparam int unsigned IMEM_NIB  = 128;
  localparam int unsigned DMEM_BYTE = 16;

  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,  // no operation
    OP_LDI  = 4'h1,  // A <- #imm                         Z
    OP_LD   = 4'h2,  // A <- M[a]                         Z
    OP_ST   = 4'h3,  // M[a] <- A
    OP_INC  = 4'h4,  // M[a] <- M[a]+1, A <- result       Z, C (carry out)
    OP_DEC  = 4'h5,  // M[a] <- M[a]-1, A <- result       Z, C (borrow)
    OP_CMPI = 4'h6,  // flags of A - #imm                 Z, C (A < imm)
    OP_CMP  = 4'h7,  // flags of A - M[a]                 Z, C (A < M[a])
    OP_ANDI = 4'h8,  // A <- A & #imm                     Z
    OP_ORI  = 4'h9,  // A <- A | #imm                     Z
    OP_ADD  = 4'hA,  // A <- A + M[a]                     Z, C
    OP_JMP  = 4'hB,  // PC <- t
    OP_JZ   = 4'hC,  // if Z  PC <- t
    OP_JNZ  = 4'hD,  // if !Z PC <- t
    OP_JC   = 4'hE,  // if C  PC <- t
    OP_DJNZ = 4'hF   // M[a] <- M[a]-1; if result != 0 PC <- t   (two literals)
  } opcode_t;

  typedef enum logic [2:0] {
    ALU_PASS_B,
    ALU_ADD,
    ALU_SUB,
    ALU_INC_B,
    ALU_DEC_B,
    ALU_AND,
    ALU_OR
  } alu_op_t;

  // Memory-mapped I/O (data addresses 16..31; 0..15 is the SCM data memory)
  localparam logic [DA_W-1:0] IO_GPIO_IN  = 5'd16; // read: synchronised GPIO inputs
  localparam logic [DA_W-1:0] IO_STATUS   = 5'd17; // read: {.., gpc_busy, gpc_on, shutdown_req}
  localparam logic [DA_W-1:0] IO_GPIO_OUT = 5'd24; // read/write: GPIO output register
  localparam logic [DA_W-1:0] IO_PWR_CMD  = 5'd25; // read/write: bit 0 = GPC domain on

  // Number of literals an opcode carries
  function automatic logic [1:0] num_literals(opcode_t op);
    unique case (op)
      OP_NOP:  return 2'd0;
      OP_DJNZ: return 2'd2;
      default: return 2'd1;
    endcase
  endfunction

endpackage
