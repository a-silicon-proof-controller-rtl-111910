// nano_core: control unit and data path of the NanoController.
//
// A one-operand accumulator/flag machine: an 8-bit accumulator A, zero and
// carry flags Z and C, and a 7-bit program counter over 4-bit instruction
// nibbles. Instructions execute over several cycles: one cycle fetches the
// opcode nibble, then one cycle per literal nibble. A literal nibble is
// {more, v[2:0]}; groups are shifted in most significant first until a nibble
// with more=0 ends the literal. The instruction executes in the cycle that
// fetches its last literal nibble, so an instruction with n literal nibbles
// takes 1+n cycles (NOP takes 1). DJNZ carries two literals, address then
// target.
//
// Data interface: d_addr/d_rdata is a combinational read, d_we/d_wdata write
// at the next clock edge. Addresses 0..15 reach the data memory, 16..31 the
// memory-mapped I/O (decoded outside). Instruction interface: i_addr is the
// program counter, i_data the nibble stored there in the same cycle.
//
// run=0 holds the core (used while the program is loaded). retire pulses in
// the cycle an instruction executes. Reset clears PC, A and the flags.
//
// The architecture class, 16 instructions in 4 bits, 8-bit data path,
// multi-cycle execution and variable-length literals follow the published
// design. The opcode list, literal format and cycle timing are this
// design's own choices (see nano_pkg).
module nano_core
  import nano_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  // instruction memory
  output logic [PC_W-1:0] i_addr,
  input  logic [IW-1:0]   i_data,
  // data memory and I/O
  output logic [DA_W-1:0] d_addr,
  output logic            d_we,
  output logic [DW-1:0]   d_wdata,
  input  logic [DW-1:0]   d_rdata,
  // observation
  output logic            retire,
  output opcode_t         retire_op,
  output logic [DW-1:0]   acc,
  output logic            flag_z,
  output logic            flag_c
);

  typedef enum logic {S_FETCH, S_LIT} state_t;

  state_t           state_q;
  logic [PC_W-1:0]  pc_q;
  logic [DW-1:0]    acc_q;
  logic             z_q, c_q;
  opcode_t          op_q;
  logic [LIT_W-1:0] lit_q;   // literal being shifted in
  logic [LIT_W-1:0] lit1_q;  // first literal of DJNZ (data address)
  logic             lit_idx_q;

  // ---- combinational decode of the current nibble ----
  opcode_t          fetched_op;
  logic             nib_more;
  logic [LIT_W-1:0] lit_next;
  logic             last_nib;   // this cycle ends the instruction's last literal
  logic             exec;

  assign fetched_op = opcode_t'(i_data);
  assign nib_more   = i_data[IW-1];
  assign lit_next   = {lit_q[LIT_W-4:0], i_data[2:0]};
  assign last_nib   = (state_q == S_LIT) && !nib_more &&
                      !(op_q == OP_DJNZ && !lit_idx_q);
  assign exec       = run && (last_nib ||
                      (state_q == S_FETCH && num_literals(fetched_op) == 2'd0));

  // ---- data path ----
  alu_op_t       alu_op;
  logic [DW-1:0] alu_b, alu_y;
  logic          alu_z, alu_c;

  nano_alu u_alu (
    .op (alu_op),
    .a  (acc_q),
    .b  (alu_b),
    .y  (alu_y),
    .z  (alu_z),
    .c  (alu_c)
  );

  logic is_imm_op;
  assign is_imm_op = (op_q inside {OP_LDI, OP_CMPI, OP_ANDI, OP_ORI});

  always_comb begin
    d_addr = (op_q == OP_DJNZ) ? lit1_q[DA_W-1:0] : lit_next[DA_W-1:0];
    alu_b  = is_imm_op ? lit_next[DW-1:0] : d_rdata;
    unique case (op_q)
      OP_ADD:            alu_op = ALU_ADD;
      OP_CMP, OP_CMPI:   alu_op = ALU_SUB;
      OP_INC:            alu_op = ALU_INC_B;
      OP_DEC, OP_DJNZ:   alu_op = ALU_DEC_B;
      OP_ANDI:           alu_op = ALU_AND;
      OP_ORI:            alu_op = ALU_OR;
      default:           alu_op = ALU_PASS_B;
    endcase
    d_we    = last_nib && run && (op_q inside {OP_ST, OP_INC, OP_DEC, OP_DJNZ});
    d_wdata = (op_q == OP_ST) ? acc_q : alu_y;
  end

  // branch decision for the instruction executing now
  logic take_branch;
  always_comb begin
    unique case (op_q)
      OP_JMP:  take_branch = 1'b1;
      OP_JZ:   take_branch = z_q;
      OP_JNZ:  take_branch = !z_q;
      OP_JC:   take_branch = c_q;
      OP_DJNZ: take_branch = !alu_z;
      default: take_branch = 1'b0;
    endcase
  end

  // ---- sequencing ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_FETCH;
      pc_q      <= '0;
      acc_q     <= '0;
      z_q       <= 1'b0;
      c_q       <= 1'b0;
      op_q      <= OP_NOP;
      lit_q     <= '0;
      lit1_q    <= '0;
      lit_idx_q <= 1'b0;
    end else if (run) begin
      pc_q <= pc_q + 1'b1;
      unique case (state_q)
        S_FETCH: begin
          op_q      <= fetched_op;
          lit_q     <= '0;
          lit_idx_q <= 1'b0;
          if (num_literals(fetched_op) != 2'd0) state_q <= S_LIT;
        end
        S_LIT: begin
          if (nib_more) begin
            lit_q <= lit_next;
          end else if (op_q == OP_DJNZ && !lit_idx_q) begin
            lit1_q    <= lit_next;
            lit_q     <= '0;
            lit_idx_q <= 1'b1;
          end else begin
            // last literal nibble: execute
            state_q <= S_FETCH;
            unique case (op_q)
              OP_LDI, OP_LD, OP_ANDI, OP_ORI: begin
                acc_q <= alu_y;
                z_q   <= alu_z;
              end
              OP_INC, OP_DEC, OP_ADD: begin
                acc_q <= alu_y;
                z_q   <= alu_z;
                c_q   <= alu_c;
              end
              OP_CMP, OP_CMPI: begin
                z_q <= alu_z;
                c_q <= alu_c;
              end
              OP_DJNZ: z_q <= alu_z;
              default: ;
            endcase
            if (take_branch) pc_q <= lit_next[PC_W-1:0];
          end
        end
        default: state_q <= S_FETCH;
      endcase
    end
  end

  assign i_addr    = pc_q;
  assign retire    = exec;
  assign retire_op = (state_q == S_FETCH) ? fetched_op : op_q;
  assign acc       = acc_q;
  assign flag_z    = z_q;
  assign flag_c    = c_q;

  // A store or read-modify-write only happens when an instruction executes.
  assert property (@(posedge clk) disable iff (!rst_n) d_we |-> exec)
    else $error("nano_core: data write outside an execute cycle");

endmodule
