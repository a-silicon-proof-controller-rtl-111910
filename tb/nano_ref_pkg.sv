// nano_ref_pkg: testbench support for the NanoController.
//
// nano_iss is an instruction-level reference model written from the ISA
// description only (not from the RTL): it executes one instruction per
// step() on its own copy of the program, accumulator, flags, program counter
// and 32-byte data space, and reports how many nibbles the instruction used,
// which is also its cycle count on the hardware.
//
// The asm_* functions assemble programs into the queue `code`: asm_op emits
// an opcode, asm_lit a literal in the fewest nibbles, asm_lit3 a literal in
// exactly three nibbles (used for branch targets so that label addresses do
// not depend on the target value; assemble twice to resolve forward labels).
package nano_ref_pkg;

  logic [3:0] code[$];
  int         labels[int];

  function automatic void asm_reset();
    code.delete();
  endfunction

  function automatic void asm_op(logic [3:0] op);
    code.push_back(op);
  endfunction

  function automatic void asm_lit(int unsigned v);
    int n = 1;
    while (n < 3 && (v >> (3 * n)) != 0) n++;
    for (int i = n - 1; i >= 0; i--)
      code.push_back({(i != 0) ? 1'b1 : 1'b0, 3'((v >> (3 * i)) & 7)});
  endfunction

  function automatic void asm_lit3(int unsigned v);
    for (int i = 2; i >= 0; i--)
      code.push_back({(i != 0) ? 1'b1 : 1'b0, 3'((v >> (3 * i)) & 7)});
  endfunction

  function automatic void label(int id);
    labels[id] = code.size();
  endfunction

  function automatic int unsigned lbl(int id);
    if (labels.exists(id)) return labels[id];
    return 0;
  endfunction

  class nano_iss;
    logic [3:0] prog[128];
    logic [7:0] mem[32];
    logic [6:0] pc;
    logic [7:0] a;
    logic       z, c;

    function new();
      pc = 0; a = 0; z = 0; c = 0;
      foreach (prog[i]) prog[i] = 0;
      foreach (mem[i])  mem[i]  = 0;
    endfunction

    // read a variable-length literal starting at pc; returns nibbles used
    function automatic int get_lit(output logic [8:0] v);
      int n = 0;
      logic [3:0] nib;
      v = 0;
      do begin
        nib = prog[pc];
        pc  = pc + 1;
        v   = {v[5:0], nib[2:0]};
        n++;
      end while (nib[3]);
      return n;
    endfunction

    // execute one instruction, return its length in nibbles
    function automatic int step();
      logic [3:0] op;
      logic [8:0] l1, l2;
      logic [8:0] r;
      int n = 1;
      op = prog[pc];
      pc = pc + 1;
      if (op == 4'h0) return n;
      n += get_lit(l1);
      if (op == 4'hF) n += get_lit(l2);
      case (op)
        4'h1: begin a = l1[7:0]; z = (a == 0); end
        4'h2: begin a = mem[l1[4:0]]; z = (a == 0); end
        4'h3: mem[l1[4:0]] = a;
        4'h4: begin r = {1'b0, mem[l1[4:0]]} + 9'd1; mem[l1[4:0]] = r[7:0]; a = r[7:0]; z = (a == 0); c = r[8]; end
        4'h5: begin r = {1'b0, mem[l1[4:0]]} - 9'd1; mem[l1[4:0]] = r[7:0]; a = r[7:0]; z = (a == 0); c = r[8]; end
        4'h6: begin z = (a == l1[7:0]); c = (a < l1[7:0]); end
        4'h7: begin z = (a == mem[l1[4:0]]); c = (a < mem[l1[4:0]]); end
        4'h8: begin a = a & l1[7:0]; z = (a == 0); end
        4'h9: begin a = a | l1[7:0]; z = (a == 0); end
        4'hA: begin r = {1'b0, a} + {1'b0, mem[l1[4:0]]}; a = r[7:0]; z = (a == 0); c = r[8]; end
        4'hB: pc = l1[6:0];
        4'hC: if (z)  pc = l1[6:0];
        4'hD: if (!z) pc = l1[6:0];
        4'hE: if (c)  pc = l1[6:0];
        4'hF: begin
          mem[l1[4:0]] = mem[l1[4:0]] - 8'd1;
          z = (mem[l1[4:0]] == 0);
          if (!z) pc = l2[6:0];
        end
        default: ;
      endcase
      return n;
    endfunction
  endclass

endpackage
