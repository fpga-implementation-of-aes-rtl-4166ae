// mac_asm_pkg: instruction encoders for writing test programs of the
// MIPS-AES crypto processor (base MIPS subset and the crypto instructions
// described in mac_pkg), and a small program buffer.
package mac_asm_pkg;

  function automatic logic [31:0] rtype(logic [5:0] funct, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
  endfunction
  function automatic logic [31:0] add (int rd, int rs, int rt); return rtype(6'h20, rd, rs, rt); endfunction
  function automatic logic [31:0] sub (int rd, int rs, int rt); return rtype(6'h22, rd, rs, rt); endfunction
  function automatic logic [31:0] and_(int rd, int rs, int rt); return rtype(6'h24, rd, rs, rt); endfunction
  function automatic logic [31:0] or_ (int rd, int rs, int rt); return rtype(6'h25, rd, rs, rt); endfunction
  function automatic logic [31:0] slt (int rd, int rs, int rt); return rtype(6'h2a, rd, rs, rt); endfunction
  function automatic logic [31:0] itype(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] addi(int rt, int rs, int imm); return itype(6'h08, rt, rs, imm); endfunction
  function automatic logic [31:0] lw  (int rt, int rs, int imm); return itype(6'h23, rt, rs, imm); endfunction
  function automatic logic [31:0] sw  (int rt, int rs, int imm); return itype(6'h2b, rt, rs, imm); endfunction
  function automatic logic [31:0] beq (int rs, int rt, int off); return itype(6'h04, rt, rs, off); endfunction
  function automatic logic [31:0] nop(); return 32'h0; endfunction
  function automatic logic [31:0] crypto(int funct, int rd, int rs, int rt, int sel);
    return {6'h12, 5'(rs), 5'(rt), 5'(rd), 5'(sel), 6'(funct)};
  endfunction
  function automatic logic [31:0] aeswk (int rs, int rt, int hi); return crypto(0, 0, rs, rt, hi); endfunction
  function automatic logic [31:0] aeswd (int rs, int rt, int hi); return crypto(1, 0, rs, rt, hi); endfunction
  function automatic logic [31:0] aeskx ();                      return crypto(2, 0, 0, 0, 0); endfunction
  function automatic logic [31:0] aesenc();                      return crypto(3, 0, 0, 0, 0); endfunction
  function automatic logic [31:0] aesdec();                      return crypto(4, 0, 0, 0, 0); endfunction
  function automatic logic [31:0] aesrd (int rd, int w, int pop); return crypto(5, rd, 0, 0, (pop << 2) | w); endfunction
  function automatic logic [31:0] aesst (int rd, int clr);        return crypto(6, rd, 0, 0, clr); endfunction

  // program buffer: emit() appends an instruction; 32-bit constants are
  // placed in data memory by the test bench and loaded with lw
  logic [31:0] prog [$];
  function automatic void clear(); prog.delete(); endfunction
  function automatic void emit(logic [31:0] i); prog.push_back(i); endfunction
  function automatic int here(); return prog.size(); endfunction

endpackage
