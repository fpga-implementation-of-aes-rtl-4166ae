// mips_alu: the 32-bit ALU of the EX stage. It adds, subtracts, ANDs, ORs
// or compares (set-on-less-than, signed) a and b as op selects, and flags a
// zero result for beq, which subtracts. Purely combinational. The operation
// set is that of the base instructions this pipeline runs (mac_pkg).
module mips_alu
  import mac_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        zero
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_SLT: y = {31'b0, $signed(a) < $signed(b)};
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
