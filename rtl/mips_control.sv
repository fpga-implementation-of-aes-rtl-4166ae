// mips_control: the decoder of the ID stage. From the opcode and funct
// fields it produces the control word that travels down the pipeline
// (mac_pkg::ctrl_t), and it separates the two kinds of instruction: a MIPS
// instruction gets the controls of the five-stage pipeline, a crypto
// instruction (opcode 0x12) is marked for the co-processor together with its
// operation. Of the crypto instructions only AESRD and AESST write a general
// register (rd), through the normal EX/MEM/WB path; the others change no
// processor state. An opcode or funct that is not listed in mac_pkg decodes
// as a no-operation. Purely combinational.
module mips_control
  import mac_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '0;
    ctrl.alu_op    = ALU_ADD;
    ctrl.crypto_op = CR_NONE;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        unique case (funct)
          FN_ADD:  ctrl.alu_op = ALU_ADD;
          FN_SUB:  ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          default: begin                      // includes the all-zero nop
            ctrl.reg_write = 1'b0;
            ctrl.reg_dst   = 1'b0;
          end
        endcase
      end
      OP_ADDI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_read   = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_op = ALU_SUB;
        ctrl.branch = 1'b1;
      end
      OP_CRYPTO: begin
        if (funct <= 6'd6) begin
          ctrl.crypto    = 1'b1;
          ctrl.crypto_op = crypto_op_e'(funct[2:0]);
          if (funct[2:0] == CR_RD || funct[2:0] == CR_STAT) begin
            ctrl.reg_dst   = 1'b1;
            ctrl.reg_write = 1'b1;
          end
        end
      end
      default: ;
    endcase
  end

endmodule
