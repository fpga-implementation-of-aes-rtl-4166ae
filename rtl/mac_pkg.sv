// mac_pkg: instruction encodings, control types and the crypto command bundle
// of the MIPS-AES crypto processor.
//
// The base instructions are the classic MIPS-32 encodings of the subset the
// five-stage pipeline executes: add, sub, and, or, slt (R-type), addi, lw, sw
// and beq. Every other opcode is not a MIPS instruction of this core; opcode
// 0x12 (COP2, reserved by MIPS for a coprocessor) carries the crypto
// instructions, R-format, with the operation in funct:
//
//   funct 0  AESWK  rs, rt, h : key half h (shamt[0]: 1 = bits 127:64) <= {rs, rt}
//   funct 1  AESWD  rs, rt, h : data half h                       <= {rs, rt}
//   funct 2  AESKX            : expand the key held in the AES register
//   funct 3  AESENC           : encrypt the data held in the AES register
//   funct 4  AESDEC           : decrypt the data held in the AES register
//   funct 5  AESRD  rd, w     : rd <= word w (shamt[1:0], 0 = bits 127:96) of
//                               the oldest result; shamt[2] = 1 also pops it
//   funct 6  AESST  rd        : rd <= status word; shamt[0] = 1 clears the
//                               sticky overflow and error flags
//
// The source design names crypto instructions but gives no encoding; this whole
// instruction set is this design's own.
package mac_pkg;

  typedef enum logic [5:0] {
    OP_RTYPE  = 6'h00,
    OP_BEQ    = 6'h04,
    OP_ADDI   = 6'h08,
    OP_CRYPTO = 6'h12,
    OP_LW     = 6'h23,
    OP_SW     = 6'h2b
  } opcode_e;

  typedef enum logic [5:0] {
    FN_ADD = 6'h20,
    FN_SUB = 6'h22,
    FN_AND = 6'h24,
    FN_OR  = 6'h25,
    FN_SLT = 6'h2a
  } funct_e;

  typedef enum logic [2:0] {
    CR_WKEY  = 3'd0,
    CR_WDATA = 3'd1,
    CR_KEYX  = 3'd2,
    CR_ENC   = 3'd3,
    CR_DEC   = 3'd4,
    CR_RD    = 3'd5,
    CR_STAT  = 3'd6,
    CR_NONE  = 3'd7
  } crypto_op_e;

  typedef enum logic [2:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_AND,
    ALU_OR,
    ALU_SLT
  } alu_op_e;

  // control word produced in ID and carried down the pipeline
  typedef struct packed {
    logic       reg_write;   // write the register file in WB
    logic       reg_dst;     // destination: 1 = rd, 0 = rt
    logic       alu_src;     // ALU operand B: 1 = sign-extended immediate
    alu_op_e    alu_op;
    logic       mem_read;
    logic       mem_write;
    logic       mem_to_reg;  // WB value: 1 = data memory, 0 = EX result
    logic       branch;      // beq
    logic       crypto;      // crypto instruction, handed to the co-processor
    crypto_op_e crypto_op;
  } ctrl_t;

  // status word returned by AESST
  typedef struct packed {
    logic [7:0] reserved;
    logic [7:0] inflight;       // blocks inside the encrypt/decrypt pipelines
    logic [7:0] count;          // results waiting to be read
    logic [1:0] unused;
    logic       pipe_busy;      // inflight != 0
    logic       error;          // sticky: command refused (no key / key in use)
    logic       overflow;       // sticky: ENC/DEC refused, no room for result
    logic       result_valid;   // count != 0
    logic       key_ready;
    logic       key_busy;
  } aes_status_t;

  // command handed from the ID/EX register to the AES register and
  // co-processor, in the clock cycle after decode
  typedef struct packed {
    logic        valid;
    crypto_op_e  op;
    logic [4:0]  sel;   // shamt field
    logic [31:0] a;     // value of rs
    logic [31:0] b;     // value of rt
  } crypto_cmd_t;

endpackage
