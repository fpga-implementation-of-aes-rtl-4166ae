// mips_cpu: five-stage pipelined MIPS-32 processor (IF, ID, EX, MEM, WB)
// that hands crypto instructions to an AES co-processor without stalling.
//
// Datapath, stage by stage, as in the design's block diagram:
//   IF  : PC, PC + 4 adder, instruction memory; the PC multiplexer takes the
//         branch target from EX/MEM when a beq in MEM is taken.
//   ID  : register file read (RD1, RD2), sign extension of the 16-bit
//         immediate, decoder (mips_control).
//   EX  : ALU with its operand-B multiplexer (RD2 or immediate), branch
//         target adder (PC + 4 + immediate shifted left 2), destination
//         register choice (rt or rd).
//   MEM : data memory; branch decision (beq and ALU zero).
//   WB  : multiplexer between loaded data and the EX result, register write.
// Crypto instructions are decoded in ID like any other. In the next cycle,
// from the ID/EX register, the operation and the values of rs and rt are
// presented on crypto_cmd, to the AES register and the co-processor. The
// answer of AESRD/AESST (crypto_rdata, same cycle) replaces the ALU result,
// and then takes the ordinary MEM/WB path to rd. No crypto instruction ever
// stalls the pipeline or the fetch.
//
// Like the block diagram, the pipeline has no forwarding and no hazard
// detection (choices of this design where the source design is silent):
//   - a register written by an instruction can be read by the third
//     instruction after it (the register file passes a same-cycle write to
//     its read ports); two instructions must separate producer and consumer;
//   - beq is resolved in MEM and nothing is flushed: the three instructions
//     after a beq always execute (three delay slots).
// Instruction memory loads through prog_*; data memory through host_*.
// Reset clears the PC, the register file and the pipeline registers (which
// then hold no-operations).
module mips_cpu
  import mac_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  logic [31:0]                   prog_wdata,
  // host access to the data memory
  input  logic                          host_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] host_addr,
  input  logic [31:0]                   host_wdata,
  output logic [31:0]                   host_rdata,
  // crypto co-processor
  output crypto_cmd_t                   crypto_cmd,
  input  logic [31:0]                   crypto_rdata,
  // program counter of the instruction being fetched
  output logic [31:0]                   pc
);

  typedef struct packed {
    logic [31:0] pc4;
    logic [31:0] instr;
  } if_id_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] pc4;
    logic [31:0] rd1;
    logic [31:0] rd2;
    logic [31:0] imm;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  shamt;
  } id_ex_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] target;
    logic        zero;
    logic [31:0] result;
    logic [31:0] wdata;
    logic [4:0]  wreg;
  } ex_mem_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] mdata;
    logic [31:0] result;
    logic [4:0]  wreg;
  } mem_wb_t;

  if_id_t  if_id;
  id_ex_t  id_ex;
  ex_mem_t ex_mem;
  mem_wb_t mem_wb;

  // ---------------- IF ----------------
  logic [31:0] pc4, instr, pc_next;
  logic        pc_src;

  assign pc4     = pc + 32'd4;
  assign pc_src  = ex_mem.ctrl.branch && ex_mem.zero;
  assign pc_next = pc_src ? ex_mem.target : pc4;

  instruction_memory #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk        (clk),
    .addr       (pc),
    .instr      (instr),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_wdata (prog_wdata)
  );

  // ---------------- ID ----------------
  ctrl_t       id_ctrl;
  logic [31:0] rd1, rd2, wb_data;

  mips_control u_ctrl (
    .opcode (if_id.instr[31:26]),
    .funct  (if_id.instr[5:0]),
    .ctrl   (id_ctrl)
  );

  mips_regfile u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .ra1   (if_id.instr[25:21]),
    .ra2   (if_id.instr[20:16]),
    .rd1   (rd1),
    .rd2   (rd2),
    .we    (mem_wb.ctrl.reg_write),
    .wa    (mem_wb.wreg),
    .wd    (wb_data)
  );

  // ---------------- EX ----------------
  logic [31:0] alu_b, alu_y;
  logic        alu_zero;

  mips_alu u_alu (
    .op   (id_ex.ctrl.alu_op),
    .a    (id_ex.rd1),
    .b    (alu_b),
    .y    (alu_y),
    .zero (alu_zero)
  );

  assign alu_b = id_ex.ctrl.alu_src ? id_ex.imm : id_ex.rd2;

  always_comb begin
    crypto_cmd       = '0;
    crypto_cmd.valid = id_ex.ctrl.crypto;
    crypto_cmd.op    = id_ex.ctrl.crypto_op;
    crypto_cmd.sel   = id_ex.shamt;
    crypto_cmd.a     = id_ex.rd1;
    crypto_cmd.b     = id_ex.rd2;
  end

  // ---------------- MEM ----------------
  logic [31:0] mem_rdata;

  data_memory #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk       (clk),
    .addr      (ex_mem.result),
    .we        (ex_mem.ctrl.mem_write),
    .wdata     (ex_mem.wdata),
    .rdata     (mem_rdata),
    .host_we    (host_we),
    .host_addr  (host_addr),
    .host_wdata (host_wdata),
    .host_rdata (host_rdata)
  );

  // ---------------- WB ----------------
  assign wb_data = mem_wb.ctrl.mem_to_reg ? mem_wb.mdata : mem_wb.result;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= '0;
      if_id  <= '0;
      id_ex  <= '0;
      ex_mem <= '0;
      mem_wb <= '0;
    end else begin
      pc <= pc_next;

      if_id.pc4   <= pc4;
      if_id.instr <= instr;

      id_ex.ctrl  <= id_ctrl;
      id_ex.pc4   <= if_id.pc4;
      id_ex.rd1   <= rd1;
      id_ex.rd2   <= rd2;
      id_ex.imm   <= {{16{if_id.instr[15]}}, if_id.instr[15:0]};   // sign extend
      id_ex.rt    <= if_id.instr[20:16];
      id_ex.rd    <= if_id.instr[15:11];
      id_ex.shamt <= if_id.instr[10:6];

      ex_mem.ctrl   <= id_ex.ctrl;
      ex_mem.target <= id_ex.pc4 + {id_ex.imm[29:0], 2'b00};       // shift left 2
      ex_mem.zero   <= alu_zero;
      ex_mem.result <= id_ex.ctrl.crypto ? crypto_rdata : alu_y;
      ex_mem.wdata  <= id_ex.rd2;
      ex_mem.wreg   <= id_ex.ctrl.reg_dst ? id_ex.rd : id_ex.rt;

      mem_wb.ctrl   <= ex_mem.ctrl;
      mem_wb.mdata  <= mem_rdata;
      mem_wb.result <= ex_mem.result;
      mem_wb.wreg   <= ex_mem.wreg;
    end
  end

endmodule
