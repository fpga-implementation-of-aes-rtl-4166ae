// mips_regfile: the 32 x 32-bit general-purpose register file of the MIPS
// pipeline, with two read ports (Read register 1/2 -> RD1/RD2, used in ID)
// and one write port (Write register / Write data, driven from WB).
//
// Register 0 always reads as zero and ignores writes. Reads are
// combinational. A read of the register being written in the same cycle
// returns the new value (the write happens in the first half of the cycle in
// the textbook pipeline; here it is a bypass), so an instruction in ID sees
// the result of the instruction in WB. Registers reset to zero. The ports
// follow the design's block diagram; the bypass and the reset are this
// design's choices.
module mips_regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);

  logic [31:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == 5'd0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == 5'd0) ? '0 : (we && wa == ra2) ? wd : regs[ra2];
  end

endmodule
