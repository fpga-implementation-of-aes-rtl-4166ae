// instruction_memory: word-addressed program memory of the IF stage.
// DEPTH 32-bit words; the fetch port reads combinationally at byte address
// addr (the PC; bits 1:0 ignored, addresses wrap at DEPTH words). A separate
// write port loads the program (prog_we, word address prog_addr). The
// contents are not reset; load a program before releasing the processor's
// reset. The size is this design's choice: the source design gives none.
module instruction_memory #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  output logic [31:0]              instr,
  input  logic                     prog_we,
  input  logic [$clog2(DEPTH)-1:0] prog_addr,
  input  logic [31:0]              prog_wdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) if (prog_we) mem[prog_addr] <= prog_wdata;

  assign instr = mem[addr[AW+1:2]];

endmodule
