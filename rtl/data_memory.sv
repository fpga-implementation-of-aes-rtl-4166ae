// data_memory: word-addressed data memory of the MEM stage. DEPTH 32-bit
// words at byte address addr (bits 1:0 ignored, addresses wrap). A store
// (we) writes at the clock edge; the load port reads combinationally, as in
// the single-cycle memory stage of the textbook pipeline. A second port
// (host_*, word address) lets a host load input data and read results; its
// write loses to a store of the processor in the same cycle, so write it
// while the processor is in reset. Contents are not reset. The size and the
// host port are this design's choices.
module data_memory #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  input  logic                     we,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata,
  input  logic                     host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic [31:0]              host_wdata,
  output logic [31:0]              host_rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)           mem[addr[AW+1:2]] <= wdata;
    else if (host_we) mem[host_addr]    <= host_wdata;
  end

  assign rdata     = mem[addr[AW+1:2]];
  assign host_rdata = mem[host_addr];

endmodule
