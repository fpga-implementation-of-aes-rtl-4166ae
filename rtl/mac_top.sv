// mac_top: MIPS-AES Crypto processor. A five-stage pipelined MIPS-32 core
// (mips_cpu) runs the program; crypto instructions in that program are
// decoded in its ID stage and, one cycle later, passed to the AES register
// (key and data block, aes_register) and to the AES-128 co-processor
// (aes_coprocessor: key schedule, 31-stage encrypter and decrypter, result
// queue). The processor never waits for the co-processor: it issues a block
// and goes on fetching, and later polls the status word (AESST) and reads
// the result words (AESRD) into its registers.
//
// Everything runs on one clock. The source design varies that clock (50 to
// 553 MHz) to trade throughput and latency against power; the design has no
// second clock domain.
//
// Ports: clk, rst_n (asynchronous, active low); prog_* write the
// instruction memory (word address) while the core is held in reset;
// host_* write and read the data memory (write only in reset); pc shows the fetch address;
// aes_status is the co-processor status word (same as AESST returns).
module mac_top
  import aes_pkg::*;
  import mac_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH   = 256,
  parameter int unsigned DMEM_DEPTH   = 256,
  parameter int unsigned RESULT_DEPTH = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  logic [31:0]                   prog_wdata,
  input  logic                          host_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] host_addr,
  input  logic [31:0]                   host_wdata,
  output logic [31:0]                   host_rdata,
  output logic [31:0]                   pc,
  output aes_status_t                   aes_status
);

  crypto_cmd_t cmd;
  logic [31:0] cop_rdata;
  block_t      aes_key, aes_data;

  mips_cpu #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_cpu (
    .clk          (clk),
    .rst_n        (rst_n),
    .prog_we      (prog_we),
    .prog_addr    (prog_addr),
    .prog_wdata   (prog_wdata),
    .host_we      (host_we),
    .host_addr    (host_addr),
    .host_wdata   (host_wdata),
    .host_rdata   (host_rdata),
    .crypto_cmd   (cmd),
    .crypto_rdata (cop_rdata),
    .pc           (pc)
  );

  aes_register u_aes_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .cmd   (cmd),
    .key   (aes_key),
    .data  (aes_data)
  );

  aes_coprocessor #(.RESULT_DEPTH(RESULT_DEPTH)) u_cop (
    .clk     (clk),
    .rst_n   (rst_n),
    .cmd     (cmd),
    .key     (aes_key),
    .data    (aes_data),
    .rd_data (cop_rdata),
    .status  (aes_status)
  );

endmodule
