// aes_encrypter: fully pipelined AES-128 encryption (FIPS-197 cipher).
//
// The pipeline is an input stage (Add Round Key with round key 0, then a
// register) followed by ten aes_round instances: nine full rounds
// (S-Box, Shift Row, Mix column + Add Round Key) and a last round without
// Mix column. Each round has three register stages, so the outer (round)
// and inner (within-round) pipelining of the design gives a latency of
// LATENCY = 1 + 3*10 = 31 clock cycles and a throughput of one 128-bit block
// every clock. The stage order and register positions follow the design's
// pipelined encryption diagram; the valid bit is this implementation's own.
//
// Interface: present in_valid with in_block (plain text) in any cycle;
// out_valid/out_block (cipher text) follow LATENCY cycles later, in order.
// There is no back-pressure. round_keys[0..10] are the AES-128 round keys
// from aes_key_expansion and must stay stable while blocks are in flight.
module aes_encrypter
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  block_t      in_block,
  input  round_keys_t round_keys,
  output logic        out_valid,
  output block_t      out_block
);

  // clock cycles from in_valid to out_valid
  localparam int unsigned LATENCY = 1 + 3 * NR;

  logic   v   [NR+1];
  block_t blk [NR+1];

  // input stage: Add Round Key, register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end

  always_ff @(posedge clk) blk[0] <= in_block ^ round_keys[0];

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.INV(1'b0), .LAST(r == NR)) u_round (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (v[r-1]),
      .in_block  (blk[r-1]),
      .round_key (round_keys[r]),
      .out_valid (v[r]),
      .out_block (blk[r])
    );
  end

  assign out_valid = v[NR];
  assign out_block = blk[NR];

endmodule
