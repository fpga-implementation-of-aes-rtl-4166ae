// aes_decrypter: fully pipelined AES-128 decryption.
//
// It is the equivalent inverse cipher of FIPS-197, which keeps the step order
// of encryption so that it maps onto the same pipeline shape: an input stage
// (Add Round Key with the last encryption round key, then a register), nine
// rounds of inverse S-box, Inverse Shift Row, Inverse Mix column + Add Round
// Key, and a last round without Inverse Mix column. Each round has three
// register stages: LATENCY = 1 + 3*10 = 31 clocks, one block per clock.
// The step order and register placement follow the design's pipelined
// decryption diagram; the valid bit is this implementation's own.
//
// Interface: in_valid/in_block (cipher text) in any cycle; out_valid and
// out_block (plain text) LATENCY cycles later, in order, no back-pressure.
// round_keys[0..10] are the decryption keys from aes_key_expansion, already
// in decryption order (index 0 = encryption key 10) with keys 1..9 passed
// through InvMixColumns; they must stay stable while blocks are in flight.
module aes_decrypter
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
    aes_round #(.INV(1'b1), .LAST(r == NR)) u_round (
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
