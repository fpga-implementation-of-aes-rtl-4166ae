// aes_round: one AES round, pipelined into three register stages.
//
// This is the repeated section of the pipelined cipher:
//   stage 1: S-Box (SubBytes, 16 byte look-ups)            -> register
//   stage 2: Shift Row                                      -> register
//   stage 3: Mix column, then Add Round Key                 -> register
// The last round of the cipher (LAST = 1) leaves out Mix column, so its
// stage 3 is Add Round Key alone. With INV = 1 the round is the decryption
// round of the equivalent inverse cipher: inverse S-box, Inverse Shift Row,
// Inverse Mix column, Add Round Key. The equivalent inverse cipher keeps the
// same step order as encryption, so the caller must supply round keys that
// have already been passed through InvMixColumns (done in aes_key_expansion).
// The stage order and the register placement follow the pipelined
// encryption/decryption diagram of the design; the valid bit that travels
// with each block is this implementation's own.
//
// Interface: in_valid/in_block enter each cycle (no back-pressure, one block
// per clock); out_valid/out_block appear exactly 3 cycles later. round_key is
// used in stage 3 and must be stable while a block is in flight.
module aes_round
  import aes_pkg::*;
#(
  parameter bit INV  = 1'b0,   // 0: encryption round, 1: decryption round
  parameter bit LAST = 1'b0    // 1: final round, no (Inverse) Mix column
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t in_block,
  input  block_t round_key,
  output logic   out_valid,
  output block_t out_block
);

  block_t sb_d, sb_q, sr_d, sr_q, ark_d;
  logic   v1, v2;

  // S-Box on every byte
  always_comb begin
    for (int i = 0; i < 16; i++)
      sb_d[127-8*i -: 8] = INV ? INV_SBOX[get_byte(in_block, i)]
                               : SBOX[get_byte(in_block, i)];
  end

  // (Inverse) Shift Row: byte at row r, column c comes from column c+r
  // (encryption) or c-r (decryption), modulo 4
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr_d[127-8*(r+4*c) -: 8] =
          INV ? get_byte(sb_q, r + 4*((c + 4 - r) % 4))
              : get_byte(sb_q, r + 4*((c + r) % 4));
  end

  // (Inverse) Mix column, then Add Round Key
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      if (LAST)     ark_d[127-32*c -: 32] = sr_q[127-32*c -: 32];
      else if (INV) ark_d[127-32*c -: 32] = inv_mix_column(sr_q[127-32*c -: 32]);
      else          ark_d[127-32*c -: 32] = mix_column(sr_q[127-32*c -: 32]);
    end
    ark_d = ark_d ^ round_key;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= v2;
    end
  end

  // data registers need no reset: the valid bits qualify them
  always_ff @(posedge clk) begin
    sb_q      <= sb_d;
    sr_q      <= sr_d;
    out_block <= ark_d;
  end

endmodule
