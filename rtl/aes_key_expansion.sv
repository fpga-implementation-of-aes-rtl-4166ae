// aes_key_expansion: AES-128 key schedule for both pipelines.
//
// On start, the 128-bit cipher key is taken as round key 0; then one round
// key is derived per clock (FIPS-197 KeyExpansion for Nk = 4: the first word
// of round key k is w ^ SubWord(RotWord(last word of key k-1)) ^ Rcon[k],
// each later word XORs in its left neighbour). After NR = 10 cycles busy
// falls and ready rises. Rcon is produced by repeated doubling in GF(2^8).
//
// All eleven round keys are held in registers, so both pipelines can read
// every key in the same cycle. enc_keys[k] is round key k. dec_keys holds the
// same keys for the equivalent inverse cipher: reversed (dec_keys[0] is
// round key 10, dec_keys[10] is round key 0), with InvMixColumns applied to
// the nine middle keys; this is combinational logic on the stored keys.
//
// The source design only says the processor is AES-128; how the round keys are
// made is this design's own choice (iterative, shared, computed once per key).
// Interface: start (one cycle, with key) restarts the schedule at any time;
// ready stays high until the next start. Keys are stable while ready = 1.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      key,
  output logic        busy,
  output logic        ready,
  output round_keys_t enc_keys,
  output round_keys_t dec_keys
);

  block_t       rk [NR+1];
  logic [3:0]   step;       // index of the round key computed next
  byte_t        rcon;
  block_t       prev, next;

  assign prev = rk[step - 4'd1];

  always_comb begin
    word_t t;
    t = sub_rot_word(prev[31:0]) ^ {rcon, 24'h0};
    next[127:96] = prev[127:96] ^ t;
    next[95:64]  = prev[95:64]  ^ next[127:96];
    next[63:32]  = prev[63:32]  ^ next[95:64];
    next[31:0]   = prev[31:0]   ^ next[63:32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      step  <= 4'd1;
      rcon  <= 8'h01;
    end else if (start) begin
      busy  <= 1'b1;
      ready <= 1'b0;
      step  <= 4'd1;
      rcon  <= 8'h01;
    end else if (busy) begin
      rcon <= xtime(rcon);
      step <= step + 4'd1;
      if (step == 4'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start)     rk[0]    <= key;
    else if (busy) rk[step] <= next;
  end

  always_comb begin
    for (int k = 0; k <= NR; k++) begin
      enc_keys[k] = rk[k];
      if (k == 0 || k == NR) dec_keys[k] = rk[NR - k];
      else                   dec_keys[k] = inv_mix_block(rk[NR - k]);
    end
  end

endmodule
