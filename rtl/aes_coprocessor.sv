// aes_coprocessor: the AES-128 crypto co-processor driven by the MIPS
// pipeline. It holds the key schedule (aes_key_expansion), the pipelined
// AES Encrypter and AES Decrypter, and a queue for finished blocks.
//
// Commands arrive one per clock on cmd, from the processor's ID/EX register
// (the cycle after the crypto instruction was decoded); the processor never
// waits for the co-processor:
//   AESKX   starts the key schedule on the key in the AES register (10 clocks).
//           Refused (error flag) while blocks are still in the pipelines,
//           since they read the round keys on their way through.
//   AESENC/ launch the data block of the AES register into the encrypt or
//   AESDEC  decrypt pipeline (31 clocks, one block per clock). Refused with
//           the error flag if no expanded key is ready, and with the overflow
//           flag if the queue could not hold the result: a block is accepted
//           only while (results queued + blocks in flight) < RESULT_DEPTH.
//   AESRD   returns on rd_data, in the same cycle, word sel[1:0] of the
//           oldest finished block; sel[2] = 1 removes that block.
//   AESST   returns the status word (mac_pkg::aes_status_t); sel[0] = 1
//           clears the sticky overflow and error flags.
// Both pipelines have the same latency and only one block enters per clock,
// so their outputs never meet in the same cycle; results leave the queue in
// issue order whatever mix of encryption and decryption was issued.
// The encrypter/decrypter pair is the design's; the key schedule, the
// result queue, the flags and the status word are this design's own choices.
module aes_coprocessor
  import aes_pkg::*;
  import mac_pkg::*;
#(
  parameter int unsigned RESULT_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  crypto_cmd_t cmd,
  input  block_t      key,       // from the AES register
  input  block_t      data,      // from the AES register
  output logic [31:0] rd_data,   // answer to AESRD / AESST, combinational
  output aes_status_t status
);

  localparam int unsigned CW = $clog2(RESULT_DEPTH) + 1;

  logic        kx_busy, kx_ready;
  round_keys_t enc_keys, dec_keys;
  logic        enc_in, dec_in, enc_out, dec_out;
  block_t      enc_blk, dec_blk, head;
  logic        push, pop;
  logic [CW-1:0] count;
  logic [7:0]  inflight;
  logic        overflow_q, error_q;

  logic is_kx, is_enc, is_dec, is_issue, room, issue_ok, kx_ok;

  assign is_kx    = cmd.valid && cmd.op == CR_KEYX;
  assign is_enc   = cmd.valid && cmd.op == CR_ENC;
  assign is_dec   = cmd.valid && cmd.op == CR_DEC;
  assign is_issue = is_enc || is_dec;
  assign room     = (32'(count) + 32'(inflight)) < RESULT_DEPTH;
  assign issue_ok = is_issue && kx_ready && room;
  assign kx_ok    = is_kx && inflight == 0;
  assign enc_in   = is_enc && issue_ok;
  assign dec_in   = is_dec && issue_ok;

  aes_key_expansion u_keys (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (kx_ok),
    .key      (key),
    .busy     (kx_busy),
    .ready    (kx_ready),
    .enc_keys (enc_keys),
    .dec_keys (dec_keys)
  );

  aes_encrypter u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (enc_in),
    .in_block   (data),
    .round_keys (enc_keys),
    .out_valid  (enc_out),
    .out_block  (enc_blk)
  );

  aes_decrypter u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (dec_in),
    .in_block   (data),
    .round_keys (dec_keys),
    .out_valid  (dec_out),
    .out_block  (dec_blk)
  );

  assign push = enc_out || dec_out;
  assign pop  = cmd.valid && cmd.op == CR_RD && cmd.sel[2] && count != 0;

  result_fifo #(.WIDTH(128), .DEPTH(RESULT_DEPTH)) u_queue (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (push),
    .wdata (enc_out ? enc_blk : dec_blk),
    .pop   (pop),
    .rdata (head),
    .count (count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight   <= '0;
      overflow_q <= 1'b0;
      error_q    <= 1'b0;
    end else begin
      inflight <= inflight + (issue_ok ? 8'd1 : 8'd0) - (push ? 8'd1 : 8'd0);
      if (cmd.valid && cmd.op == CR_STAT && cmd.sel[0]) begin
        overflow_q <= 1'b0;
        error_q    <= 1'b0;
      end else begin
        if (is_issue && kx_ready && !room)        overflow_q <= 1'b1;
        if ((is_issue && !kx_ready) || (is_kx && !kx_ok)) error_q <= 1'b1;
      end
    end
  end

  always_comb begin
    status              = '0;
    status.inflight     = inflight;
    status.count        = 8'(count);
    status.pipe_busy    = inflight != 0;
    status.error        = error_q;
    status.overflow     = overflow_q;
    status.result_valid = count != 0;
    status.key_ready    = kx_ready;
    status.key_busy     = kx_busy;
  end

  always_comb begin
    rd_data = '0;
    if (cmd.valid && cmd.op == CR_RD)
      rd_data = head[127 - 32*cmd.sel[1:0] -: 32];
    else if (cmd.valid && cmd.op == CR_STAT)
      rd_data = status;
  end

  a_one_result_per_clock: assert property (@(posedge clk) disable iff (!rst_n) !(enc_out && dec_out));

endmodule
