// aes_register: the AES register of the crypto processor. It holds the
// 128-bit cipher key and the 128-bit data block that crypto instructions
// assemble from general-purpose registers, 64 bits per instruction.
//
// AESWK writes {a, b} (the values of rs and rt) into the key half chosen by
// sel[0] (1 = bits 127:64, 0 = bits 63:0); AESWD does the same for the data
// block. Other commands leave it unchanged. Writes take effect at the clock
// edge that ends the cycle in which the command is presented, so a command in
// the next cycle (AESKX, AESENC, AESDEC) already sees the new value.
// The register and its place next to the decode stage follow the design's
// block diagram; its 64-bit write granularity and reset to zero are this
// design's own choices.
module aes_register
  import aes_pkg::*;
  import mac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  crypto_cmd_t cmd,
  output block_t      key,
  output block_t      data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key  <= '0;
      data <= '0;
    end else if (cmd.valid) begin
      unique case (cmd.op)
        CR_WKEY:  if (cmd.sel[0]) key[127:64]  <= {cmd.a, cmd.b};
                  else            key[63:0]    <= {cmd.a, cmd.b};
        CR_WDATA: if (cmd.sel[0]) data[127:64] <= {cmd.a, cmd.b};
                  else            data[63:0]   <= {cmd.a, cmd.b};
        default: ;
      endcase
    end
  end

endmodule
