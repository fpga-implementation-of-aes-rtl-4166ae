// tb_mips_cpu: runs a short program on the five-stage pipeline, with the
// co-processor replaced by a bench model that answers every AESRD/AESST
// with a word made from the command fields.
// Checked: add, sub, and, or, slt, addi, lw, sw results; that an operand
// written by the previous instruction is not yet visible (no forwarding);
// a taken beq with its three delay slots executed and the fourth
// instruction skipped; a beq not taken; the crypto commands (operation,
// sel, rs and rt values) presented two clocks after the instruction was
// fetched, i.e. in the cycle after decode; and the answer of AESRD and
// AESST written to rd.
module tb_mips_cpu;
  import mac_pkg::*;
  import mac_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0, host_we = 0;
  logic [7:0] prog_addr = '0, host_addr = '0;
  logic [31:0] prog_wdata = '0, host_wdata = '0, host_rdata, pc;
  crypto_cmd_t crypto_cmd;
  logic [31:0] crypto_rdata;
  int checks = 0, failures = 0, cycle = 0;
  int end_pc, crypto_at [3];
  crypto_cmd_t seen [$];
  int seen_t [$];
  int fetch_t [int];

  mips_cpu dut (.*);

  assign crypto_rdata = crypto_cmd.valid ? {16'hc0de, 5'd0, crypto_cmd.op, 3'd0, crypto_cmd.sel} : 32'h0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (!fetch_t.exists(int'(pc))) fetch_t[int'(pc)] = cycle;
    if (crypto_cmd.valid) begin
      seen.push_back(crypto_cmd);
      seen_t.push_back(cycle);
    end
  end

  function automatic logic [31:0] mem_word(int byte_addr);
    return dut.u_dmem.mem[byte_addr / 4];
  endfunction

  initial begin
    clear();
    emit(addi(1, 0, 5));
    emit(addi(2, 0, 12));
    emit(lw(3, 0, 0));
    emit(nop());
    emit(add(4, 1, 2));
    emit(sub(5, 1, 2));
    emit(and_(6, 3, 2));
    emit(or_(7, 3, 1));
    emit(slt(8, 5, 1));
    emit(addi(9, 4, 100));
    emit(addi(10, 0, 1));
    emit(add(11, 10, 10));        // r10 not yet written back: reads 0
    emit(beq(1, 1, 4));           // taken, target 17
    emit(addi(12, 0, 1));         // delay slots
    emit(addi(13, 0, 2));
    emit(addi(14, 0, 3));
    emit(addi(15, 0, 99));        // skipped
    emit(beq(1, 2, 1));           // not taken
    emit(addi(16, 0, 4));
    emit(addi(17, 0, 5));
    crypto_at[0] = here(); emit(aeswk(1, 2, 1));
    crypto_at[1] = here(); emit(aesrd(18, 2, 1));
    crypto_at[2] = here(); emit(aesst(19, 1));
    emit(nop());
    emit(nop());
    for (int r = 4; r <= 19; r++) emit(sw(r, 0, 4 * (r - 3)));
    end_pc = 4 * here();
    emit(beq(0, 0, -1));
    repeat (3) emit(nop());
    for (int i = 0; i < here(); i++) begin
      prog_we <= 1; prog_addr <= 8'(i); prog_wdata <= prog[i];
      @(posedge clk);
    end
    prog_we <= 0;
    host_we <= 1; host_addr <= 0; host_wdata <= 32'h12345678;
    @(posedge clk);
    host_we <= 0;
    rst_n <= 1;
    while (pc != 32'(end_pc)) @(posedge clk);
    repeat (8) @(posedge clk);

    check(mem_word(4)  === 32'd17,        "add");
    check(mem_word(8)  === -32'sd7,       "sub");
    check(mem_word(12) === 32'h8,         "and with loaded word");
    check(mem_word(16) === 32'h1234567d,  "or with loaded word");
    check(mem_word(20) === 32'd1,         "slt negative < positive");
    check(mem_word(24) === 32'd117,       "addi");
    check(mem_word(28) === 32'd1,         "addi r10");
    check(mem_word(32) === 32'd0,         "no forwarding: stale operand");
    check(mem_word(36) === 32'd1 && mem_word(40) === 32'd2 && mem_word(44) === 32'd3,
          "three delay slots after a taken beq execute");
    check(mem_word(48) === 32'd0,         "instruction after the delay slots skipped");
    check(mem_word(52) === 32'd4 && mem_word(56) === 32'd5, "beq not taken");
    check(mem_word(60) === 32'hc0de0506,  $sformatf("AESRD write-back %h", mem_word(60)));
    check(mem_word(64) === 32'hc0de0601,  $sformatf("AESST write-back %h", mem_word(64)));

    check(seen.size() == 3, $sformatf("%0d crypto commands, expected 3", seen.size()));
    if (seen.size() == 3) begin
      check(seen[0].op == CR_WKEY && seen[0].sel == 5'd1 && seen[0].a == 32'd5 && seen[0].b == 32'd12,
            "AESWK command fields");
      check(seen[1].op == CR_RD && seen[1].sel == 5'd6, "AESRD command fields");
      check(seen[2].op == CR_STAT && seen[2].sel == 5'd1, "AESST command fields");
      for (int k = 0; k < 3; k++)
        check(seen_t[k] - fetch_t[4 * crypto_at[k]] == 2,
              $sformatf("crypto command %0d presented %0d clocks after fetch, expected 2",
                        k, seen_t[k] - fetch_t[4 * crypto_at[k]]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
