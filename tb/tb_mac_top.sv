// tb_mac_top: end-to-end test of the MIPS-AES crypto processor at its
// default sizes.
//
// The bench loads a program into the instruction memory and a key and
// blocks into the data memory, releases reset and lets the processor run.
// The program, in order:
//   - writes the FIPS-197 C.1 key into the AES register and issues AESENC
//     before any key is expanded (must be refused: error flag);
//   - expands the key and polls AESST in a beq loop until key_ready;
//   - encrypts NB random blocks and decrypts the FIPS-197 C.1 cipher text,
//     issuing them one after another, then tries AESKX while they are in
//     flight (must be refused: error flag);
//   - polls until the pipelines are empty, reads every result with AESRD
//     (popping the queue) and stores it;
//   - issues RESULT_DEPTH + 2 encryptions without reading (the last two must
//     be refused: overflow flag);
//   - runs add, sub, and, or, slt and stores the results; then spins.
// Results in data memory are compared with aes_ref_pkg and with values
// computed here. Monitors count each mechanism (issue, refusal, key
// expansion, taken branch, queue pop, ...), check the 31-cycle pipeline
// latency of every block, and fail any mechanism that never happened.
module tb_mac_top;
  import aes_pkg::*;
  import mac_pkg::*;
  import mac_asm_pkg::*;

  localparam int NB     = 3;     // random blocks encrypted
  localparam int RDEPTH = 32;    // default result queue depth of mac_top
  localparam block_t KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam block_t FIPS_PT = 128'h00112233445566778899aabbccddeeff;
  localparam block_t FIPS_CT = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

  // data memory map (byte addresses)
  localparam int A_KEY = 0, A_CT = 16, A_PT = 32, A_RES = 256, A_ALU = 400, A_STAT = 480;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0, host_we = 0;
  logic [7:0] prog_addr = '0, host_addr = '0;
  logic [31:0] prog_wdata = '0, host_wdata = '0, host_rdata, pc;
  aes_status_t aes_status;

  int checks = 0, failures = 0, cycle = 0;
  block_t pt [NB];
  int end_pc;

  mac_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic int off(int target, int at);
    return target - at - 1;
  endfunction

  task automatic nops(int n);
    repeat (n) emit(nop());
  endtask

  task automatic load4(int base);
    emit(lw(1, 0, base));
    emit(lw(2, 0, base + 4));
    emit(lw(3, 0, base + 8));
    emit(lw(4, 0, base + 12));
    nops(2);
  endtask

  // poll AESST until (status & mask reg) != compare reg
  task automatic poll(int mask_reg, int cmp_reg);
    int top = here();
    emit(aesst(5, 0));
    nops(2);
    emit(and_(6, 5, mask_reg));
    nops(2);
    emit(beq(6, cmp_reg, off(top, here())));
    nops(3);
  endtask

  task automatic build_program();
    clear();
    emit(addi(7, 0, 2));          // key_ready mask
    emit(addi(9, 0, 32));         // pipe_busy mask
    load4(A_KEY);
    emit(aeswk(1, 2, 1));
    emit(aeswk(3, 4, 0));
    emit(aesenc());               // no key yet: refused
    emit(aesst(5, 0));
    nops(2);
    emit(sw(5, 0, A_STAT));
    emit(aesst(0, 1));            // clear flags
    emit(aeskx());
    poll(7, 0);                   // wait for key_ready
    for (int b = 0; b < NB; b++) begin
      load4(A_PT + 16 * b);
      emit(aeswd(1, 2, 1));
      emit(aeswd(3, 4, 0));
      emit(aesenc());
    end
    load4(A_CT);
    emit(aeswd(1, 2, 1));
    emit(aeswd(3, 4, 0));
    emit(aesdec());
    emit(aeskx());                // blocks in flight: refused
    poll(9, 9);                   // wait until the pipelines are empty
    emit(sw(5, 0, A_STAT + 4));
    emit(aesst(0, 1));
    for (int k = 0; k <= NB; k++) begin
      emit(aesrd(1, 0, 0));
      emit(aesrd(2, 1, 0));
      emit(aesrd(3, 2, 0));
      emit(aesrd(4, 3, 1));
      emit(sw(1, 0, A_RES + 16 * k));
      emit(sw(2, 0, A_RES + 16 * k + 4));
      emit(sw(3, 0, A_RES + 16 * k + 8));
      emit(sw(4, 0, A_RES + 16 * k + 12));
    end
    repeat (RDEPTH + 2) emit(aesenc());
    emit(aesst(5, 0));
    nops(2);
    emit(sw(5, 0, A_STAT + 8));
    emit(addi(10, 0, -5));
    emit(addi(11, 0, 7));
    nops(2);
    emit(add(12, 10, 11));
    emit(sub(13, 10, 11));
    emit(and_(14, 10, 11));
    emit(or_(15, 10, 11));
    emit(slt(16, 10, 11));
    emit(slt(17, 11, 10));
    nops(2);
    for (int r = 12; r <= 17; r++) emit(sw(r, 0, A_ALU + 4 * (r - 12)));
    end_pc = 4 * here();
    emit(beq(0, 0, -1));
    nops(3);
  endtask

  function automatic logic [31:0] mem_word(int byte_addr);
    return dut.u_cpu.u_dmem.mem[byte_addr / 4];
  endfunction

  function automatic block_t mem_block(int byte_addr);
    return {mem_word(byte_addr), mem_word(byte_addr + 4), mem_word(byte_addr + 8), mem_word(byte_addr + 12)};
  endfunction

  // ---------------- mechanism monitors ----------------
  int n_enc = 0, n_dec = 0, n_kx = 0, n_refuse_nokey = 0, n_refuse_kx = 0;
  int n_overflow = 0, n_branch = 0, n_pop = 0, n_cop_wb = 0, n_out = 0;
  int issue_t [$];

  always @(posedge clk) if (rst_n) begin
    if (dut.u_cop.enc_in) n_enc++;
    if (dut.u_cop.dec_in) n_dec++;
    if (dut.u_cop.kx_ok) n_kx++;
    if (dut.u_cop.is_issue && !dut.u_cop.kx_ready) n_refuse_nokey++;
    if (dut.u_cop.is_kx && !dut.u_cop.kx_ok) n_refuse_kx++;
    if (dut.u_cop.is_issue && dut.u_cop.kx_ready && !dut.u_cop.room) n_overflow++;
    if (dut.u_cpu.pc_src) n_branch++;
    if (dut.u_cop.pop) n_pop++;
    if (dut.cmd.valid && (dut.cmd.op == CR_RD || dut.cmd.op == CR_STAT)) n_cop_wb++;
    if (dut.u_cop.enc_in || dut.u_cop.dec_in) issue_t.push_back(cycle);
    if (dut.u_cop.push) begin
      int t0;
      t0 = issue_t.pop_front();
      n_out++;
      check(cycle - t0 == 31, $sformatf("block latency %0d cycles, expected 31", cycle - t0));
    end
  end

  initial begin
    logic [31:0] st;
    for (int b = 0; b < NB; b++) pt[b] = aes_ref_pkg::rand_blk();
    build_program();
    check(here() <= 256, "program fits the instruction memory");
    // load program and data while in reset
    for (int i = 0; i < here(); i++) begin
      prog_we <= 1; prog_addr <= 8'(i); prog_wdata <= prog[i];
      @(posedge clk);
    end
    prog_we <= 0;
    for (int i = 0; i < 4; i++) begin
      host_we <= 1; host_addr <= 8'((A_KEY / 4) + i); host_wdata <= KEY[127-32*i -: 32]; @(posedge clk);
      host_addr <= 8'((A_CT / 4) + i); host_wdata <= FIPS_CT[127-32*i -: 32]; @(posedge clk);
      for (int b = 0; b < NB; b++) begin
        host_addr <= 8'((A_PT / 4) + 4 * b + i); host_wdata <= pt[b][127-32*i -: 32]; @(posedge clk);
      end
    end
    host_we <= 0;
    @(posedge clk);
    rst_n <= 1;
    // run to the final loop, then let the last blocks drain
    while (pc != 32'(end_pc)) @(posedge clk);
    repeat (60) @(posedge clk);

    // results
    for (int b = 0; b < NB; b++) begin
      block_t e;
      e = aes_ref_pkg::encrypt(KEY, pt[b]);
      check(mem_block(A_RES + 16 * b) === e,
            $sformatf("block %0d: stored %h expected %h", b, mem_block(A_RES + 16 * b), e));
    end
    check(mem_block(A_RES + 16 * NB) === FIPS_PT,
          $sformatf("FIPS-197 C.1 decryption: stored %h", mem_block(A_RES + 16 * NB)));
    // host port read-back of the first result word
    host_addr <= 8'(A_RES / 4);
    @(posedge clk) #1;
    check(host_rdata === aes_ref_pkg::encrypt(KEY, pt[0])[127:96], "host port read-back");

    st = mem_word(A_STAT);
    check(st[4] && !st[1] && st[15:8] == 0, $sformatf("status after early AESENC %h", st));
    st = mem_word(A_STAT + 4);
    check(st[4] && !st[3] && st[1] && !st[5] && st[15:8] == 8'(NB + 1),
          $sformatf("status after drain %h", st));
    st = mem_word(A_STAT + 8);
    check(st[3] && !st[4] && int'(st[23:16]) + int'(st[15:8]) == RDEPTH, $sformatf("status after overflow %h", st));
    check(aes_status.count == 8'(RDEPTH) && aes_status.overflow && !aes_status.pipe_busy,
          "final status port: full queue, overflow flagged");

    check(mem_word(A_ALU)      === 32'd2,          "add");
    check(mem_word(A_ALU + 4)  === 32'hfffffff4,   "sub");
    check(mem_word(A_ALU + 8)  === 32'd3,          "and");
    check(mem_word(A_ALU + 12) === 32'hffffffff,   "or");
    check(mem_word(A_ALU + 16) === 32'd1,          "slt true");
    check(mem_word(A_ALU + 20) === 32'd0,          "slt false");

    // mechanisms
    check(n_enc == NB + RDEPTH, $sformatf("encryptions issued %0d", n_enc));
    check(n_dec == 1, $sformatf("decryptions issued %0d", n_dec));
    check(n_out == NB + 1 + RDEPTH, $sformatf("blocks out %0d", n_out));
    check(n_kx == 1, "key expansion happened once");
    check(n_refuse_nokey == 1, "issue without key refused once");
    check(n_refuse_kx == 1, "key expansion with blocks in flight refused once");
    check(n_overflow == 2, $sformatf("overflow refusals %0d, expected 2", n_overflow));
    check(n_branch > 2, "taken branches (poll loops)");
    check(n_pop == NB + 1, "queue pops");
    check(n_cop_wb > 0, "co-processor write-backs");
    $display("mechanisms: enc=%0d dec=%0d keyx=%0d refused_nokey=%0d refused_keyx=%0d overflow=%0d branches=%0d pops=%0d cop_reads=%0d cycles=%0d",
             n_enc, n_dec, n_kx, n_refuse_nokey, n_refuse_kx, n_overflow, n_branch, n_pop, n_cop_wb, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
