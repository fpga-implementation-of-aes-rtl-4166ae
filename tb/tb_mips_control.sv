// tb_mips_control: decodes every instruction class and every crypto funct,
// and a sample of unlisted opcodes and functs, and checks the control word
// against the expected settings written out in the bench.
module tb_mips_control;
  import mac_pkg::*;

  logic [5:0] opcode, funct;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  mips_control dut (.*);

  task automatic expect_ctrl(logic [5:0] op, logic [5:0] fn, ctrl_t e, string name);
    opcode = op;
    funct  = fn;
    #1;
    checks++;
    if (ctrl !== e) begin
      failures++;
      $display("FAIL: %s: got %p expected %p", name, ctrl, e);
    end
  endtask

  function automatic ctrl_t base();
    ctrl_t c = '0;
    c.alu_op = ALU_ADD;
    c.crypto_op = CR_NONE;
    return c;
  endfunction

  initial begin
    ctrl_t e;
    alu_op_e ops [5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    logic [5:0] fns [5] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h2a};
    for (int i = 0; i < 5; i++) begin
      e = base(); e.reg_dst = 1; e.reg_write = 1; e.alu_op = ops[i];
      expect_ctrl(6'h00, fns[i], e, "R-type");
    end
    e = base();
    expect_ctrl(6'h00, 6'h00, e, "nop");
    expect_ctrl(6'h00, 6'h08, e, "unlisted funct");
    expect_ctrl(6'h02, 6'h00, e, "unlisted opcode j");
    expect_ctrl(6'h3f, 6'h20, e, "unlisted opcode 3f");
    expect_ctrl(6'h12, 6'h07, e, "unlisted crypto funct");
    e = base(); e.alu_src = 1; e.reg_write = 1;
    expect_ctrl(6'h08, 6'h15, e, "addi");
    e = base(); e.alu_src = 1; e.mem_read = 1; e.mem_to_reg = 1; e.reg_write = 1;
    expect_ctrl(6'h23, 6'h00, e, "lw");
    e = base(); e.alu_src = 1; e.mem_write = 1;
    expect_ctrl(6'h2b, 6'h00, e, "sw");
    e = base(); e.alu_op = ALU_SUB; e.branch = 1;
    expect_ctrl(6'h04, 6'h00, e, "beq");
    for (int f = 0; f < 7; f++) begin
      e = base(); e.crypto = 1; e.crypto_op = crypto_op_e'(f);
      if (f == 5 || f == 6) begin e.reg_dst = 1; e.reg_write = 1; end
      expect_ctrl(6'h12, 6'(f), e, $sformatf("crypto funct %0d", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
