// tb_mips_alu: drives random and corner operands through every ALU
// operation and compares y and zero with values computed in the bench.
module tb_mips_alu;
  import mac_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        zero;
  int checks = 0, failures = 0;

  mips_alu dut (.*);

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_SLT: return (int'(x) < int'(z)) ? 32'd1 : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffffffff, 32'h7fffffff, 32'h80000000, 32'h12345678};
    for (int n = 0; n < 600; n++) begin
      op = alu_op_e'(n % 5);
      a  = (n < 180) ? corner[n % 6] : $urandom;
      b  = (n < 180) ? corner[(n / 6) % 6] : ((n % 7 == 0) ? a : $urandom);
      #1;
      checks += 2;
      if (y !== model(op, a, b)) begin
        failures++;
        $display("FAIL: op %s a %h b %h: y %h expected %h", op.name(), a, b, y, model(op, a, b));
      end
      if (zero !== (model(op, a, b) == 0)) begin
        failures++;
        $display("FAIL: zero flag for op %s a %h b %h", op.name(), a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
