// tb_mips_regfile: random writes and reads against a model array; checks
// that register 0 stays zero, that reads are combinational, and that a read
// of the register being written returns the value being written.
module tb_mips_regfile;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  mips_regfile dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] expect_rd(logic [4:0] ra);
    if (ra == 0) return 32'h0;
    if (we && wa == ra) return wd;
    return model[ra];
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = ($urandom % 3) != 0;
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = (n % 4 == 0) ? wa : 5'($urandom);
      ra2 = (n % 5 == 0) ? 5'd0 : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== expect_rd(ra1)) begin
        failures++;
        $display("FAIL: rd1 r%0d = %h expected %h", ra1, rd1, expect_rd(ra1));
      end
      if (rd2 !== expect_rd(ra2)) begin
        failures++;
        $display("FAIL: rd2 r%0d = %h expected %h", ra2, rd2, expect_rd(ra2));
      end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
