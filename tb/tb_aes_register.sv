// tb_aes_register: random command streams (key and data half writes, other
// crypto operations, idle cycles) against a model of the two 128-bit
// registers; checks both outputs after every clock and the reset value.
module tb_aes_register;
  import aes_pkg::*;
  import mac_pkg::*;

  logic clk = 0, rst_n = 0;
  crypto_cmd_t cmd;
  block_t key, data, mkey, mdata;
  int checks = 0, failures = 0;

  aes_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    cmd = '0;
    mkey = '0;
    mdata = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (key !== '0 || data !== '0) begin
      failures++;
      $display("FAIL: not cleared by reset");
    end
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      cmd.valid = ($urandom % 4) != 0;
      cmd.op    = crypto_op_e'($urandom % 8);
      cmd.sel   = 5'($urandom);
      cmd.a     = $urandom;
      cmd.b     = $urandom;
      @(posedge clk);
      if (cmd.valid && cmd.op == CR_WKEY) begin
        if (cmd.sel[0]) mkey[127:64] = {cmd.a, cmd.b}; else mkey[63:0] = {cmd.a, cmd.b};
      end
      if (cmd.valid && cmd.op == CR_WDATA) begin
        if (cmd.sel[0]) mdata[127:64] = {cmd.a, cmd.b}; else mdata[63:0] = {cmd.a, cmd.b};
      end
      #1;
      checks += 2;
      if (key !== mkey) begin
        failures++;
        $display("FAIL: key %h expected %h", key, mkey);
      end
      if (data !== mdata) begin
        failures++;
        $display("FAIL: data %h expected %h", data, mdata);
      end
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
