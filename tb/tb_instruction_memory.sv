// tb_instruction_memory: loads random words through the program port and
// reads them back through the fetch port by byte address, including the
// ignored low address bits and the wrap-around above DEPTH words.
module tb_instruction_memory;
  localparam int DEPTH = 256;
  logic clk = 0;
  logic [31:0] addr, instr, prog_wdata;
  logic prog_we;
  logic [7:0] prog_addr;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  instruction_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    prog_we = 0; prog_addr = 0; prog_wdata = 0; addr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i); prog_wdata = $urandom; model[i] = prog_wdata;
    end
    @(negedge clk);
    prog_we = 0;
    for (int n = 0; n < 1000; n++) begin
      int w;
      w = $urandom % DEPTH;
      addr = 32'(4 * w) + 32'($urandom % 4) + ((n % 3 == 0) ? 32'(4 * DEPTH) : 32'd0);
      #1;
      checks++;
      if (instr !== model[w]) begin
        failures++;
        $display("FAIL: addr %h got %h expected %h", addr, instr, model[w]);
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
