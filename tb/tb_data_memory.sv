// tb_data_memory: random stores from the processor port and host writes,
// checked through both read ports against a model; a store and a host write
// to the same word in one cycle must leave the store's value.
module tb_data_memory;
  localparam int DEPTH = 256;
  logic clk = 0;
  logic [31:0] addr, wdata, rdata, host_wdata, host_rdata;
  logic we, host_we;
  logic [7:0] host_addr;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  data_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = 0; host_we = 0; addr = 0; wdata = 0; host_addr = 0; host_wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = 8'(i); host_wdata = $urandom; model[i] = host_wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we      = ($urandom % 2) == 0;
      host_we = ($urandom % 3) == 0;
      addr    = 32'(4 * ($urandom % DEPTH));
      host_addr = (n % 10 == 0) ? addr[9:2] : 8'($urandom);
      wdata   = $urandom;
      host_wdata = $urandom;
      #1;
      checks += 2;
      if (rdata !== model[addr[9:2]]) begin
        failures++;
        $display("FAIL: load %h got %h expected %h", addr, rdata, model[addr[9:2]]);
      end
      if (host_rdata !== model[host_addr]) begin
        failures++;
        $display("FAIL: host read %0d got %h expected %h", host_addr, host_rdata, model[host_addr]);
      end
      @(posedge clk);
      if (we) model[addr[9:2]] = wdata;
      else if (host_we) model[host_addr] = host_wdata;
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
