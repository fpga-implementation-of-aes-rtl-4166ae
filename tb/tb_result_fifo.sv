// tb_result_fifo: random pushes and pops (never a push when full without a
// pop, never a pop when empty) against a queue model; checks the head entry
// and the count every cycle, and that the queue reaches full and empty.
module tb_result_fifo;
  localparam int W = 128, D = 32;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D):0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, saw_full = 0, saw_empty = 0;

  result_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      bias = (n / 300) % 2;   // alternate filling and draining phases
      @(negedge clk);
      checks += 1;
      if (count !== ($clog2(D)+1)'(model.size())) begin
        failures++;
        $display("FAIL: count %0d expected %0d", count, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (rdata !== model[0]) begin
          failures++;
          $display("FAIL: head %h expected %h", rdata, model[0]);
        end
      end
      if (model.size() == D) saw_full++;
      if (model.size() == 0) saw_empty++;
      pop  = model.size() != 0 && ($urandom % 4) < (bias ? 3 : 1);
      push = ($urandom % 4) < (bias ? 1 : 3) && (model.size() < D || pop);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    checks += 2;
    if (saw_full == 0) begin failures++; $display("FAIL: never full"); end
    if (saw_empty == 0) begin failures++; $display("FAIL: never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
