// result_fifo: synchronous first-in first-out queue of WIDTH-bit entries,
// DEPTH deep (a power of two). The head entry is shown on rdata while
// count != 0 (show-ahead); a push and a pop may happen in the same cycle.
// A push when full or a pop when empty is ignored; the caller is expected to
// prevent both (asserted below). Storage is a plain array with no reset.
module result_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign do_push = push && (count < ($clog2(DEPTH)+1)'(DEPTH) || pop);
  assign do_pop  = pop && count != 0;
  assign rdata   = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) if (do_push) mem[wp] <= wdata;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (count < ($clog2(DEPTH)+1)'(DEPTH) || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != 0);

endmodule
