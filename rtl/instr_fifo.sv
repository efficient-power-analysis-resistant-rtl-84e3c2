// instr_fifo: instruction FIFO of the task scheduler.
//
// A small synchronous first-in first-out queue. The scheduler pushes a
// division task into it when the task cannot run on the PE its thread is
// bound to, and the GFAU takes tasks from its head before anything else.
// push and pop may occur in the same cycle; a push into a full FIFO or a pop
// from an empty one is an error (asserted). The head entry is visible on
// dout while empty is low. Depth and width are this design's choice: with two
// threads at most two tasks can wait.
module instr_fifo #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 2,
  parameter int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [DW-1:0] din,
  input  logic          pop,
  output logic [DW-1:0] dout,
  output logic          empty,
  output logic          full
);
  logic [DW-1:0] mem [DEPTH];
  logic [PW-1:0] rp, wp;
  logic [PW:0]   cnt;

  assign empty = (cnt == '0);
  assign full  = (cnt == (PW+1)'(DEPTH));
  assign dout  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
      mem <= '{default: '0};
    end else begin
      if (push) begin
        mem[wp] <= din;
        wp      <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
