// tb_instr_fifo: self-checking testbench of the instruction FIFO.
// Random push/pop traffic (never overflowing or underflowing) against a
// queue model; checks head data, empty and full every cycle.
module tb_instr_fifo;
  localparam int unsigned DW = 16, DEPTH = 2;
  logic clk = 1'b0, rst_n = 1'b0, push = 1'b0, pop = 1'b0;
  logic [DW-1:0] din = '0, dout;
  logic empty, full;
  logic [DW-1:0] q [$];
  int checks = 0, failures = 0;

  instr_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || (q.size() > 0 && dout !== q[0])) begin
        failures++;
        $display("FAIL cycle %0d size=%0d empty=%b full=%b", n, q.size(), empty, full);
      end
      pop  = (q.size() > 0) && ($urandom_range(0, 1) == 1);
      push = ((q.size() < DEPTH) || pop) && ($urandom_range(0, 2) != 0);
      din  = 16'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      push = 1'b0; pop = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
