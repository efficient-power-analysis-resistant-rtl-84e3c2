// tb_shared_mem: self-checking testbench of the shared memory.
// Writes every word with a random value, then reads all words back in a
// shuffled order and checks value and the one-cycle read latency; also checks
// that a read and a write in the same cycle return the old word.
module tb_shared_mem;
  localparam int unsigned WM = 80, DEPTH = 64, AW = 6;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WM-1:0] wdata = '0, rdata;
  logic [WM-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  shared_mem #(.WM(WM), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(k);
      wdata = {$urandom, $urandom, 16'($urandom)};
      model[k] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int k = 0; k < DEPTH; k++) begin
      int j = (k * 37 + 11) % DEPTH;
      re = 1'b1; raddr = AW'(j);
      @(negedge clk);
      re = 1'b0;
      checks++;
      if (rdata !== model[j]) begin failures++; $display("FAIL word %0d", j); end
    end
    // read-during-write returns the old value
    re = 1'b1; we = 1'b1; raddr = 6'd5; waddr = 6'd5; wdata = ~model[5];
    @(negedge clk);
    re = 1'b0; we = 1'b0;
    checks++;
    if (rdata !== model[5]) failures++;
    re = 1'b1;
    @(negedge clk);
    checks++;
    if (rdata !== ~model[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
