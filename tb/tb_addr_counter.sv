// tb_addr_counter: checks the weight memory address counter against a
// reference count: random clear and increment requests over a small depth,
// so the counter wraps after DEPTH-1 many times.
module tb_addr_counter;
  localparam int unsigned DEPTH = 13;
  localparam int unsigned A = $clog2(DEPTH);
  logic clk = 0, rst = 1, clear = 0, inc = 0;
  logic [A-1:0] addr;
  int checks = 0, failures = 0, wraps = 0;
  int unsigned ref_addr;

  always #5 clk = ~clk;
  addr_counter #(.DEPTH(DEPTH)) dut (.clk, .rst, .clear, .inc, .addr);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0; ref_addr = 0;
    for (int i = 0; i < 1000; i++) begin
      clear = ($urandom_range(40) == 0);
      inc   = ($urandom_range(3) != 0);
      @(negedge clk);
      if (clear) ref_addr = 0;
      else if (inc) begin
        if (ref_addr == DEPTH - 1) wraps++;
        ref_addr = (ref_addr + 1) % DEPTH;
      end
      checks++;
      if (addr != A'(ref_addr)) begin
        failures++;
        $display("FAIL: step %0d addr %0d expected %0d", i, addr, ref_addr);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
