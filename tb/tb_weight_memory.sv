// tb_weight_memory: fills every row of a small weight memory (N = 6
// columns, W = 3, 18 rows) through the loading register, then reads each row
// twice: directly on rd_row one cycle after rd_en, and serially through the
// loading register after a capture, column 0 first.
module tb_weight_memory;
  localparam int unsigned N = 6, W = 3, DEPTH = N * W, A = $clog2(DEPTH);
  logic clk = 0, rst = 1;
  logic [A-1:0] addr = '0;
  logic rd_en = 0, wr_en = 0, lr_shift = 0, lr_in = 0, lr_capture = 0, lr_out;
  logic [N-1:0] rd_row;
  logic [N-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  weight_memory #(.N(N), .W(W)) dut (.clk, .rst, .addr, .rd_en, .wr_en, .rd_row,
                                     .lr_shift, .lr_in, .lr_out, .lr_capture);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = N'($urandom());
      for (int c = 0; c < N; c++) begin
        lr_shift = 1; lr_in = ref_mem[a][c];
        @(negedge clk);
      end
      lr_shift = 0;
      addr = A'(a); wr_en = 1;
      @(negedge clk);
      wr_en = 0;
    end
    for (int a = DEPTH - 1; a >= 0; a--) begin
      addr = A'(a); rd_en = 1;
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_row !== ref_mem[a]) begin
        failures++; $display("FAIL: row %0d read %h expected %h", a, rd_row, ref_mem[a]);
      end
      lr_capture = 1;
      @(negedge clk);
      lr_capture = 0;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (lr_out !== ref_mem[a][c]) begin
          failures++; $display("FAIL: row %0d column %0d read back wrong", a, c);
        end
        lr_shift = 1; lr_in = 0;
        @(negedge clk);
      end
      lr_shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
