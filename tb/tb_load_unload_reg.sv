// tb_load_unload_reg: checks the serial-to-parallel loading register: after
// N serial bits the first sits in column 0, the bits leave column 0 first,
// and a parallel capture is shifted out in column order.
module tb_load_unload_reg;
  localparam int unsigned N = 12;
  logic clk = 0, rst = 1, shift = 0, serial_in = 0, capture = 0;
  logic serial_out;
  logic [N-1:0] row_in = '0, row_out, ref_row;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  load_unload_reg #(.N(N)) dut (.clk, .rst, .shift, .serial_in, .serial_out,
                                .capture, .row_in, .row_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL: %s %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [N-1:0] data;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int t = 0; t < 20; t++) begin
      // serial load of a random row, column 0 first
      data = N'($urandom());
      for (int c = 0; c < N; c++) begin
        shift = 1; serial_in = data[c];
        @(negedge clk);
      end
      shift = 0;
      chk(row_out, data, "serial load");
      // capture another row and read it back serially
      data = N'($urandom());
      row_in = data; capture = 1; shift = 1;   // capture wins
      @(negedge clk);
      capture = 0; shift = 0;
      chk(row_out, data, "capture");
      for (int c = 0; c < N; c++) begin
        checks++;
        if (serial_out !== data[c]) begin failures++; $display("FAIL: serial out bit %0d", c); end
        shift = 1; serial_in = 1'b0;
        @(negedge clk);
      end
      shift = 0;
      chk(row_out, '0, "shifted empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
