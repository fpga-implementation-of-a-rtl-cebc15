// tb_config_regs: checks reset values (threshold of the default membrane
// curve, one period), writes and read-back of the settings, the read-only
// status registers and that unknown addresses read 0.
module tb_config_regs;
  import hsnn_pkg::*;
  localparam int unsigned P = 16;
  logic clk = 0, rst = 1, we = 0, busy = 0;
  logic [7:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata, steps = '0, rounds = '0, cycles = '0, spikes = '0;
  logic [P-1:0] threshold;
  logic [15:0] run_periods;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  config_regs #(.P(P)) dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata,
                            .threshold, .run_periods, .busy, .steps, .rounds, .cycles, .spikes);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input reg_addr_e a, input logic [31:0] exp);
    raddr = 8'(a); #1;
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL: reg %0d read %h expected %h", a, rdata, exp); end
  endtask

  initial begin
    logic [31:0] v;
    @(negedge clk); @(negedge clk);
    rst = 0;
    rd(REG_THRESHOLD, 32'hF800);
    rd(REG_PERIODS, 32'd1);
    checks++; if (threshold !== 16'hF800) failures++;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      v = $urandom();
      we = 1; waddr = 8'(REG_THRESHOLD); wdata = v;
      @(negedge clk);
      waddr = 8'(REG_PERIODS); wdata = ~v;
      @(negedge clk);
      waddr = 8'(REG_STATUS); wdata = 32'hFFFF_FFFF;   // read-only: ignored
      @(negedge clk);
      we = 0;
      rd(REG_THRESHOLD, {16'h0, v[15:0]});
      rd(REG_PERIODS, {16'h0, ~v[15:0]});
      checks++; if (threshold !== v[15:0] || run_periods !== ~v[15:0]) failures++;
      busy = v[3]; steps = $urandom(); rounds = $urandom(); cycles = $urandom(); spikes = $urandom();
      rd(REG_STATUS, {31'h0, v[3]});
      rd(REG_STEPS, steps);
      rd(REG_ROUNDS, rounds);
      rd(REG_CYCLES, cycles);
      rd(REG_SPIKES, spikes);
      raddr = 8'(7 + i); #1;
      checks++; if (rdata !== 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
