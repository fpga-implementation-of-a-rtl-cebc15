// tb_com_controller: checks the host command decoder: each command becomes
// the matching one-cycle request or register write, responses (register
// read, weight bit, potential word) arrive the cycle after the command with
// the right data, and commands other than register reads wait while the
// controller is busy.
module tb_com_controller;
  import hsnn_pkg::*;
  localparam int unsigned P = 16;
  logic clk = 0, rst = 1;
  logic cmd_valid = 0, cmd_ready;
  cmd_op_e cmd_op = CMD_NOP;
  logic [7:0] cmd_addr = '0;
  logic [31:0] cmd_data = '0, rsp_data, reg_wdata, reg_rdata = '0;
  logic rsp_valid, reg_we, ctrl_idle = 1, lr_out = 0;
  logic [7:0] reg_addr;
  host_req_t host_req;
  logic [P-1:0] pot_in, pot_out = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  com_controller #(.P(P)) dut (.clk, .rst, .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_data,
    .rsp_valid, .rsp_data, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .ctrl_idle, .host_req,
    .lr_out, .pot_in, .pot_out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    cmd_op_e op;
    host_req_t exp;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      op = cmd_op_e'($urandom_range(8));
      d = $urandom();
      ctrl_idle = ($urandom_range(3) != 0);
      reg_rdata = $urandom(); lr_out = 1'($urandom()); pot_out = P'($urandom());
      cmd_valid = 1; cmd_op = op; cmd_addr = 8'($urandom()); cmd_data = d;
      #1;
      chk(cmd_ready == (ctrl_idle || op == CMD_REG_READ || op == CMD_NOP), "ready");
      exp = '0;
      if (cmd_ready) begin
        exp.waddr_clear = (op == CMD_WADDR_CLEAR);
        exp.wbit_shift  = (op == CMD_WBIT_SHIFT);
        exp.wbit        = (op == CMD_WBIT_SHIFT) && d[0];
        exp.wrow_write  = (op == CMD_WROW_WRITE);
        exp.wrow_read   = (op == CMD_WROW_READ);
        exp.pot_shift   = (op == CMD_POT_SHIFT);
        exp.run         = (op == CMD_RUN);
      end
      chk(host_req == exp, $sformatf("request for op %0d", op));
      chk(reg_we == (cmd_ready && op == CMD_REG_WRITE) && reg_addr == cmd_addr && reg_wdata == d,
          "register write");
      chk(pot_in == d[P-1:0], "potential data");
      @(negedge clk);
      cmd_valid = 0;
      if (exp != '0 || op == CMD_REG_WRITE || !cmd_ready || op == CMD_NOP || op == CMD_RUN)
        chk(!rsp_valid || op == CMD_WBIT_SHIFT || op == CMD_POT_SHIFT || op == CMD_REG_READ, "no response");
      if (cmd_ready && op == CMD_REG_READ)  chk(rsp_valid && rsp_data == reg_rdata, "register read response");
      if (cmd_ready && op == CMD_WBIT_SHIFT) chk(rsp_valid && rsp_data == 32'(lr_out), "bit response");
      if (cmd_ready && op == CMD_POT_SHIFT) chk(rsp_valid && rsp_data == 32'(pot_out), "potential response");
      if (!cmd_ready) chk(!rsp_valid, "no response when not taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
