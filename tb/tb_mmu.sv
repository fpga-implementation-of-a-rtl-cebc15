// tb_mmu: checks the membrane model unit. From 0 the potential must follow
// the 4-segment curve (increments 512, 256, 128, 64 by segment) and fire
// after exactly 448 time steps with the default threshold, then reset. It
// checks loading through the potential chain, the serial rotation through
// the adder path, saturation on overflow, and firing after a propagation
// step only for a neuron that is not refractory.
module tb_mmu;
  import hsnn_pkg::*;
  localparam int unsigned P = 16;
  logic clk = 0, rst = 1;
  slice_ctrl_t ctrl = '0;
  logic [P-1:0] threshold, pot_in = '0, pot_out;
  logic pot_bit, sum_bit = 0, ovf = 0, fire, refractory;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mmu #(.P(P)) dut (.clk, .rst, .ctrl, .threshold, .pot_in, .pot_out, .pot_bit,
                    .sum_bit, .ovf, .fire, .refractory);

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

  task automatic load(input logic [P-1:0] v);
    ctrl = '0; ctrl.pot_shift = 1; pot_in = v;
    @(negedge clk);
    ctrl = '0;
  endtask

  initial begin
    int unsigned refv, steps;
    logic [P-1:0] v;
    threshold = P'(default_threshold(P));
    @(negedge clk); @(negedge clk);
    rst = 0;
    // full period from 0
    load('0);
    chk(!refractory, "load clears refractory");
    refv = 0; steps = 0;
    forever begin
      ctrl = '0; ctrl.evolve = 1; #1;
      steps++;
      refv = refv + (1 << (9 - (refv >> 14)));
      if (fire) break;
      @(negedge clk);
      chk(pot_out == P'(refv), $sformatf("step %0d potential %0d expected %0d", steps, pot_out, refv));
      if (steps > 1000) break;
    end
    chk(steps == 448, $sformatf("period %0d steps, expected 448", steps));
    @(negedge clk);
    ctrl = '0;
    chk(pot_out == 0 && refractory, "reset after firing");
    // a non-firing step clears the refractory flag
    ctrl.evolve = 1; @(negedge clk); ctrl = '0;
    chk(!refractory && pot_out == 512, "evolve after reset");
    // serial rotation, identity adder: value unchanged; then saturation
    for (int t = 0; t < 20; t++) begin
      v = P'($urandom());
      load(v);
      for (int b = 0; b < P; b++) begin
        ctrl = '0; ctrl.step = 1; ctrl.last = (b == P - 1);
        #1; chk(pot_bit == v[b], "serial bit order");
        sum_bit = ~pot_bit;       // complement every bit on the way round
        ovf = (t % 4 == 0) && (b == P - 1);
        @(negedge clk);
      end
      ctrl = '0; ovf = 0;
      chk(pot_out == ((t % 4 == 0) ? '1 : ~v), "serial rotation / saturation");
      // threshold check after propagation
      ctrl.check = 1; #1;
      chk(fire == (pot_out >= threshold), "check fire");
      @(negedge clk); ctrl = '0;
      if (pot_out == 0) begin
        chk(refractory, "refractory after check fire");
        ctrl.check = 1; #1; chk(!fire, "no second fire"); @(negedge clk); ctrl = '0;
      end
    end
    // saturating time step near the top with a high threshold
    threshold = '1;
    load('1 - 10);
    ctrl.evolve = 1; #1; chk(fire, "fires at saturation"); @(negedge clk); ctrl = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
