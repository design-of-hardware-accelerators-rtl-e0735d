// tb_bypass_ctrl: self-checking testbench of bypass_ctrl.
//
// Toggles the requested mode at random while a model of a unit holds a random
// number of in-flight operations. Checks that pending reflects req != mode,
// that the mode never changes while the unit is busy, that it changes one
// clock after the unit is idle with a pending request, and that the switch
// counter counts every change.
module tb_bypass_ctrl;
  logic clk = 0, rst_n = 0, req = 0, busy = 0;
  logic mode, pending;
  logic [15:0] switches;
  int checks = 0, failures = 0, expected_switches = 0, inflight = 0;

  bypass_ctrl dut (.clk, .rst_n, .req, .busy, .mode, .pending, .switches);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check("reset mode is pipelined", mode == 0 && switches == 0);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      logic m0, sw;
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) req = ~req;
      if (!pending && $urandom_range(0, 2) == 0) inflight = inflight + $urandom_range(1, 4);
      busy = inflight != 0;
      #1;
      check("pending = req != mode", pending == (req != mode));
      m0 = mode;
      sw = pending && !busy;
      @(negedge clk);
      if (sw) expected_switches++;
      check($sformatf("mode after edge (busy=%0d)", busy), mode == (sw ? req : m0));
      check("switch count", switches == 16'(expected_switches));
      if (inflight > 0) inflight--;
    end
    check("switches happened", expected_switches > 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
