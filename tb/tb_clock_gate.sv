// tb_clock_gate: self-checking testbench of clock_gate.
//
// Counts rising edges of the gated clock over windows where the enable is held
// high or low, and changes the enable in the high phase of clk to show that
// the change takes effect only from the next clock period, without glitches.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0, edges = 0;

  clock_gate dut (.clk, .en, .gclk);

  always #5 clk = ~clk;
  always @(posedge gclk) edges++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      int n;
      logic e;
      n = $urandom_range(1, 20);
      e = $urandom_range(0, 1);
      @(negedge clk);
      en = e;
      edges = 0;
      repeat (n) @(negedge clk);
      check($sformatf("en=%0d: %0d edges in %0d cycles", e, edges, n), edges == (e ? n : 0));
      // change enable while clk is high: gclk must not change now
      @(posedge clk);
      #1;
      en = ~en;
      #1;
      check("no change while clk high", gclk == e);
      en = e;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
