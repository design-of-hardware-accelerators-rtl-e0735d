// tb_bypass_reg: self-checking testbench of bypass_reg.
//
// Drives random data each cycle. With bypass = 0 the output must equal the
// input of the previous cycle; with bypass = 1 it must equal the current input
// in the same cycle. Also checks the asynchronous reset to zero.
module tb_bypass_reg;
  logic clk = 0, rst_n = 0, bypass = 0;
  logic [15:0] d = 0, q, prev;
  int checks = 0, failures = 0;

  bypass_reg #(.W(16)) dut (.clk, .rst_n, .bypass, .d, .q);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 16'hBEEF;
    repeat (2) @(negedge clk);
    check("reset clears", q == 16'h0);
    rst_n = 1;
    prev = d;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (!bypass) check($sformatf("registered q=%h exp %h", q, prev), q == prev);
      bypass = (i % 200) >= 100;
      d = 16'($urandom);
      #1;
      if (bypass) check("bypassed q follows d", q == d);
      prev = d;
      if (bypass) begin
        d = ~d;
        #1;
        check("bypassed q follows d within the cycle", q == d);
        prev = d;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
