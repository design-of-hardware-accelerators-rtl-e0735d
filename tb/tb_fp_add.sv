// tb_fp_add: self-checking testbench of the configurable-pipeline FP adder.
//
// Pipelined mode (bypass = 0): random operand pairs (biased toward subnormals,
// specials and close exponents, half of them subtractions) enter in random
// cycles; every result is compared bit for bit with the double-precision
// reference model and must appear exactly 4 cycles after its operands, with
// its tag. Bypass mode (bypass = 1): the result must be present in the same
// cycle, combinationally, and the pipeline flip-flops must not change (their
// clock is gated). Also checks the smallest-subnormal example 2^-149 + 2^-149
// and that both modes give identical results.
module tb_fp_add;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0, bypass = 0, in_valid = 0, sub = 0;
  logic [4:0] in_tag = 0;
  f32_t a = 0, b = 0;
  logic out_valid, busy;
  logic [4:0] out_tag;
  f32_t result;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  fp_add dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [31:0] exp; logic [4:0] tag; int unsigned c; logic [31:0] a, b; logic s; } exp_t;
  exp_t q[$];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pipelined mode: compare outputs at each falling edge, then drive.
  task automatic run_pipelined(int n);
    int sent = 0;
    while (sent < n || q.size() != 0) begin
      @(negedge clk);
      if (out_valid) begin
        exp_t e;
        if (q.size() == 0) check("unexpected output", 0);
        else begin
          e = q.pop_front();
          check($sformatf("add %h %s %h = %h, expected %h", e.a, e.s ? "-" : "+", e.b, result, e.exp),
                result === e.exp);
          check("tag", out_tag == e.tag);
          check($sformatf("latency %0d", cyc - e.c), cyc - e.c == 4);
        end
      end
      in_valid = 0;
      if (sent < n && $urandom_range(0, 3) != 0) begin
        a = rnd_f32(8'($urandom_range(1, 254)));
        b = rnd_f32(a[30:23]);
        sub = $urandom_range(0, 1);
        in_tag = 5'($urandom);
        in_valid = 1;
        q.push_back('{ref_add(a, b, sub), in_tag, cyc, a, b, sub});
        sent++;
      end
    end
  endtask

  initial begin
    logic [31:0] ff_before;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Example from the characterisation table: 1.40E-45 + 1.40E-45 = 2.80E-45.
    @(negedge clk);
    a = 32'h0000_0001; b = 32'h0000_0001; sub = 0; in_valid = 1; in_tag = 5'd3;
    q.push_back('{32'h0000_0002, 5'd3, cyc, a, b, 1'b0});
    run_pipelined(20000);
    @(negedge clk);
    check("not busy after drain", !busy);

    // Bypass mode: combinational, registers frozen.
    @(negedge clk);
    bypass = 1;
    @(negedge clk);
    ff_before = dut.u_r4.ff[31:0];
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      a = rnd_f32(8'($urandom_range(1, 254)));
      b = rnd_f32(a[30:23]);
      sub = $urandom_range(0, 1);
      in_tag = 5'($urandom);
      in_valid = 1;
      #1;
      check($sformatf("bypass add %h %h = %h exp %h", a, b, result, ref_add(a, b, sub)),
            result === ref_add(a, b, sub));
      check("bypass valid/tag", out_valid && out_tag == in_tag);
    end
    check("bypassed registers frozen", dut.u_r4.ff[31:0] == ff_before);
    check("busy low in bypass", !busy);
    @(negedge clk);
    a = 32'h0000_0001; b = 32'h0000_0001; sub = 0; #1;
    check("bypass 2^-149 + 2^-149", result == 32'h0000_0002);
    in_valid = 0;
    bypass = 0;
    @(negedge clk);
    run_pipelined(2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
