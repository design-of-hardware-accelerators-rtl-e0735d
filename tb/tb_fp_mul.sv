// tb_fp_mul: self-checking testbench of the configurable-pipeline FP multiplier.
//
// Pipelined mode (bypass = 0): random operand pairs (biased toward subnormals,
// specials, overflow and underflow) enter in random cycles; every result is
// compared bit for bit with the double-precision reference model and must
// appear exactly 3 cycles after its operands, with its tag. Bypass mode
// (bypass = 1): the result must be present in the same cycle and the pipeline
// flip-flops must not change (their clock is gated). Also checks the
// characterisation example 5.55E-28 x 2.34E+34 = 1.30E+07 to three digits.
module tb_fp_mul;
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

  fp_mul dut (.clk, .rst_n, .bypass, .in_valid, .in_tag, .a, .b, .out_valid, .out_tag, .result, .busy);

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
          check($sformatf("mul %h * %h = %h, expected %h", e.a, e.b, result, e.exp),
                result === e.exp);
          check("tag", out_tag == e.tag);
          check($sformatf("latency %0d", cyc - e.c), cyc - e.c == 3);
        end
      end
      in_valid = 0;
      if (sent < n && $urandom_range(0, 3) != 0) begin
        a = rnd_f32(8'($urandom_range(1, 254)));
        b = rnd_f32(8'($urandom_range(1, 254)));
        sub = $urandom_range(0, 1);
        in_tag = 5'($urandom);
        in_valid = 1;
        q.push_back('{ref_mul(a, b), in_tag, cyc, a, b, sub});
        sent++;
      end
    end
  endtask

  initial begin
    logic [31:0] ff_before;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Smallest subnormal times 2: exact.
    @(negedge clk);
    a = 32'h0000_0001; b = 32'h4000_0000; sub = 0; in_valid = 1; in_tag = 5'd3;
    q.push_back('{32'h0000_0002, 5'd3, cyc, a, b, 1'b0});
    run_pipelined(20000);
    @(negedge clk);
    check("not busy after drain", !busy);

    // Bypass mode: combinational, registers frozen.
    @(negedge clk);
    bypass = 1;
    @(negedge clk);
    ff_before = dut.u_r3.ff[31:0];
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      a = rnd_f32(8'($urandom_range(1, 254)));
      b = rnd_f32(8'($urandom_range(1, 254)));
      sub = $urandom_range(0, 1);
      in_tag = 5'($urandom);
      in_valid = 1;
      #1;
      check($sformatf("bypass add %h %h = %h exp %h", a, b, result, ref_mul(a, b)),
            result === ref_mul(a, b));
      check("bypass valid/tag", out_valid && out_tag == in_tag);
    end
    check("bypassed registers frozen", dut.u_r3.ff[31:0] == ff_before);
    check("busy low in bypass", !busy);
    @(negedge clk);
    a = r2f(5.55e-28); b = r2f(2.34e34); #1;
    check("bypass 5.55E-28 x 2.34E+34 ~ 1.30E+07",
          f2r(result) > 1.295e7 && f2r(result) < 1.305e7 && result == ref_mul(a, b));
    in_valid = 0;
    bypass = 0;
    @(negedge clk);
    run_pipelined(2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
