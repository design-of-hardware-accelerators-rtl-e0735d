// tb_float2int: self-checking testbench of float2int.
//
// Random single-precision values (biased toward the integer range, the
// saturation limits, NaN and infinities), converted signed and unsigned; each
// result must match the truncating, saturating reference one clock after
// in_valid, with its tag.
module tb_float2int;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

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
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic in_valid = 0, out_valid;
  logic [4:0] in_tag = 0, out_tag;
  logic uns = 0;
  f32_t a = 0;
  logic [31:0] result;
  logic [31:0] expv;
  logic [4:0]  tag_sent;

  float2int dut (.clk, .rst_n, .in_valid, .in_tag, .uns, .a, .out_valid, .out_tag, .result);

  // Apply one operation and check the registered result one clock later.
  task automatic apply();
    expv = ref_f2i(a, uns);
    in_tag = 5'($urandom);
    tag_sent = in_tag;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check($sformatf("%s: in %h -> %h, expected %h", "float2int", dut.a, result, expv), out_valid && result === expv);
    check("tag", out_tag == tag_sent);
    @(negedge clk);
    check("valid drops", !out_valid);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    a = 32'h4F00_0000; uns = 0; apply();   // 2^31: saturates
    a = 32'hCF00_0000; uns = 0; apply();   // -2^31: exact
    a = 32'h4F80_0000; uns = 1; apply();   // 2^32: saturates
    a = 32'hBF00_0000; uns = 1; apply();   // -0.5 unsigned: 0
    a = 32'hC0A0_0000; uns = 0; apply();   // -5
    a = 32'h7FC0_0000; uns = 0; apply();   // NaN
    for (int i = 0; i < 20000; i++) begin
      uns = $urandom_range(0, 1);
      a = rnd_f32(8'($urandom_range(120, 160)));
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
