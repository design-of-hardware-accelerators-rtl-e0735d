// tb_fp_cmp: self-checking testbench of fp_cmp.
//
// Random operand pairs (often equal, close or signed zeros, with NaNs and
// infinities) are compared with each of EQ, LT and LE; each 0/1 result must
// match the reference one clock after in_valid, with its tag.
module tb_fp_cmp;
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
  cmp_e op = CMP_EQ;
  f32_t a = 0, b = 0;
  logic [31:0] result;
  logic [31:0] expv;
  logic [4:0]  tag_sent;

  fp_cmp dut (.clk, .rst_n, .in_valid, .in_tag, .op, .a, .b, .out_valid, .out_tag, .result);

  // Apply one operation and check the registered result one clock later.
  task automatic apply();
    expv = ref_cmp(a, b, int'(op));
    in_tag = 5'($urandom);
    tag_sent = in_tag;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check($sformatf("%s: in %h -> %h, expected %h", "fp_cmp", dut.a, result, expv), out_valid && result === expv);
    check("tag", out_tag == tag_sent);
    @(negedge clk);
    check("valid drops", !out_valid);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    a = 32'h0000_0000; b = 32'h8000_0000; op = CMP_EQ; apply();
    a = 32'h8000_0000; b = 32'h0000_0000; op = CMP_LT; apply();
    a = 32'h7FC0_0000; b = 32'h7FC0_0000; op = CMP_EQ; apply();
    a = 32'hBF80_0000; b = 32'h3F80_0000; op = CMP_LT; apply();
    a = 32'hC000_0000; b = 32'hBF80_0000; op = CMP_LE; apply();
    for (int i = 0; i < 20000; i++) begin
      a = rnd_f32(8'($urandom_range(1, 254)));
      case ($urandom_range(0, 3))
        0: b = a;
        1: b = rnd_f32(a[30:23]);
        2: b = {~a[31], a[30:0]};
        default: b = rnd_f32(8'($urandom_range(1, 254)));
      endcase
      op = cmp_e'($urandom_range(0, 2));
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
