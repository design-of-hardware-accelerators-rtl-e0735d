// tb_int2float: self-checking testbench of int2float.
//
// Random 32-bit integers (uniform, small, near the 2^24 rounding limit and the
// extremes), signed and unsigned, are converted; each result must match the
// reference model bit for bit one clock after in_valid, with its tag.
module tb_int2float;
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
  logic [31:0] a = 0;
  f32_t result;
  logic [31:0] expv;
  logic [4:0]  tag_sent;

  int2float dut (.clk, .rst_n, .in_valid, .in_tag, .uns, .a, .out_valid, .out_tag, .result);

  // Apply one operation and check the registered result one clock later.
  task automatic apply();
    expv = ref_i2f(a, uns);
    in_tag = 5'($urandom);
    tag_sent = in_tag;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check($sformatf("%s: in %h -> %h, expected %h", "int2float", dut.a, result, expv), out_valid && result === expv);
    check("tag", out_tag == tag_sent);
    @(negedge clk);
    check("valid drops", !out_valid);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    a = 32'd0; uns = 0; apply();
    a = 32'hFFFF_FFFF; uns = 0; apply();
    a = 32'hFFFF_FFFF; uns = 1; apply();
    a = 32'h8000_0000; uns = 0; apply();
    a = 32'h0100_0001; uns = 1; apply();
    a = 32'h0100_0003; uns = 1; apply();
    for (int i = 0; i < 20000; i++) begin
      uns = $urandom_range(0, 1);
      case ($urandom_range(0, 3))
        0: a = $urandom;
        1: a = 32'($urandom_range(0, 1000)) - 32'd500;
        2: a = 32'h0100_0000 + 32'($urandom_range(0, 64)) - 32'd32;
        default: a = {$urandom_range(0, 1) ? 2'b10 : 2'b01, 30'($urandom)};
      endcase
      apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
