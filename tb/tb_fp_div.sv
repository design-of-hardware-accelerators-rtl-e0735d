// tb_fp_div: self-checking testbench of fp_div.
//
// Random operand pairs (biased toward subnormals, specials, overflow and
// underflow) enter in random cycles, back to back or with gaps; every quotient
// is compared bit for bit with the double-precision reference model and must
// appear exactly 9 cycles after its operands, with its tag. It first sends
// the characterisation examples built from subnormal multiples of 2^-149:
// 1/1 = 1, 2/1 = 2, 6/2 = 3, 16/5 = 3.2, 35/16 = 2.1875, and
// 1.44E-28 / 5.18E-44 (about 2.78E+15).
module tb_fp_div;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [4:0] in_tag = 0;
  f32_t a = 0, b = 0;
  logic out_valid;
  logic [4:0] out_tag;
  f32_t result;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  fp_div dut (.clk, .rst_n, .in_valid, .in_tag, .a, .b, .out_valid, .out_tag, .result);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [31:0] exp; logic [4:0] tag; int unsigned c; logic [31:0] a, b; } exp_t;
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

  task automatic send(logic [31:0] x, logic [31:0] y);
    a = x;
    b = y;
    in_tag = 5'($urandom);
    in_valid = 1;
    q.push_back('{ref_div(a, b), in_tag, cyc, a, b});
  endtask

  task automatic compare();
    exp_t e;
    if (!out_valid) return;
    if (q.size() == 0) begin
      check("unexpected output", 0);
      return;
    end
    e = q.pop_front();
    check($sformatf("%h, %h -> %h, expected %h", e.a, e.b, result, e.exp), result === e.exp);
    check("tag", out_tag == e.tag);
    check($sformatf("latency %0d", cyc - e.c), cyc - e.c == 9);
  endtask

  initial begin
    int sent;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // The expected values of the examples agree with the printed values.
    check("1.40E-45 / 1.40E-45 = 1", ref_div(32'd1, 32'd1) == 32'h3F80_0000);
    check("8.41E-45 / 2.80E-45 = 3", ref_div(32'd6, 32'd2) == 32'h4040_0000);
    check("2.24E-44 / 7.01E-45 = 3.2", ref_div(32'd16, 32'd5) == 32'h404C_CCCD);
    check("1.44E-28 / 5.18E-44 ~ 2.78E+15", f2r(ref_div(r2f(1.44e-28), r2f(5.18e-44))) > 2.775e15
                                             && f2r(ref_div(r2f(1.44e-28), r2f(5.18e-44))) < 2.785e15);
    @(negedge clk);
    compare();
    send(32'd1, 32'd1);
    @(negedge clk);
    compare();
    send(32'd2, 32'd1);
    @(negedge clk);
    compare();
    send(32'd6, 32'd2);
    @(negedge clk);
    compare();
    send(32'd16, 32'd5);
    @(negedge clk);
    compare();
    send(r2f(1.44e-28), r2f(5.18e-44));
    @(negedge clk);
    compare();
    send(32'd35, 32'd16);
    sent = 0;
    while (sent < 20000 || q.size() != 0) begin
      @(negedge clk);
      compare();
      in_valid = 0;
      if (sent < 20000 && $urandom_range(0, 3) != 0) begin
        send(rnd_f32(8'($urandom_range(1, 254))), rnd_f32(8'($urandom_range(1, 254))));
        sent++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
