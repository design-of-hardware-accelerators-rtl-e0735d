// tb_fp_sqrt: self-checking testbench of fp_sqrt.
//
// Random operands (biased toward subnormals and specials, half of them
// negative) enter in random cycles; every root is compared bit for bit with
// the double-precision reference model and must appear exactly 12 cycles
// after its operand, with its tag. It first sends characterisation examples:
// sqrt(2^-149) (about 3.74E-23), sqrt(2.70E-42), sqrt(1.58E-38), a negative
// operand (NaN), sqrt(5.51E-28), sqrt(3.24E-39) and sqrt(4) = 2.
module tb_fp_sqrt;
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

  fp_sqrt dut (.clk, .rst_n, .in_valid, .in_tag, .a, .out_valid, .out_tag, .result);

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
    q.push_back('{ref_sqrt(a), in_tag, cyc, a, b});
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
    check($sformatf("latency %0d", cyc - e.c), cyc - e.c == 12);
  endtask

  initial begin
    int sent;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // The expected values of the examples agree with the printed 3-digit values.
    check("sqrt(1.40E-45) ~ 3.74E-23", f2r(ref_sqrt(32'd1)) > 3.735e-23 && f2r(ref_sqrt(32'd1)) < 3.745e-23);
    check("sqrt(5.51E-28) ~ 2.35E-14", f2r(ref_sqrt(r2f(5.51e-28))) > 2.345e-14 && f2r(ref_sqrt(r2f(5.51e-28))) < 2.355e-14);
    check("sqrt(3.24E-39) ~ 5.69E-20", f2r(ref_sqrt(r2f(3.24e-39))) > 5.685e-20 && f2r(ref_sqrt(r2f(3.24e-39))) < 5.695e-20);
    @(negedge clk);
    compare();
    send(32'd1, 32'd0);
    @(negedge clk);
    compare();
    send(r2f(2.70e-42), 32'd0);
    @(negedge clk);
    compare();
    send(r2f(1.58e-38), 32'd0);
    @(negedge clk);
    compare();
    send(r2f(-1.47e-12), 32'd0);
    @(negedge clk);
    compare();
    send(r2f(5.51e-28), 32'd0);
    @(negedge clk);
    compare();
    send(r2f(3.24e-39), 32'd0);
    @(negedge clk);
    compare();
    send(32'h4080_0000, 32'd0);
    sent = 0;
    while (sent < 20000 || q.size() != 0) begin
      @(negedge clk);
      compare();
      in_valid = 0;
      if (sent < 20000 && $urandom_range(0, 3) != 0) begin
        send(rnd_f32(8'($urandom_range(1, 254))), 32'd0);
        sent++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
