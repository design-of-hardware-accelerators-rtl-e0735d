// tb_lda_det: 3x3 determinant kernel (the critical kernel of Linear
// Discriminant Analysis) run on the FP coprocessor.
//
// det(A) = A11(A22A33 - A23A32) - A12(A21A33 - A23A31) + A13(A21A32 - A22A31)
// is computed as six independent multiplies, three subtractions, three more
// multiplies and two add/subtracts, after nine FMV.W.X loads. The program runs
// for 50 random matrices in each of the four pipeline configurations (adder
// and multiplier each pipelined or bypassed). Checked:
//   - the determinant register against the in-order reference model;
//   - the cycle in which every instruction is accepted, against a schedule
//     computed from the unit latencies (FADD 4 or 0, FMUL 3 or 0, moves 1):
//     an instruction issues one cycle after its predecessor, or one cycle
//     after the last write-back of a register it reads or writes, whichever is
//     later;
//   - with a pipelined multiplier the six leading multiplies issue on six
//     consecutive cycles.
// The kernel's length in cycles for each configuration is printed.
module tb_lda_det;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  import fpu_isa_pkg::*;

  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, illegal;
  logic [31:0] instr = 0, int_rs1 = 0;
  logic int_wb_valid;
  logic [4:0] int_wb_rd;
  logic [31:0] int_wb_data;
  logic bypass_add_req = 0, bypass_mul_req = 0, bypass_add, bypass_mul, busy;
  logic [4:0] dbg_raddr = 0;
  logic [31:0] dbg_rdata;

  fpu_top dut (.clk, .rst_n, .instr_valid, .instr, .int_rs1, .instr_ready, .illegal,
               .int_wb_valid, .int_wb_rd, .int_wb_data, .bypass_add_req, .bypass_mul_req,
               .bypass_add, .bypass_mul, .busy, .dbg_raddr, .dbg_rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [31:0] shadow [32];
  int unsigned ready_at [32];   // first cycle a register may be used
  int unsigned last_issue;

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

  function automatic int unsigned lat(iop_e op);
    case (op)
      I_ADD, I_SUB: return bypass_add ? 0 : 4;
      I_MUL:        return bypass_mul ? 0 : 3;
      default:      return 1;
    endcase
  endfunction

  function automatic int unsigned umax(int unsigned x, int unsigned y);
    return x > y ? x : y;
  endfunction

  // Issue with an expected acceptance cycle from the latency model.
  task automatic issue(iop_e op, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2,
                       logic [31:0] xrs1, output int unsigned at);
    int unsigned expect_at;
    logic [31:0] r;
    expect_at = last_issue + 1;
    if (op != I_MVWX) begin
      expect_at = umax(expect_at, ready_at[rs1]);
      expect_at = umax(expect_at, ready_at[rs2]);
    end
    expect_at = umax(expect_at, ready_at[rd]);
    instr = enc(op, rd, rs1, rs2);
    int_rs1 = xrs1;
    instr_valid = 1;
    r = exec(op, rd, rs1, rs2, xrs1, shadow);
    #1;
    while (!instr_ready) begin
      @(negedge clk);
      #1;
    end
    at = cyc;
    check($sformatf("op %s accepted at %0d, expected %0d", op.name(), at, expect_at),
          last_issue == 0 || at == expect_at);
    ready_at[rd] = at + lat(op) + 1;
    last_issue = at;
    @(negedge clk);
    instr_valid = 0;
  endtask

  task automatic run_det(output int unsigned cycles);
    int unsigned t0, t, tm [6];
    logic [31:0] x;
    last_issue = 0;
    for (int r = 0; r < 32; r++) ready_at[r] = 0;
    // f1..f9 = A11, A12, A13, A21, A22, A23, A31, A32, A33
    for (int r = 1; r <= 9; r++) begin
      x = {1'($urandom), 8'($urandom_range(110, 140)), 23'($urandom)};
      issue(I_MVWX, 5'(r), 5'd0, 5'd0, x, t);
      if (r == 1) t0 = t;
    end
    issue(I_MUL, 5'd10, 5'd5, 5'd9, 0, tm[0]);   // A22*A33
    issue(I_MUL, 5'd11, 5'd6, 5'd8, 0, tm[1]);   // A23*A32
    issue(I_MUL, 5'd12, 5'd4, 5'd9, 0, tm[2]);   // A21*A33
    issue(I_MUL, 5'd13, 5'd6, 5'd7, 0, tm[3]);   // A23*A31
    issue(I_MUL, 5'd14, 5'd4, 5'd8, 0, tm[4]);   // A21*A32
    issue(I_MUL, 5'd15, 5'd5, 5'd7, 0, tm[5]);   // A22*A31
    check("six multiplies on consecutive cycles", tm[5] - tm[0] == 5);
    issue(I_SUB, 5'd16, 5'd10, 5'd11, 0, t);
    issue(I_SUB, 5'd17, 5'd12, 5'd13, 0, t);
    issue(I_SUB, 5'd18, 5'd14, 5'd15, 0, t);
    issue(I_MUL, 5'd19, 5'd1, 5'd16, 0, t);
    issue(I_MUL, 5'd20, 5'd2, 5'd17, 0, t);
    issue(I_MUL, 5'd21, 5'd3, 5'd18, 0, t);
    issue(I_SUB, 5'd22, 5'd19, 5'd20, 0, t);
    issue(I_ADD, 5'd23, 5'd22, 5'd21, 0, t);
    while (busy) @(negedge clk);
    cycles = cyc - t0;
    dbg_raddr = 5'd23;
    #1;
    check($sformatf("det = %h, expected %h", dbg_rdata, shadow[23]), dbg_rdata == shadow[23]);
  endtask

  initial begin
    int unsigned c;
    for (int r = 0; r < 32; r++) shadow[r] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 4; cfg++) begin
      bypass_add_req = cfg[0];
      bypass_mul_req = cfg[1];
      while (bypass_add != cfg[0] || bypass_mul != cfg[1]) @(negedge clk);
      for (int m = 0; m < 50; m++) run_det(c);
      $display("adder %s, multiplier %s: determinant kernel %0d cycles from first load to last write-back",
               cfg[0] ? "bypassed" : "pipelined", cfg[1] ? "bypassed" : "pipelined", c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
