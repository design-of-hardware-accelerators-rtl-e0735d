// tb_fpu_top: end-to-end testbench of the FP coprocessor, at its default size.
//
// 1. Issue distances: a result-producing instruction followed by one that
//    reads its result. The second is accepted exactly latency + 1 cycles after
//    the first: FADD 5 (pipelined) or 1 (bypassed), FMUL 4 or 1, FDIV 10,
//    FSQRT 13, so register locking stalls for exactly the unit latency.
// 2. Random programs: about 20000 instructions over a few registers (so that
//    many are dependent), all instruction kinds, random idle cycles, and
//    random requests to switch the adder and multiplier between pipelined and
//    bypassed mode while instructions are in flight. The in-order reference
//    model fpu_isa_pkg gives every integer result, checked in order, and the
//    whole register file, checked through the debug port after each batch.
// Each mechanism must occur at least once (a failure is counted otherwise):
// lock stalls, stalls for a pending mode switch, both switch directions for
// both units, bypassed and pipelined adds and multiplies, a bypassed operation
// issued and written back in one cycle, several write-backs in one cycle, every
// unit, and an illegal instruction.
module tb_fpu_top;
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
  logic [31:0] shadow [32];
  logic [36:0] int_q [$];

  // mechanism counters
  int n_lock_stall = 0, n_mode_stall = 0, n_illegal = 0, n_multi_wb = 0, n_same_cycle = 0;
  int n_add_bp = 0, n_add_pipe = 0, n_mul_bp = 0, n_mul_pipe = 0, n_div = 0, n_sqrt = 0;
  int n_i2f = 0, n_f2i = 0, n_cmp = 0, n_mv = 0;
  int n_add_to_bp = 0, n_add_to_pipe = 0, n_mul_to_bp = 0, n_mul_to_pipe = 0;
  logic prev_bpa = 0, prev_bpm = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      int nwe;
      nwe = 0;
      for (int p = 0; p < 6; p++) if (dut.we[p]) nwe++;
      if (nwe > 1) n_multi_wb++;
      if (instr_valid && !instr_ready) begin
        if (dut.hazard) n_lock_stall++;
        else n_mode_stall++;
      end
      if (illegal) n_illegal++;
      if (dut.issue) begin
        case (dut.dec.unit)
          U_ADD:  if (bypass_add) n_add_bp++; else n_add_pipe++;
          U_MUL:  if (bypass_mul) n_mul_bp++; else n_mul_pipe++;
          U_DIV:  n_div++;
          U_SQRT: n_sqrt++;
          U_I2F:  n_i2f++;
          U_F2I:  n_f2i++;
          U_CMP:  n_cmp++;
          default: n_mv++;
        endcase
        if ((dut.dec.unit == U_ADD && bypass_add && dut.we[0] && dut.waddr[0] == dut.dec.rd) ||
            (dut.dec.unit == U_MUL && bypass_mul && dut.we[1] && dut.waddr[1] == dut.dec.rd))
          n_same_cycle++;
      end
      if (bypass_add != prev_bpa) begin if (bypass_add) n_add_to_bp++; else n_add_to_pipe++; end
      if (bypass_mul != prev_bpm) begin if (bypass_mul) n_mul_to_bp++; else n_mul_to_pipe++; end
      prev_bpa <= bypass_add;
      prev_bpm <= bypass_mul;
      if (int_wb_valid) begin
        logic [36:0] e;
        if (int_q.size() == 0) check("unexpected integer result", 0);
        else begin
          e = int_q.pop_front();
          check($sformatf("int result x%0d = %h, expected x%0d = %h", int_wb_rd, int_wb_data,
                          e[36:32], e[31:0]), int_wb_rd == e[36:32] && int_wb_data == e[31:0]);
        end
      end
    end
  end

  // Offer one instruction from a falling edge until it is accepted; returns
  // the cycle number of acceptance. The reference model executes it.
  task automatic issue(iop_e op, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2,
                       logic [31:0] xrs1, output int unsigned at);
    logic [31:0] r;
    instr = enc(op, rd, rs1, rs2);
    int_rs1 = xrs1;
    instr_valid = 1;
    r = exec(op, rd, rs1, rs2, xrs1, shadow);
    if (int_dest(op)) int_q.push_back({rd, r});
    #1;
    while (!instr_ready) begin
      @(negedge clk);
      #1;
    end
    at = cyc;
    @(negedge clk);
    instr_valid = 0;
  endtask

  task automatic drain_and_compare();
    instr_valid = 0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    check("all integer results seen", int_q.size() == 0);
    for (int r = 0; r < 32; r++) begin
      dbg_raddr = 5'(r);
      #1;
      check($sformatf("f%0d = %h, expected %h", r, dbg_rdata, shadow[r]), dbg_rdata == shadow[r]);
    end
  endtask

  task automatic set_modes(logic add_bp, logic mul_bp);
    bypass_add_req = add_bp;
    bypass_mul_req = mul_bp;
    while (bypass_add != add_bp || bypass_mul != mul_bp) @(negedge clk);
  endtask

  // Producer then dependent consumer; returns the acceptance distance.
  task automatic distance(iop_e op, output int unsigned d);
    int unsigned t0, t1;
    issue(op, 5'd10, 5'd1, 5'd2, 0, t0);
    issue(I_ADD, 5'd11, 5'd10, 5'd10, 0, t1);
    d = t1 - t0;
  endtask

  initial begin
    int unsigned d, t;
    for (int r = 0; r < 32; r++) shadow[r] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1. issue distances ----
    issue(I_MVWX, 5'd1, 5'd0, 5'd0, 32'h4049_0FDB, t);   // 3.14159
    issue(I_MVWX, 5'd2, 5'd0, 5'd0, 32'h402D_F854, t);   // 2.71828
    set_modes(0, 0);
    distance(I_ADD, d);  check($sformatf("pipelined FADD distance %0d", d), d == 5);
    distance(I_MUL, d);  check($sformatf("pipelined FMUL distance %0d", d), d == 4);
    distance(I_DIV, d);  check($sformatf("FDIV distance %0d", d), d == 10);
    distance(I_SQRT, d); check($sformatf("FSQRT distance %0d", d), d == 13);
    drain_and_compare();
    set_modes(1, 1);
    distance(I_ADD, d);  check($sformatf("bypassed FADD distance %0d", d), d == 1);
    distance(I_MUL, d);  check($sformatf("bypassed FMUL distance %0d", d), d == 1);
    drain_and_compare();

    // an unsupported instruction is dropped
    @(negedge clk);
    instr = 32'h0000_0013; instr_valid = 1;   // integer ADDI
    #1;
    check("illegal flagged and accepted", illegal && instr_ready);
    @(negedge clk);
    instr_valid = 0;

    // ---- 2. random programs ----
    for (int batch = 0; batch < 20; batch++) begin
      for (int i = 0; i < 1000; i++) begin
        iop_e op;
        logic [4:0] rd, rs1, rs2;
        logic [31:0] x;
        int k;
        k = $urandom_range(0, 99);
        if (k < 22) op = I_ADD;
        else if (k < 30) op = I_SUB;
        else if (k < 50) op = I_MUL;
        else if (k < 54) op = I_DIV;
        else if (k < 57) op = I_SQRT;
        else if (k < 75) op = I_MVWX;
        else op = iop_e'($urandom_range(int'(I_I2F), int'(I_MVXW)));
        rd  = 5'($urandom_range(0, 7));
        rs1 = 5'($urandom_range(0, 7));
        rs2 = 5'($urandom_range(0, 7));
        x   = (op == I_MVWX) ? rnd_f32(8'($urandom_range(100, 150))) : $urandom;
        if ($urandom_range(0, 60) == 0) bypass_add_req = ~bypass_add_req;
        if ($urandom_range(0, 60) == 0) bypass_mul_req = ~bypass_mul_req;
        issue(op, rd, rs1, rs2, x, t);
        if ($urandom_range(0, 4) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      drain_and_compare();
    end

    // ---- mechanisms ----
    check("lock stalls",          n_lock_stall > 0);
    check("mode-switch stalls",   n_mode_stall > 0);
    check("adder to bypass",      n_add_to_bp > 0);
    check("adder to pipelined",   n_add_to_pipe > 0);
    check("mult to bypass",       n_mul_to_bp > 0);
    check("mult to pipelined",    n_mul_to_pipe > 0);
    check("bypassed adds",        n_add_bp > 0);
    check("pipelined adds",       n_add_pipe > 0);
    check("bypassed multiplies",  n_mul_bp > 0);
    check("pipelined multiplies", n_mul_pipe > 0);
    check("same-cycle write-back", n_same_cycle > 0);
    check("multiple write-backs", n_multi_wb > 0);
    check("div, sqrt, conversions, compares, moves",
          n_div > 0 && n_sqrt > 0 && n_i2f > 0 && n_f2i > 0 && n_cmp > 0 && n_mv > 0);
    check("illegal instruction",  n_illegal > 0);
    $display("lock stalls %0d, mode stalls %0d, switches add %0d/%0d mul %0d/%0d",
             n_lock_stall, n_mode_stall, n_add_to_bp, n_add_to_pipe, n_mul_to_bp, n_mul_to_pipe);
    $display("add bp/pipe %0d/%0d, mul bp/pipe %0d/%0d, div %0d, sqrt %0d, same-cycle %0d, multi-wb %0d",
             n_add_bp, n_add_pipe, n_mul_bp, n_mul_pipe, n_div, n_sqrt, n_same_cycle, n_multi_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
