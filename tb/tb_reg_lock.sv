// tb_reg_lock: self-checking testbench of reg_lock.
//
// Drives random lock and unlock requests that respect the locking protocol
// (only free registers are locked, only locked registers are released, a
// register may be locked and released in the same cycle), tracks a shadow
// lock table, and checks the lock vector and the hazard answer for random
// operand queries every cycle.
module tb_reg_lock;
  localparam int NREGS = 32, NCLR = 6, NQ = 3;
  logic clk = 0, rst_n = 0;
  logic set_en = 0;
  logic [4:0] set_addr = 0;
  logic clr_en [NCLR];
  logic [4:0] clr_addr [NCLR];
  logic q_use [NQ];
  logic [4:0] q_addr [NQ];
  logic hazard;
  logic [NREGS-1:0] locks, shadow = '0;
  int checks = 0, failures = 0, stalls = 0;

  reg_lock #(.NREGS(NREGS), .NCLR(NCLR), .NQ(NQ)) dut (.clk, .rst_n, .set_en, .set_addr, .clr_en,
                                                       .clr_addr, .q_use, .q_addr, .hazard, .locks);

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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NCLR; p++) begin clr_en[p] = 0; clr_addr[p] = 0; end
    for (int k = 0; k < NQ; k++) begin q_use[k] = 0; q_addr[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      logic [NREGS-1:0] nxt, cl;
      logic exp_h;
      @(negedge clk);
      check($sformatf("locks %h exp %h", locks, shadow), locks == shadow);
      exp_h = 0;
      for (int k = 0; k < NQ; k++) begin
        q_use[k] = $urandom_range(0, 1);
        q_addr[k] = 5'($urandom);
        if (q_use[k] && shadow[q_addr[k]]) exp_h = 1;
      end
      #1;
      check("hazard", hazard == exp_h);
      if (exp_h) stalls++;
      set_addr = 5'($urandom);
      set_en = !shadow[set_addr] && $urandom_range(0, 2) != 0;
      nxt = shadow | (set_en ? (32'd1 << set_addr) : 32'd0);
      cl = '0;
      for (int p = 0; p < NCLR; p++) begin
        clr_addr[p] = 5'($urandom);
        clr_en[p] = nxt[clr_addr[p]] && !cl[clr_addr[p]] && $urandom_range(0, 3) == 0;
        if (clr_en[p]) cl[clr_addr[p]] = 1;
      end
      shadow = nxt & ~cl;
    end
    check("hazards were seen", stalls > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
