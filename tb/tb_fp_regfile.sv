// tb_fp_regfile: self-checking testbench of fp_regfile.
//
// Checks the reset value, then performs random writes on up to six ports per
// cycle to distinct registers while reading three random registers, comparing
// all reads with a shadow copy of the register file.
module tb_fp_regfile;
  localparam int NREGS = 32, NRD = 3, NWR = 6;
  logic clk = 0, rst_n = 0;
  logic [4:0]  raddr [NRD];
  logic [31:0] rdata [NRD];
  logic        we    [NWR];
  logic [4:0]  waddr [NWR];
  logic [31:0] wdata [NWR];
  logic [31:0] shadow [NREGS];
  int checks = 0, failures = 0;

  fp_regfile #(.NREGS(NREGS), .NRD(NRD), .NWR(NWR)) dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);

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
    for (int p = 0; p < NWR; p++) begin we[p] = 0; waddr[p] = 0; wdata[p] = 0; end
    for (int p = 0; p < NRD; p++) raddr[p] = 0;
    for (int r = 0; r < NREGS; r++) shadow[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NREGS; r++) begin
      raddr[0] = 5'(r);
      #1;
      check("reset value", rdata[0] == 0);
    end
    for (int i = 0; i < 5000; i++) begin
      logic [NREGS-1:0] used;
      @(negedge clk);
      for (int p = 0; p < NRD; p++) begin
        raddr[p] = 5'($urandom);
        #1;
        check($sformatf("read r%0d = %h exp %h", raddr[p], rdata[p], shadow[raddr[p]]),
              rdata[p] == shadow[raddr[p]]);
      end
      used = '0;
      for (int p = 0; p < NWR; p++) begin
        waddr[p] = 5'($urandom);
        wdata[p] = $urandom;
        we[p] = $urandom_range(0, 1) && !used[waddr[p]];
        if (we[p]) begin
          used[waddr[p]] = 1;
          shadow[waddr[p]] = wdata[p];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
