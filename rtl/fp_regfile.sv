// fp_regfile: floating-point register file.
//
// NREGS registers of 32 bits with NRD combinational read ports and NWR write
// ports, one per unit that produces an FP result. Writes take effect on the
// rising clock edge. Several ports may write in the same cycle because the
// register-locking scheme never lets two in-flight operations target the same
// register; if two ports do hit one register the higher-numbered port wins,
// and an assertion reports it. All registers reset to +0.
//
// The document gives the FP register file as a separate block of the
// coprocessor; its size (32, as in RISC-V), the port counts and the reset value
// are this design's choices.
module fp_regfile #(
  parameter int NREGS = 32,
  parameter int NRD   = 3,
  parameter int NWR   = 6,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] raddr [NRD],
  output logic [31:0]   rdata [NRD],
  input  logic          we    [NWR],
  input  logic [AW-1:0] waddr [NWR],
  input  logic [31:0]   wdata [NWR]
);
  logic [31:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NWR; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < NRD; p++) rdata[p] = regs[raddr[p]];

  // No two write ports may address the same register in one cycle.
  logic dup_write;
  always_comb begin
    dup_write = 1'b0;
    for (int p = 0; p < NWR; p++)
      for (int q = p + 1; q < NWR; q++)
        if (we[p] && we[q] && waddr[p] == waddr[q]) dup_write = 1'b1;
  end
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !dup_write)
    else $error("fp_regfile: two ports write one register");
endmodule
