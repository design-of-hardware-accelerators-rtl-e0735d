// reg_lock: register-locking table of the FP coprocessor.
//
// One lock bit per FP register. When an instruction is issued, the lock of its
// destination register is set (set_en/set_addr); when a unit writes a result
// back, the lock of that register is cleared (clr_en/clr_addr, one port per
// unit). A clear and a set of the same register in one cycle leave it
// unlocked: this is the case of a bypassed unit that issues and writes back in
// the same cycle. The hazard output tells the issue logic to stall: it is high
// when a register the offered instruction reads (q_use/q_addr, one query per
// operand) is locked.
//
// Locking the destination and stalling readers follows the document. The
// issue logic also queries the destination register, so that a second write
// to a register waits for the first; the document only describes the source
// check, and the extra check is this design's choice (without it a fast unit
// could write a register before a slower, earlier one and be overwritten).
module reg_lock #(
  parameter int NREGS = 32,
  parameter int NCLR  = 6,
  parameter int NQ    = 3,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             set_en,
  input  logic [AW-1:0]    set_addr,
  input  logic             clr_en   [NCLR],
  input  logic [AW-1:0]    clr_addr [NCLR],
  input  logic             q_use    [NQ],
  input  logic [AW-1:0]    q_addr   [NQ],
  output logic             hazard,
  output logic [NREGS-1:0] locks
);
  logic [NREGS-1:0] set_vec, clr_vec;

  always_comb begin
    set_vec = '0;
    clr_vec = '0;
    if (set_en) set_vec[set_addr] = 1'b1;
    for (int p = 0; p < NCLR; p++)
      if (clr_en[p]) clr_vec[clr_addr[p]] = 1'b1;
    hazard = 1'b0;
    for (int k = 0; k < NQ; k++)
      if (q_use[k] && locks[q_addr[k]]) hazard = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) locks <= '0;
    else        locks <= (locks | set_vec) & ~clr_vec;
  end

  // Only locked registers are written back, and a locked register is not
  // locked again.
  a_clr_locked: assert property (@(posedge clk) disable iff (!rst_n)
                                 (clr_vec & ~(locks | set_vec)) == '0)
    else $error("reg_lock: write-back to an unlocked register");
  a_no_relock: assert property (@(posedge clk) disable iff (!rst_n) !(set_en && locks[set_addr]))
    else $error("reg_lock: register locked twice");
endmodule
