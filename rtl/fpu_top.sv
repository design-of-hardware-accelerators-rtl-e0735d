// fpu_top: floating-point coprocessor with configurable-pipeline accelerators.
//
// The coprocessor sits beside a RISC-V integer pipeline, which hands it FP
// instructions and integer operands and receives integer results. Inside:
//   - fp_decode turns the instruction word into a unit select and registers;
//   - fp_regfile holds 32 FP registers, with one write port per FP-result unit;
//   - reg_lock locks the destination register of every issued instruction and
//     unlocks it when the result is written back. An instruction whose source
//     (or destination) register is locked is stalled (instr_ready = 0). This is
//     what lets each unit's latency change at run time without software
//     knowing about it;
//   - the execution units: fp_add (4 stages) and fp_mul (3 stages) with a
//     configurable pipeline, fp_div (9 stages), fp_sqrt (12 stages), int2float,
//     float2int and fp_cmp (1 cycle), and FMV moves (1 cycle, done here);
//   - one bypass_ctrl per configurable unit. bypass_add_req/bypass_mul_req ask
//     for a pipeline mode; the controller stops issue to that unit, waits for it
//     to drain and then applies the mode (bypass_add/bypass_mul). In bypass mode
//     the unit is combinational and its pipeline clock is gated off.
//
// Interface: one instruction can be accepted per clock: it is accepted in a
// cycle where instr_valid and instr_ready are both high. Unsupported words are
// accepted, dropped and flagged on illegal. FP results go to the register
// file; integer results (FCVT.W[U].S, FEQ/FLT/FLE, FMV.X.W) come out one cycle
// after issue on int_wb_valid/int_wb_rd/int_wb_data; recording them in the
// integer register file, and the integer core's own locking, lie outside this
// block. dbg_raddr/dbg_rdata read the FP register file without affecting it.
// The source register of an FP read is sampled in the issue cycle, so a value
// written back in that same cycle is not forwarded: the instruction waits one
// cycle for the lock to clear.
//
// From the document: the unit set and stage counts, register locking, the
// bypassable pipelines with clock gating. This design's own choices: the
// instruction subset and encodings (RISC-V F), the destination-register check,
// the drain-then-switch mode protocol, a single clock domain for all units and
// the integer-side interface.
module fpu_top
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction issue from the integer core
  input  logic        instr_valid,
  input  logic [31:0] instr,
  input  logic [31:0] int_rs1,
  output logic        instr_ready,
  output logic        illegal,
  // integer-register results
  output logic        int_wb_valid,
  output logic [4:0]  int_wb_rd,
  output logic [31:0] int_wb_data,
  // configurable pipeline
  input  logic        bypass_add_req,
  input  logic        bypass_mul_req,
  output logic        bypass_add,
  output logic        bypass_mul,
  // status and debug
  output logic        busy,
  input  logic [4:0]  dbg_raddr,
  output logic [31:0] dbg_rdata
);
  localparam int NREGS = 32;
  localparam int NWR   = 6;   // add, mul, div, sqrt, i2f, fmv.w.x

  dec_t dec;
  logic legal;
  fp_decode u_dec (.instr, .dec, .legal);

  // ---------------- register file and locking ----------------
  logic [4:0]  raddr [3];
  logic [31:0] rdata [3];
  logic        we    [NWR];
  logic [4:0]  waddr [NWR];
  logic [31:0] wdata [NWR];

  assign raddr[0] = dec.rs1;
  assign raddr[1] = dec.rs2;
  assign raddr[2] = dbg_raddr;
  assign dbg_rdata = rdata[2];

  fp_regfile #(.NREGS(NREGS), .NRD(3), .NWR(NWR)) u_rf (
    .clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);

  logic             q_use  [3];
  logic [4:0]       q_addr [3];
  logic             hazard;
  logic [NREGS-1:0] locks;
  logic             issue;

  assign q_use[0]  = dec.use_frs1;
  assign q_addr[0] = dec.rs1;
  assign q_use[1]  = dec.use_frs2;
  assign q_addr[1] = dec.rs2;
  assign q_use[2]  = dec.fp_dest;
  assign q_addr[2] = dec.rd;

  reg_lock #(.NREGS(NREGS), .NCLR(NWR), .NQ(3)) u_lock (
    .clk, .rst_n,
    .set_en(issue && dec.fp_dest), .set_addr(dec.rd),
    .clr_en(we), .clr_addr(waddr),
    .q_use, .q_addr, .hazard, .locks);

  assign busy = |locks;

  // ---------------- pipeline mode control ----------------
  logic add_busy, mul_busy, add_pend, mul_pend;
  logic [15:0] add_switches, mul_switches;

  bypass_ctrl u_bc_add (.clk, .rst_n, .req(bypass_add_req), .busy(add_busy),
                        .mode(bypass_add), .pending(add_pend), .switches(add_switches));
  bypass_ctrl u_bc_mul (.clk, .rst_n, .req(bypass_mul_req), .busy(mul_busy),
                        .mode(bypass_mul), .pending(mul_pend), .switches(mul_switches));

  // ---------------- issue ----------------
  logic stall;
  assign stall = legal && (hazard || (dec.unit == U_ADD && add_pend)
                                  || (dec.unit == U_MUL && mul_pend));
  assign instr_ready = !stall;
  assign issue       = instr_valid && legal && !stall;
  assign illegal     = instr_valid && !legal;

  function automatic logic go(unit_e u, unit_e want, logic iss);
    return iss && (u == want);
  endfunction

  // ---------------- execution units ----------------
  logic add_v, mul_v, div_v, sqrt_v, i2f_v, f2i_v, cmp_v;
  logic [4:0] add_t, mul_t, div_t, sqrt_t, i2f_t, f2i_t, cmp_t;
  f32_t add_r, mul_r, div_r, sqrt_r, i2f_r;
  logic [31:0] f2i_r, cmp_r;

  fp_add u_add (.clk, .rst_n, .bypass(bypass_add), .in_valid(go(dec.unit, U_ADD, issue)),
                .in_tag(dec.rd), .sub(dec.sub), .a(rdata[0]), .b(rdata[1]),
                .out_valid(add_v), .out_tag(add_t), .result(add_r), .busy(add_busy));

  fp_mul u_mul (.clk, .rst_n, .bypass(bypass_mul), .in_valid(go(dec.unit, U_MUL, issue)),
                .in_tag(dec.rd), .a(rdata[0]), .b(rdata[1]),
                .out_valid(mul_v), .out_tag(mul_t), .result(mul_r), .busy(mul_busy));

  fp_div u_div (.clk, .rst_n, .in_valid(go(dec.unit, U_DIV, issue)), .in_tag(dec.rd),
                .a(rdata[0]), .b(rdata[1]),
                .out_valid(div_v), .out_tag(div_t), .result(div_r));

  fp_sqrt u_sqrt (.clk, .rst_n, .in_valid(go(dec.unit, U_SQRT, issue)), .in_tag(dec.rd),
                  .a(rdata[0]), .out_valid(sqrt_v), .out_tag(sqrt_t), .result(sqrt_r));

  int2float u_i2f (.clk, .rst_n, .in_valid(go(dec.unit, U_I2F, issue)), .in_tag(dec.rd),
                   .uns(dec.uns), .a(int_rs1),
                   .out_valid(i2f_v), .out_tag(i2f_t), .result(i2f_r));

  float2int u_f2i (.clk, .rst_n, .in_valid(go(dec.unit, U_F2I, issue)), .in_tag(dec.rd),
                   .uns(dec.uns), .a(rdata[0]),
                   .out_valid(f2i_v), .out_tag(f2i_t), .result(f2i_r));

  fp_cmp u_cmp (.clk, .rst_n, .in_valid(go(dec.unit, U_CMP, issue)), .in_tag(dec.rd),
                .op(dec.cmp), .a(rdata[0]), .b(rdata[1]),
                .out_valid(cmp_v), .out_tag(cmp_t), .result(cmp_r));

  // FMV.W.X / FMV.X.W: bit-exact moves, one cycle.
  logic        mvwx_v, mvxw_v;
  logic [4:0]  mvwx_t, mvxw_t;
  logic [31:0] mvwx_r, mvxw_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mvwx_v <= 1'b0; mvwx_t <= '0; mvwx_r <= '0;
      mvxw_v <= 1'b0; mvxw_t <= '0; mvxw_r <= '0;
    end else begin
      mvwx_v <= go(dec.unit, U_MVWX, issue);
      mvwx_t <= dec.rd;
      mvwx_r <= int_rs1;
      mvxw_v <= go(dec.unit, U_MVXW, issue);
      mvxw_t <= dec.rd;
      mvxw_r <= rdata[0];
    end
  end

  // ---------------- write-back ----------------
  assign we[0] = add_v;  assign waddr[0] = add_t;  assign wdata[0] = add_r;
  assign we[1] = mul_v;  assign waddr[1] = mul_t;  assign wdata[1] = mul_r;
  assign we[2] = div_v;  assign waddr[2] = div_t;  assign wdata[2] = div_r;
  assign we[3] = sqrt_v; assign waddr[3] = sqrt_t; assign wdata[3] = sqrt_r;
  assign we[4] = i2f_v;  assign waddr[4] = i2f_t;  assign wdata[4] = i2f_r;
  assign we[5] = mvwx_v; assign waddr[5] = mvwx_t; assign wdata[5] = mvwx_r;

  // Integer results: all three sources have one cycle of latency and at most
  // one instruction issues per cycle, so at most one is valid.
  always_comb begin
    int_wb_valid = f2i_v | cmp_v | mvxw_v;
    int_wb_rd    = f2i_v ? f2i_t : cmp_v ? cmp_t : mvxw_t;
    int_wb_data  = f2i_v ? f2i_r : cmp_v ? cmp_r : mvxw_r;
  end

  a_one_int_wb: assert property (@(posedge clk) disable iff (!rst_n) $onehot0({f2i_v, cmp_v, mvxw_v}))
    else $error("fpu_top: two integer results in one cycle");
endmodule
