// fp_mul: single-precision floating-point multiplier with a configurable
// pipeline.
//
// Three stages, each ending in a bypass_reg rank:
//   1. unpack (subnormal operands normalised), 24 x 24 significand product,
//      exponent sum, special cases (NaN, infinity, zero, 0 x inf);
//   2. normalisation of the 48-bit product to 27 bits plus sticky;
//   3. round-to-nearest-even, packing (overflow to infinity, gradual underflow).
// bypass = 0: result STAGES = 3 cycles after the operands, one operation per
// clock. bypass = 1: all ranks transparent, result in the same cycle, and the
// rank clock is gated off. busy is high while a rank holds a valid operation;
// change the mode only while busy is low.
//
// The three-stage pipeline, the bypass multiplexer on every pipeline register
// and the clock gating follow the document; the stage contents and the
// rounding/NaN conventions are this design's choices.
module fp_mul
  import fp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bypass,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  f32_t             a,
  input  f32_t             b,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output f32_t             result,
  output logic             busy
);
  localparam int STAGES = 3;   // pipeline ranks (latency with bypass = 0)

  typedef struct packed {
    logic               v;
    logic [TAG_W-1:0]   tag;
    logic               special;
    f32_t               spec_res;
    logic               sign;
    logic signed [11:0] exp;
    logic [47:0]        prod;
  } s1_t;

  typedef struct packed {
    logic               v;
    logic [TAG_W-1:0]   tag;
    logic               special;
    f32_t               spec_res;
    logic               sign;
    logic signed [11:0] exp;
    logic [26:0]        sig;
    logic               sticky;
  } s2_t;

  typedef struct packed {
    logic             v;
    logic [TAG_W-1:0] tag;
    f32_t             res;
  } s3_t;

  logic gclk;
  clock_gate u_cg (.clk(clk), .en(!bypass), .gclk(gclk));

  s1_t s1_d, s1_q;
  always_comb begin
    unp_t ua, ub;
    ua            = unpack(a);
    ub            = unpack(b);
    s1_d          = '0;
    s1_d.v        = in_valid;
    s1_d.tag      = in_tag;
    s1_d.sign     = a[31] ^ b[31];
    s1_d.special  = ua.nan | ub.nan | ua.inf | ub.inf | ua.zero | ub.zero;
    if (ua.nan || ub.nan || (ua.inf && ub.zero) || (ua.zero && ub.inf))
      s1_d.spec_res = QNAN;
    else if (ua.inf || ub.inf)
      s1_d.spec_res = {s1_d.sign, 8'hFF, 23'd0};
    else
      s1_d.spec_res = {s1_d.sign, 31'd0};
    s1_d.exp      = ua.exp + ub.exp;
    s1_d.prod     = ua.man * ub.man;
  end
  bypass_reg #(.W($bits(s1_t))) u_r1 (.clk(gclk), .rst_n, .bypass, .d(s1_d), .q(s1_q));

  s2_t s2_d, s2_q;
  always_comb begin
    s2_d          = '0;
    s2_d.v        = s1_q.v;
    s2_d.tag      = s1_q.tag;
    s2_d.special  = s1_q.special;
    s2_d.spec_res = s1_q.spec_res;
    s2_d.sign     = s1_q.sign;
    if (s1_q.prod[47]) begin
      s2_d.sig    = s1_q.prod[47:21];
      s2_d.sticky = |s1_q.prod[20:0];
      s2_d.exp    = s1_q.exp + 12'sd1;
    end else begin
      s2_d.sig    = s1_q.prod[46:20];
      s2_d.sticky = |s1_q.prod[19:0];
      s2_d.exp    = s1_q.exp;
    end
  end
  bypass_reg #(.W($bits(s2_t))) u_r2 (.clk(gclk), .rst_n, .bypass, .d(s2_d), .q(s2_q));

  s3_t s3_d, s3_q;
  always_comb begin
    s3_d     = '0;
    s3_d.v   = s2_q.v;
    s3_d.tag = s2_q.tag;
    s3_d.res = s2_q.special ? s2_q.spec_res
                            : round_pack(s2_q.sign, s2_q.exp, s2_q.sig, s2_q.sticky);
  end
  bypass_reg #(.W($bits(s3_t))) u_r3 (.clk(gclk), .rst_n, .bypass, .d(s3_d), .q(s3_q));

  assign out_valid = s3_q.v;
  assign out_tag   = s3_q.tag;
  assign result    = s3_q.res;
  // With bypass = 0 each rank output is its flip-flop.
  assign busy      = !bypass && (s1_q.v | s2_q.v | s3_q.v);
endmodule
