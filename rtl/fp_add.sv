// fp_add: single-precision floating-point adder/subtractor with a
// configurable pipeline.
//
// The datapath is cut into four stages, each ending in a bypass_reg rank:
//   1. special cases, operand swap so that |a| >= |b|, exponent difference;
//   2. alignment of the smaller significand (guard, round and jammed sticky
//      bits) and the significand add or subtract;
//   3. normalisation (carry-out shift or leading-zero shift);
//   4. round-to-nearest-even and packing, special-case override.
// With bypass = 0 the result appears STAGES = 4 cycles after the operands
// (one per clock, fully pipelined). With bypass = 1 every rank is transparent,
// the unit is combinational (result in the same cycle) and the clock of all
// ranks is gated off through clock_gate. The valid bit and the destination tag
// travel through the same ranks as the data. busy is high while any rank holds
// a valid operation; the pipeline mode must only change while busy is low.
//
// From the document: the four-stage pipeline, a bypass multiplexer on every
// pipeline register, the gated clock under bypass, and identical results in
// both modes. The stage contents, the rounding mode (nearest-even) and the
// canonical NaN are this design's choices.
module fp_add
  import fp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bypass,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic             sub,      // 1: a - b
  input  f32_t             a,
  input  f32_t             b,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output f32_t             result,
  output logic             busy
);
  localparam int STAGES = 4;   // pipeline ranks (latency with bypass = 0)

  typedef struct packed {
    logic             v;
    logic [TAG_W-1:0] tag;
    logic             special;     // result fixed by NaN/infinity rules
    f32_t             spec_res;
    logic             sign;        // sign of the larger operand
    logic             zsign;       // sign of an exact zero result
    logic             eff_sub;
    logic [7:0]       ea;          // biased exponent of larger (>= 1)
    logic [7:0]       d;           // exponent difference
    logic [23:0]      ma;
    logic [23:0]      mb;
  } s1_t;

  typedef struct packed {
    logic             v;
    logic [TAG_W-1:0] tag;
    logic             special;
    f32_t             spec_res;
    logic             sign;
    logic             zsign;
    logic [7:0]       ea;
    logic [27:0]      sum;         // carry + 24 bits + G R S
  } s2_t;

  typedef struct packed {
    logic               v;
    logic [TAG_W-1:0]   tag;
    logic               special;
    f32_t               spec_res;
    logic               sign;
    logic               zero;
    logic               zsign;
    logic signed [11:0] exp;
    logic [26:0]        sig;
    logic               sticky;
  } s3_t;

  typedef struct packed {
    logic             v;
    logic [TAG_W-1:0] tag;
    f32_t             res;
  } s4_t;

  logic gclk;
  clock_gate u_cg (.clk(clk), .en(!bypass), .gclk(gclk));

  // ---------------- stage 1 ----------------
  s1_t s1_d, s1_q;
  always_comb begin
    logic bs, a_big, na, nb, ia, ib;
    f32_t big, sml;
    bs    = b[31] ^ sub;
    na    = is_nan(a);
    nb    = is_nan(b);
    ia    = is_inf(a);
    ib    = is_inf(b);
    a_big = a[30:0] >= b[30:0];
    big   = a_big ? a : {bs, b[30:0]};
    sml   = a_big ? {bs, b[30:0]} : a;
    s1_d          = '0;
    s1_d.v        = in_valid;
    s1_d.tag      = in_tag;
    s1_d.special  = na | nb | ia | ib;
    if (na || nb || (ia && ib && (a[31] != bs))) s1_d.spec_res = QNAN;
    else if (ia)                                 s1_d.spec_res = a;
    else                                         s1_d.spec_res = {bs, 8'hFF, 23'd0};
    s1_d.sign     = big[31];
    s1_d.zsign    = a[31] & bs;
    s1_d.eff_sub  = a[31] ^ bs;
    s1_d.ea       = (big[30:23] == 8'd0) ? 8'd1 : big[30:23];
    s1_d.d        = s1_d.ea - ((sml[30:23] == 8'd0) ? 8'd1 : sml[30:23]);
    s1_d.ma       = {big[30:23] != 8'd0, big[22:0]};
    s1_d.mb       = {sml[30:23] != 8'd0, sml[22:0]};
  end
  bypass_reg #(.W($bits(s1_t))) u_r1 (.clk(gclk), .rst_n, .bypass, .d(s1_d), .q(s1_q));

  // ---------------- stage 2 ----------------
  s2_t s2_d, s2_q;
  always_comb begin
    logic [26:0] bx, a_ext;
    logic        st;
    a_ext = {s1_q.ma, 3'b000};
    if (s1_q.d >= 8'd27) begin
      bx = 27'd0;
      st = |s1_q.mb;
    end else begin
      bx = {s1_q.mb, 3'b000} >> s1_q.d;
      st = |({s1_q.mb, 3'b000} & ((27'd1 << s1_q.d) - 27'd1));
    end
    bx[0] = bx[0] | st;
    s2_d          = '0;
    s2_d.v        = s1_q.v;
    s2_d.tag      = s1_q.tag;
    s2_d.special  = s1_q.special;
    s2_d.spec_res = s1_q.spec_res;
    s2_d.sign     = s1_q.sign;
    s2_d.zsign    = s1_q.zsign;
    s2_d.ea       = s1_q.ea;
    s2_d.sum      = s1_q.eff_sub ? ({1'b0, a_ext} - {1'b0, bx}) : ({1'b0, a_ext} + {1'b0, bx});
  end
  bypass_reg #(.W($bits(s2_t))) u_r2 (.clk(gclk), .rst_n, .bypass, .d(s2_d), .q(s2_q));

  // ---------------- stage 3 ----------------
  s3_t s3_d, s3_q;
  always_comb begin
    logic [6:0]         lz;
    logic signed [11:0] e;
    e             = 12'(signed'({4'd0, s2_q.ea})) - 12'sd127;
    lz            = lzc64({37'd0, s2_q.sum[26:0]}) - 7'd37;
    s3_d          = '0;
    s3_d.v        = s2_q.v;
    s3_d.tag      = s2_q.tag;
    s3_d.special  = s2_q.special;
    s3_d.spec_res = s2_q.spec_res;
    s3_d.sign     = s2_q.sign;
    s3_d.zsign    = s2_q.zsign;
    s3_d.zero     = s2_q.sum == 28'd0;
    if (s2_q.sum[27]) begin
      s3_d.sig    = s2_q.sum[27:1];
      s3_d.sticky = s2_q.sum[0];
      s3_d.exp    = e + 12'sd1;
    end else begin
      s3_d.sig    = s2_q.sum[26:0] << lz;
      s3_d.sticky = 1'b0;
      s3_d.exp    = e - 12'(signed'({5'd0, lz}));
    end
  end
  bypass_reg #(.W($bits(s3_t))) u_r3 (.clk(gclk), .rst_n, .bypass, .d(s3_d), .q(s3_q));

  // ---------------- stage 4 ----------------
  s4_t s4_d, s4_q;
  always_comb begin
    s4_d     = '0;
    s4_d.v   = s3_q.v;
    s4_d.tag = s3_q.tag;
    if (s3_q.special)   s4_d.res = s3_q.spec_res;
    else if (s3_q.zero) s4_d.res = {s3_q.zsign, 31'd0};
    else                s4_d.res = round_pack(s3_q.sign, s3_q.exp, s3_q.sig, s3_q.sticky);
  end
  bypass_reg #(.W($bits(s4_t))) u_r4 (.clk(gclk), .rst_n, .bypass, .d(s4_d), .q(s4_q));

  assign out_valid = s4_q.v;
  assign out_tag   = s4_q.tag;
  assign result    = s4_q.res;
  // With bypass = 0 each rank output is its flip-flop.
  assign busy      = !bypass && (s1_q.v | s2_q.v | s3_q.v | s4_q.v);
endmodule
