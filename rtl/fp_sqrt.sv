// fp_sqrt: single-precision floating-point square root, 12-stage pipeline.
//
// Stage 1 unpacks the operand (subnormals normalised), makes the exponent even
// by moving one factor of two into the significand, and resolves the special
// cases: NaN or any negative non-zero operand gives the canonical NaN, +-0 is
// returned unchanged and +inf gives +inf. Stages 2 to 11 each perform three
// steps of the digit-by-digit (restoring) integer square root of the 60-bit
// scaled significand, so 30 root bits are formed, of which the low 27 are
// significant; a non-zero final remainder is the sticky bit. Stage 12 rounds
// to nearest-even. One operation can enter per clock; the result appears
// STAGES = 12 cycles later.
//
// The twelve-stage latency follows the document. The document did not give
// this unit a bypass, so it has none. The algorithm, the split of its steps
// over the stages and the NaN result for negative operands are this design's
// choices.
module fp_sqrt
  import fp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  f32_t             a,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output f32_t             result
);
  localparam int STAGES = 12;
  localparam int BPS    = 3;     // root bits per iterating stage
  localparam int NBITS  = (STAGES - 2) * BPS;   // 30 root bits

  typedef struct packed {
    logic               v;
    logic [TAG_W-1:0]   tag;
    logic               special;
    f32_t               spec_res;
    logic signed [11:0] exp;      // exponent of the result
    logic [2*NBITS-1:0] rad;      // radicand digits still to bring down (MSB first)
    logic [NBITS+1:0]   rem;      // partial remainder
    logic [NBITS-1:0]   root;     // root bits so far
  } st_t;

  st_t st_d [STAGES-1];
  st_t st_q [STAGES-1];
  f32_t res_d, res_q;
  logic v_q;
  logic [TAG_W-1:0] tag_q;

  always_comb begin
    unp_t u;
    u               = unpack(a);
    st_d[0]         = '0;
    st_d[0].v       = in_valid;
    st_d[0].tag     = in_tag;
    st_d[0].special = u.nan | u.inf | u.zero | a[31];
    if (u.zero)                st_d[0].spec_res = a;
    else if (u.nan || a[31])   st_d[0].spec_res = QNAN;
    else                       st_d[0].spec_res = 32'h7F80_0000;
    // value = man * 2^(exp-23). Even exp: radicand man*2^29, odd: man*2^30;
    // the root then lies in [2^26, 2^27) and the result exponent is exp/2.
    if (u.exp[0]) begin
      st_d[0].rad = (2*NBITS)'({u.man, 30'd0});
      st_d[0].exp = (u.exp - 12'sd1) >>> 1;
    end else begin
      st_d[0].rad = (2*NBITS)'({u.man, 29'd0});
      st_d[0].exp = u.exp >>> 1;
    end
  end

  for (genvar s = 1; s < STAGES - 1; s++) begin : g_it
    always_comb begin
      st_t              x;
      logic [NBITS+1:0] trial;
      x = st_q[s-1];
      for (int k = 0; k < BPS; k++) begin
        x.rem = {x.rem[NBITS-1:0], x.rad[2*NBITS-1 -: 2]};
        x.rad = {x.rad[2*NBITS-3:0], 2'b00};
        trial = {x.root, 2'b01};
        if (x.rem >= trial) begin
          x.rem  = x.rem - trial;
          x.root = {x.root[NBITS-2:0], 1'b1};
        end else begin
          x.root = {x.root[NBITS-2:0], 1'b0};
        end
      end
      st_d[s] = x;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES - 1; s++) st_q[s] <= '0;
      v_q   <= 1'b0;
      tag_q <= '0;
      res_q <= '0;
    end else begin
      for (int s = 0; s < STAGES - 1; s++) st_q[s] <= st_d[s];
      v_q   <= st_q[STAGES-2].v;
      tag_q <= st_q[STAGES-2].tag;
      res_q <= res_d;
    end
  end

  always_comb begin
    st_t x;
    x = st_q[STAGES-2];
    if (x.special) res_d = x.spec_res;
    else           res_d = round_pack(1'b0, x.exp, x.root[26:0], x.rem != '0);
  end

  assign out_valid = v_q;
  assign out_tag   = tag_q;
  assign result    = res_q;
endmodule
