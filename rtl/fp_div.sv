// fp_div: single-precision floating-point divider, 9-stage pipeline.
//
// Stage 1 unpacks both operands (subnormals normalised), resolves the special
// cases (NaN, 0/0, inf/inf, x/0, 0/x, x/inf) and forms the exponent
// difference. Stages 2 to 8 each perform four steps of restoring division of
// the 24-bit significands, producing 28 quotient bits in all; the remainder
// left over becomes the sticky bit. Stage 9 normalises the quotient (which lies
// in (1/2, 2)) and rounds to nearest-even. One operation can enter per clock;
// the result appears STAGES = 9 cycles later.
//
// The nine-stage latency follows the document. The document did not give this
// unit a bypass, so it has none. The radix-2 restoring algorithm and the
// split of the iterations over the stages are this design's choices.
module fp_div
  import fp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  f32_t             a,        // dividend
  input  f32_t             b,        // divisor
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output f32_t             result
);
  localparam int STAGES = 9;
  localparam int NIT    = STAGES - 2;   // iterating stages
  localparam int BPS    = 4;            // quotient bits per iterating stage

  typedef struct packed {
    logic               v;
    logic [TAG_W-1:0]   tag;
    logic               special;
    f32_t               spec_res;
    logic               sign;
    logic signed [11:0] exp;
    logic [25:0]        rem;     // partial remainder, < 2 * divisor
    logic [23:0]        dvs;     // divisor significand
    logic [27:0]        q;       // quotient bits so far
  } st_t;

  st_t st_d [STAGES-1];
  st_t st_q [STAGES-1];
  f32_t res_d, res_q;
  logic v_q;
  logic [TAG_W-1:0] tag_q;

  // Stage 1: unpack and special cases.
  always_comb begin
    unp_t ua, ub;
    ua             = unpack(a);
    ub             = unpack(b);
    st_d[0]        = '0;
    st_d[0].v      = in_valid;
    st_d[0].tag    = in_tag;
    st_d[0].sign   = a[31] ^ b[31];
    st_d[0].special = ua.nan | ub.nan | ua.inf | ub.inf | ua.zero | ub.zero;
    if (ua.nan || ub.nan || (ua.zero && ub.zero) || (ua.inf && ub.inf))
      st_d[0].spec_res = QNAN;
    else if (ua.inf || ub.zero)
      st_d[0].spec_res = {st_d[0].sign, 8'hFF, 23'd0};
    else
      st_d[0].spec_res = {st_d[0].sign, 31'd0};
    st_d[0].exp    = ua.exp - ub.exp;
    st_d[0].rem    = {2'b00, ua.man};
    st_d[0].dvs    = ub.man;
  end

  // Stages 2 .. STAGES-1: BPS restoring-division steps each.
  for (genvar s = 1; s < STAGES - 1; s++) begin : g_it
    always_comb begin
      st_t x;
      x = st_q[s-1];
      for (int k = 0; k < BPS; k++) begin
        if (x.rem >= {2'b00, x.dvs}) begin
          x.q   = {x.q[26:0], 1'b1};
          x.rem = x.rem - {2'b00, x.dvs};
        end else begin
          x.q   = {x.q[26:0], 1'b0};
        end
        x.rem = {x.rem[24:0], 1'b0};
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

  // Stage STAGES: normalise and round. q = floor(ma * 2^27 / mb).
  always_comb begin
    st_t x;
    x = st_q[STAGES-2];
    if (x.special)
      res_d = x.spec_res;
    else if (x.q[27])
      res_d = round_pack(x.sign, x.exp, x.q[27:1], x.q[0] | (x.rem != 26'd0));
    else
      res_d = round_pack(x.sign, x.exp - 12'sd1, x.q[26:0], x.rem != 26'd0);
  end

  assign out_valid = v_q;
  assign out_tag   = tag_q;
  assign result    = res_q;

  initial assert (NIT * BPS == 28) else $error("fp_div: iterations must give 28 quotient bits");
endmodule
