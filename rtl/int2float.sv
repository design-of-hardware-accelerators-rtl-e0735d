// int2float: 32-bit integer to single-precision conversion, one cycle.
//
// The operand is taken as signed (two's complement) or, with uns = 1, as
// unsigned. Its magnitude is normalised with a leading-zero count, the top 27
// bits form the significand with the rest as sticky, and the value is rounded
// to nearest-even (integers above 2^24 may round). The result is registered:
// out_valid/out_tag/result appear one clock after in_valid.
//
// The single-cycle latency follows the document; the rounding mode and the
// signed/unsigned select (as in the RISC-V FCVT.S.W and FCVT.S.WU
// instructions) are this design's choices.
module int2float
  import fp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic             uns,
  input  logic [31:0]      a,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output f32_t             result
);
  f32_t res_d;

  always_comb begin
    logic        neg;
    logic [31:0] mag, norm;
    logic [6:0]  lz;
    neg  = !uns && a[31];
    mag  = neg ? (~a + 32'd1) : a;
    lz   = lzc64({mag, 32'd0});
    norm = mag << lz[4:0];
    if (mag == 32'd0) res_d = 32'd0;
    else res_d = round_pack(neg, 12'sd31 - 12'(signed'({5'd0, lz})), norm[31:5], |norm[4:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      result    <= res_d;
    end
  end
endmodule
