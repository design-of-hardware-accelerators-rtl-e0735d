// float2int: single-precision to 32-bit integer conversion, one cycle.
//
// The value is truncated toward zero. With uns = 0 the result is a signed
// (two's complement) integer saturated to [-2^31, 2^31-1]; with uns = 1 it is
// unsigned, saturated to [0, 2^32-1], negative values giving 0. NaN converts
// to the largest positive value, infinities saturate. The result is
// registered: it appears one clock after in_valid.
//
// The single-cycle latency follows the document. Truncation and the
// saturation values (those of the RISC-V FCVT.W.S / FCVT.WU.S instructions with
// round-toward-zero) are this design's choices.
module float2int
  import fp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic             uns,
  input  f32_t             a,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [31:0]      result
);
  logic [31:0] res_d;

  always_comb begin
    logic [7:0]  e;
    logic [55:0] sh;
    logic [32:0] mag;
    e   = a[30:23];
    sh  = '0;
    mag = '0;
    if (e >= 8'd127 && e <= 8'd158) begin
      // value = 1.f * 2^(e-127), e-127 in [0, 31]
      sh  = {32'd0, 1'b1, a[22:0]} << (e - 8'd127);
      mag = {1'b0, sh[54:23]};
    end
    if (is_nan(a))
      res_d = uns ? 32'hFFFF_FFFF : 32'h7FFF_FFFF;
    else if (uns) begin
      if (a[31])                               res_d = 32'd0;
      else if (e > 8'd158)                     res_d = 32'hFFFF_FFFF;
      else                                     res_d = mag[31:0];
    end else begin
      if (a[31]) begin
        if (e > 8'd158 || mag > 33'h0_8000_0000) res_d = 32'h8000_0000;
        else                                     res_d = ~mag[31:0] + 32'd1;
      end else begin
        if (e > 8'd158 || mag > 33'h0_7FFF_FFFF) res_d = 32'h7FFF_FFFF;
        else                                     res_d = mag[31:0];
      end
    end
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
