// fp_cmp: floating-point compare unit, one cycle.
//
// Compares a and b and returns 1 or 0 as a 32-bit integer: CMP_EQ (a == b),
// CMP_LT (a < b) or CMP_LE (a <= b). +0 and -0 compare equal; any comparison
// with a NaN is false. Ordering works on the sign-magnitude encoding directly:
// for operands of equal sign the magnitude bits compare as unsigned integers
// (reversed for negative numbers). The result is registered: it appears one
// clock after in_valid.
//
// The document names a compare unit among the FP units; its operations and
// their NaN rules (those of the RISC-V FEQ.S/FLT.S/FLE.S instructions) are this
// design's choice.
module fp_cmp
  import fp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  cmp_e             op,
  input  f32_t             a,
  input  f32_t             b,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [31:0]      result
);
  logic res_d;

  always_comb begin
    logic unord, both_zero, eq, lt;
    unord     = is_nan(a) || is_nan(b);
    both_zero = is_zero(a) && is_zero(b);
    eq        = both_zero || (a == b);
    if (both_zero)            lt = 1'b0;
    else if (a[31] != b[31])  lt = a[31];
    else if (!a[31])          lt = a[30:0] < b[30:0];
    else                      lt = a[30:0] > b[30:0];
    unique case (op)
      CMP_EQ:  res_d = !unord && eq;
      CMP_LT:  res_d = !unord && lt;
      CMP_LE:  res_d = !unord && (lt || eq);
      default: res_d = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      result    <= {31'd0, res_d};
    end
  end
endmodule
