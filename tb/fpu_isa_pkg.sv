// fpu_isa_pkg: instruction encodings and an in-order reference model of the
// FP coprocessor, shared by the coprocessor-level testbenches.
//
// The model executes one instruction at a time on a shadow register file, in
// program order. Register locking must make the pipelined hardware give the
// same register contents and integer results as this model.
package fpu_isa_pkg;
  import fp_ref_pkg::*;

  typedef enum int { I_ADD, I_SUB, I_MUL, I_DIV, I_SQRT, I_I2F, I_I2FU, I_F2I, I_F2IU,
                     I_EQ, I_LT, I_LE, I_MVXW, I_MVWX, I_NOPS } iop_e;

  function automatic logic [31:0] enc(iop_e op, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    logic [6:0] f7;
    logic [2:0] f3;
    logic [4:0] r2;
    f3 = 3'd0;
    r2 = rs2;
    case (op)
      I_ADD:  f7 = 7'b0000000;
      I_SUB:  f7 = 7'b0000100;
      I_MUL:  f7 = 7'b0001000;
      I_DIV:  f7 = 7'b0001100;
      I_SQRT: begin f7 = 7'b0101100; r2 = 5'd0; end
      I_I2F:  begin f7 = 7'b1101000; r2 = 5'd0; end
      I_I2FU: begin f7 = 7'b1101000; r2 = 5'd1; end
      I_F2I:  begin f7 = 7'b1100000; r2 = 5'd0; f3 = 3'b001; end
      I_F2IU: begin f7 = 7'b1100000; r2 = 5'd1; f3 = 3'b001; end
      I_EQ:   begin f7 = 7'b1010000; f3 = 3'b010; end
      I_LT:   begin f7 = 7'b1010000; f3 = 3'b001; end
      I_LE:   begin f7 = 7'b1010000; f3 = 3'b000; end
      I_MVXW: begin f7 = 7'b1110000; r2 = 5'd0; end
      default: begin f7 = 7'b1111000; r2 = 5'd0; end
    endcase
    return {f7, r2, rs1, f3, rd, 7'b1010011};
  endfunction

  function automatic logic int_dest(iop_e op);
    return op inside {I_F2I, I_F2IU, I_EQ, I_LT, I_LE, I_MVXW};
  endfunction

  // Execute one instruction on the shadow state; returns the integer result
  // for integer-destination instructions.
  function automatic logic [31:0] exec(iop_e op, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2,
                                       logic [31:0] xrs1, ref logic [31:0] f [32]);
    logic [31:0] a, b, r;
    a = f[rs1];
    b = f[rs2];
    r = 0;
    case (op)
      I_ADD:  f[rd] = ref_add(a, b, 1'b0);
      I_SUB:  f[rd] = ref_add(a, b, 1'b1);
      I_MUL:  f[rd] = ref_mul(a, b);
      I_DIV:  f[rd] = ref_div(a, b);
      I_SQRT: f[rd] = ref_sqrt(a);
      I_I2F:  f[rd] = ref_i2f(xrs1, 1'b0);
      I_I2FU: f[rd] = ref_i2f(xrs1, 1'b1);
      I_MVWX: f[rd] = xrs1;
      I_F2I:  r = ref_f2i(a, 1'b0);
      I_F2IU: r = ref_f2i(a, 1'b1);
      I_EQ:   r = ref_cmp(a, b, 2);
      I_LT:   r = ref_cmp(a, b, 1);
      I_LE:   r = ref_cmp(a, b, 0);
      I_MVXW: r = a;
      default: ;
    endcase
    return r;
  endfunction
endpackage
