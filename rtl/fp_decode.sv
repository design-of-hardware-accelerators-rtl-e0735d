// fp_decode: FP instruction decoder.
//
// Purely combinational. Decodes a 32-bit RISC-V single-precision instruction
// (major opcode OP-FP, 1010011) into the unit that executes it, its operand and
// destination registers and which register file each belongs to. Supported:
// FADD.S, FSUB.S, FMUL.S, FDIV.S, FSQRT.S, FCVT.S.W[U], FCVT.W[U].S,
// FEQ.S/FLT.S/FLE.S, FMV.X.W and FMV.W.X. The rounding-mode field is ignored
// (arithmetic always rounds to nearest-even, float-to-integer truncates). Any
// other word gives legal = 0 and unit U_NONE.
//
// The document states that the coprocessor has its own FP instruction decode
// and follows the RISC-V instruction set; the subset, the field decoding and
// the fixed rounding modes are this design's choices.
module fp_decode
  import fp_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        dec,
  output logic        legal
);
  always_comb begin
    logic [6:0] opc, f7;
    logic [2:0] f3;
    logic [4:0] rs2;
    opc = instr[6:0];
    f7  = instr[31:25];
    f3  = instr[14:12];
    rs2 = instr[24:20];
    dec          = '0;
    dec.unit     = U_NONE;
    dec.cmp      = CMP_EQ;
    dec.rd       = instr[11:7];
    dec.rs1      = instr[19:15];
    dec.rs2      = rs2;
    if (opc == 7'b1010011) begin
      unique case (f7)
        7'b0000000: begin dec.unit = U_ADD; dec.use_frs1 = 1; dec.use_frs2 = 1; dec.fp_dest = 1; end
        7'b0000100: begin dec.unit = U_ADD; dec.sub = 1; dec.use_frs1 = 1; dec.use_frs2 = 1; dec.fp_dest = 1; end
        7'b0001000: begin dec.unit = U_MUL; dec.use_frs1 = 1; dec.use_frs2 = 1; dec.fp_dest = 1; end
        7'b0001100: begin dec.unit = U_DIV; dec.use_frs1 = 1; dec.use_frs2 = 1; dec.fp_dest = 1; end
        7'b0101100: if (rs2 == 5'd0) begin dec.unit = U_SQRT; dec.use_frs1 = 1; dec.fp_dest = 1; end
        7'b1010000: begin
          if (f3 == 3'b010 || f3 == 3'b001 || f3 == 3'b000) begin
            dec.unit = U_CMP; dec.use_frs1 = 1; dec.use_frs2 = 1;
            dec.cmp  = (f3 == 3'b010) ? CMP_EQ : (f3 == 3'b001) ? CMP_LT : CMP_LE;
          end
        end
        7'b1100000: if (rs2[4:1] == 4'd0) begin dec.unit = U_F2I; dec.uns = rs2[0]; dec.use_frs1 = 1; end
        7'b1101000: if (rs2[4:1] == 4'd0) begin dec.unit = U_I2F; dec.uns = rs2[0]; dec.fp_dest = 1; end
        7'b1110000: if (rs2 == 5'd0 && f3 == 3'b000) begin dec.unit = U_MVXW; dec.use_frs1 = 1; end
        7'b1111000: if (rs2 == 5'd0 && f3 == 3'b000) begin dec.unit = U_MVWX; dec.fp_dest = 1; end
        default: ;
      endcase
    end
    legal = dec.unit != U_NONE;
  end
endmodule
