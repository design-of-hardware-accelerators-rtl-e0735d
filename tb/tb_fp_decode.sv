// tb_fp_decode: self-checking testbench of fp_decode.
//
// Assembles every supported instruction with random register fields and
// rounding mode, and checks unit, sub/unsigned/compare flags, register
// addresses and register-file usage against a table written from the RISC-V
// single-precision encoding. Also checks that other words (wrong opcode,
// FSQRT with rs2 != 0, unsupported funct7 values) are illegal.
module tb_fp_decode;
  import fp_pkg::*;

  logic [31:0] instr;
  dec_t dec;
  logic legal;
  int checks = 0, failures = 0;

  fp_decode dut (.instr, .dec, .legal);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] rtype(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, 7'b1010011};
  endfunction

  typedef struct { logic [6:0] f7; int rs2; int f3; unit_e u; logic sub, uns; cmp_e c;
                   logic u1, u2, fd; } row_t;

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    //            f7         rs2 f3  unit    sub uns cmp     frs1 frs2 fdest  (rs2/f3 -1: any)
    row_t t[13] = '{
      '{7'b0000000, -1, -1, U_ADD,  0, 0, CMP_EQ, 1, 1, 1},
      '{7'b0000100, -1, -1, U_ADD,  1, 0, CMP_EQ, 1, 1, 1},
      '{7'b0001000, -1, -1, U_MUL,  0, 0, CMP_EQ, 1, 1, 1},
      '{7'b0001100, -1, -1, U_DIV,  0, 0, CMP_EQ, 1, 1, 1},
      '{7'b0101100,  0, -1, U_SQRT, 0, 0, CMP_EQ, 1, 0, 1},
      '{7'b1010000, -1,  2, U_CMP,  0, 0, CMP_EQ, 1, 1, 0},
      '{7'b1010000, -1,  1, U_CMP,  0, 0, CMP_LT, 1, 1, 0},
      '{7'b1010000, -1,  0, U_CMP,  0, 0, CMP_LE, 1, 1, 0},
      '{7'b1100000,  0, -1, U_F2I,  0, 0, CMP_EQ, 1, 0, 0},
      '{7'b1100000,  1, -1, U_F2I,  0, 1, CMP_EQ, 1, 0, 0},
      '{7'b1101000,  0, -1, U_I2F,  0, 0, CMP_EQ, 0, 0, 1},
      '{7'b1101000,  1, -1, U_I2F,  0, 1, CMP_EQ, 0, 0, 1},
      '{7'b1110000,  0,  0, U_MVXW, 0, 0, CMP_EQ, 1, 0, 0}
    };
    for (int i = 0; i < 13 * 200 + 200; i++) begin
      row_t r;
      logic [4:0] rs1, rs2, rd;
      logic [2:0] f3;
      if (i < 13 * 200) r = t[i % 13];
      else r = '{7'b1111000, 0, 0, U_MVWX, 0, 0, CMP_EQ, 0, 0, 1};
      rs1 = 5'($urandom); rd = 5'($urandom);
      rs2 = (r.rs2 >= 0) ? 5'(r.rs2) : 5'($urandom);
      f3  = (r.f3 >= 0) ? 3'(r.f3) : 3'($urandom);
      instr = rtype(r.f7, rs2, rs1, f3, rd);
      #1;
      check($sformatf("legal %h", instr), legal);
      check($sformatf("unit %h: %s exp %s", instr, dec.unit.name(), r.u.name()), dec.unit == r.u);
      check("regs", dec.rd == rd && dec.rs1 == rs1 && dec.rs2 == rs2);
      check("flags", dec.sub == r.sub && dec.uns == r.uns && dec.use_frs1 == r.u1
                     && dec.use_frs2 == r.u2 && dec.fp_dest == r.fd);
      if (r.u == U_CMP) check("cmp op", dec.cmp == r.c);
    end
    // illegal words
    for (int i = 0; i < 200; i++) begin
      instr = $urandom;
      if (instr[6:0] == 7'b1010011) instr[6:0] = 7'b0110011;
      #1;
      check("wrong opcode illegal", !legal && dec.unit == U_NONE);
    end
    instr = rtype(7'b0101100, 5'd1, 5'd2, 3'd0, 5'd3); #1; check("fsqrt rs2!=0 illegal", !legal);
    instr = rtype(7'b0010000, 5'd1, 5'd2, 3'd0, 5'd3); #1; check("fsgnj unsupported", !legal);
    instr = rtype(7'b1010000, 5'd1, 5'd2, 3'd3, 5'd3); #1; check("cmp f3=3 illegal", !legal);
    instr = rtype(7'b1100000, 5'd2, 5'd2, 3'd0, 5'd3); #1; check("fcvt rs2=2 illegal", !legal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
