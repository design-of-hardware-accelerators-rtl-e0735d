// fp_pkg: types, constants and shared arithmetic helpers of the floating-point
// coprocessor.
//
// All units work on IEEE-754 single precision (binary32). Every arithmetic unit
// ends with the same rounding step, round_pack(), which takes a normalised
// 27-bit significand (leading one in bit 26, bits 2..0 are guard, round and a
// jammed sticky) plus an extra sticky flag and an unbiased exponent, and returns
// the correctly rounded binary32 word. Rounding is round-to-nearest-even,
// subnormal results are produced by right-shifting before rounding (gradual
// underflow), and an overflow rounds to infinity. NaN results are the RISC-V
// canonical quiet NaN. The document shows subnormal operands being handled;
// the rounding mode and NaN encoding are this design's choice.
package fp_pkg;

  typedef logic [31:0] f32_t;

  localparam f32_t QNAN    = 32'h7FC0_0000;
  localparam int   XLEN    = 32;
  localparam int   TAG_W   = 5;          // destination register address

  // Functional units behind the FP instruction decoder (Fig. "FP unit" of the
  // processor: Int2float, Float2int, ADD/SUB, CMPT, MULT, plus DIV and SQRT).
  typedef enum logic [3:0] {
    U_NONE, U_ADD, U_MUL, U_DIV, U_SQRT, U_I2F, U_F2I, U_CMP, U_MVXW, U_MVWX
  } unit_e;

  typedef enum logic [1:0] { CMP_LE = 2'd0, CMP_LT = 2'd1, CMP_EQ = 2'd2 } cmp_e;

  // Decoded FP instruction.
  typedef struct packed {
    unit_e            unit;
    logic             sub;       // FSUB
    logic             uns;       // unsigned conversion
    cmp_e             cmp;
    logic [4:0]       rd;
    logic [4:0]       rs1;
    logic [4:0]       rs2;
    logic             use_frs1;  // reads FP register rs1
    logic             use_frs2;  // reads FP register rs2
    logic             fp_dest;   // writes FP register rd (else integer rd)
  } dec_t;

  // Unpacked operand with subnormals normalised: value = man * 2^(exp-23).
  typedef struct packed {
    logic               sign;
    logic signed [11:0] exp;
    logic [23:0]        man;
    logic               zero;
    logic               inf;
    logic               nan;
  } unp_t;

  function automatic logic is_nan(f32_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
  endfunction

  function automatic logic is_inf(f32_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] == 23'd0);
  endfunction

  function automatic logic is_zero(f32_t a);
    return a[30:0] == 31'd0;
  endfunction

  // Number of leading zeros of a 64-bit word (64 for zero).
  function automatic logic [6:0] lzc64(logic [63:0] x);
    logic [6:0] n;
    logic       found;
    n = 7'd64;
    found = 1'b0;
    for (int i = 63; i >= 0; i--) begin
      if (!found && x[i]) begin
        n = 7'(63 - i);
        found = 1'b1;
      end
    end
    return n;
  endfunction

  function automatic unp_t unpack(f32_t a);
    unp_t       u;
    logic [6:0] lz;
    u.sign = a[31];
    u.zero = is_zero(a);
    u.inf  = is_inf(a);
    u.nan  = is_nan(a);
    if (a[30:23] != 8'd0) begin
      u.exp = 12'(signed'({1'b0, a[30:23]})) - 12'sd127;
      u.man = {1'b1, a[22:0]};
    end else begin
      lz    = lzc64({41'd0, a[22:0]}) - 7'd40;   // shift that brings the leading one to bit 23
      u.man = 24'({1'b0, a[22:0]} << lz);
      u.exp = -12'sd126 - 12'(signed'({5'd0, lz}));
    end
    return u;
  endfunction

  // Round and pack sig * 2^(exp-26) (sig[26] = 1 unless sig == 0).
  function automatic f32_t round_pack(logic sign, logic signed [11:0] exp,
                                      logic [26:0] sig, logic sticky);
    logic signed [11:0] be;
    logic [26:0]        m;
    logic               st;
    logic               up;
    logic [24:0]        r;
    int                 sh;
    if (sig == 27'd0) return {sign, 31'd0};
    be = exp + 12'sd127;
    m  = sig;
    st = sticky;
    if (be < 12'sd1) begin
      sh = 1 - int'(be);
      if (sh > 26) begin
        st = st | (|m);
        m  = 27'd0;
      end else begin
        st = st | (|(m & ((27'd1 << sh) - 27'd1)));
        m  = m >> sh;
      end
    end
    up = m[2] & (m[3] | m[1] | m[0] | st);
    r  = {1'b0, m[26:3]} + 25'(up);
    if (be < 12'sd1) return {sign, 7'd0, r[23], r[22:0]};
    if (r[24]) begin
      be = be + 12'sd1;
      r  = r >> 1;
    end
    if (be >= 12'sd255) return {sign, 8'hFF, 23'd0};
    return {sign, be[7:0], r[22:0]};
  endfunction

endpackage
