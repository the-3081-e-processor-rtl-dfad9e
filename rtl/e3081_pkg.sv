// e3081_pkg: types, microinstruction fields and helper functions shared by the
// 3081/E processor blocks.
//
// Bus conventions. ABUS and BBUS are 64 bits wide. An operand shorter than 64
// bits travels left-justified: a 32-bit word (integer, or short floating point)
// sits in bits [63:32], a halfword in [63:48], a byte in [63:56]. This matches
// the IBM long floating-point format, whose high word is the short format.
//
// Microinstruction (32 bits, IBM bit 0 = bit 31 here):
//   register transfer: MOP[31:22] MBA[21:20] R1[19:16] R2[15:12] D[11:0]
//   branch           : 2'b11[31:30] tt[29:28] MASK[27:24] ADDR[23:0]
// The 10-bit MOP layout below is this design's own encoding; the field widths
// and positions follow the published microinstruction format.
package e3081_pkg;

  localparam int unsigned W     = 64;   // bus width
  localparam int unsigned AW    = 24;   // byte address width (IBM 370)
  localparam int unsigned UPC_W = 24;   // branch address width

  typedef logic [W-1:0] word_t;
  typedef logic [AW-1:0] addr_t;

  // Operand length code
  typedef enum logic [1:0] {LEN8 = 2'd0, LEN16 = 2'd1, LEN32 = 2'd2, LEN64 = 2'd3} len_e;

  // Address operation, MOP[9:8]
  typedef enum logic [1:0] {AOP_NONE = 2'd0, AOP_DB = 2'd1, AOP_IDX = 2'd2} aop_e;

  // Form, MOP[7:5]
  typedef enum logic [2:0] {
    F_MISC   = 3'd0,  // register/memory moves, see misc sub-codes
    F_ST_MR  = 3'd1,  // start EU: op1 = R1 (BBUS), op2 = memory (ABUS)
    F_ST_RR  = 3'd2,  // start EU: op1 = R1 (BBUS), op2 = R2 (ABUS)
    F_CH_M   = 3'd3,  // start EU: op1 = result of unit R1[1:0] (BBUS), op2 = memory
    F_CH_R   = 3'd4,  // start EU: op1 = result of unit R1[1:0] (BBUS), op2 = R2
    F_RES_R  = 3'd5,  // result of unit -> R1
    F_RES_M  = 3'd6,  // result of unit -> memory
    F_RES_RM = 3'd7   // result of unit -> R1 and memory
  } form_e;

  // Misc sub-codes, MOP[4:2]; MOP[1:0] is the length (or the unit for SETCC)
  typedef enum logic [2:0] {
    M_NOP = 3'd0, M_LOAD = 3'd1, M_MOVE = 3'd2, M_STORE = 3'd3,
    M_MAR = 3'd4, M_SETCC = 3'd5
  } misc_e;

  // Execution units
  typedef enum logic [1:0] {U_INT = 2'd0, U_FA = 2'd1, U_FM = 2'd2, U_FD = 2'd3} unit_e;

  // Integer unit functions
  typedef enum logic [3:0] {
    I_ADD = 4'd0, I_SUB = 4'd1, I_CMP = 4'd2, I_ADDL = 4'd3, I_SUBL = 4'd4,
    I_CMPL = 4'd5, I_AND = 4'd6, I_OR = 4'd7, I_XOR = 4'd8, I_LOAD = 4'd9,
    I_AH = 4'd10, I_LH = 4'd11, I_IC = 4'd12, I_SHIFT = 4'd13, I_MUL = 4'd14,
    I_LCR = 4'd15
  } ifunc_e;

  // Floating add unit functions
  typedef enum logic [1:0] {FA_ADD = 2'd0, FA_SUB = 2'd1, FA_CMP = 2'd2} fafunc_e;

  // Branch types (tt)
  typedef enum logic [1:0] {BT_BC = 2'd0, BT_BAL = 2'd1, BT_RET = 2'd2, BT_HALT = 2'd3} btype_e;

  // Request presented to an execution unit when a microinstruction starts it.
  typedef struct packed {
    logic       start;
    logic [3:0] func;   // unit specific, see decoder
    logic       dbl;    // long (64-bit) floating point
    word_t      op1;    // first operand, from BBUS
    word_t      op2;    // second operand, from ABUS
  } eu_req_t;

  // Decoded control word, the content of the MOP decode PROM.
  typedef struct packed {
    logic       is_branch;
    aop_e       aop;
    logic [1:0] asrc;     // 0 none, 1 memory, 2 register port A (R2), 3 MAR
    logic [2:0] bsrc;     // 0 none, 1 register port B (R1), 4..7 unit result
    logic       reg_we;   // write R1 through port B
    logic       reg_from_a;
    logic       mem_we;   // store BBUS to memory at MAR
    len_e       len;
    logic       eu_start;
    unit_e      eu_unit;
    logic [3:0] eu_func;
    logic       eu_dbl;
    logic       set_cc;
    unit_e      cc_unit;
  } ctl_t;

  // Assemble a register-transfer microinstruction.
  function automatic logic [31:0] uinstr(logic [9:0] mop, logic [4:0] r1, logic [4:0] r2,
                                         logic [11:0] d);
    return {mop, r1[4], r2[4], r1[3:0], r2[3:0], d};
  endfunction

  // Assemble a branch microinstruction.
  function automatic logic [31:0] ubranch(btype_e tt, logic [3:0] mask, logic [23:0] a);
    return {2'b11, tt, mask, a};
  endfunction

  // MOP helpers
  function automatic logic [9:0] mop_misc(aop_e a, misc_e m, logic [1:0] l);
    return {a, F_MISC, m, l};
  endfunction
  function automatic logic [9:0] mop_start(aop_e a, form_e f, logic [4:0] euf);
    return {a, f, euf};
  endfunction
  function automatic logic [9:0] mop_res(aop_e a, form_e f, logic set_cc, len_e l, unit_e u);
    return {a, f, set_cc, l, u};
  endfunction
  // EU-select/function field of the start forms:
  //   0ffff INT func, 10dff FADD, 110-d FMUL, 111-d FDIV (d = long)
  function automatic logic [4:0] euf_int(ifunc_e f);  return {1'b0, f}; endfunction
  function automatic logic [4:0] euf_fa(logic d, fafunc_e f); return {2'b10, d, f}; endfunction
  function automatic logic [4:0] euf_fm(logic d); return {3'b110, 1'b0, d}; endfunction
  function automatic logic [4:0] euf_fd(logic d); return {3'b111, 1'b0, d}; endfunction

  // Number of leading zero hex digits in a 64-bit value (16 if zero).
  function automatic logic [4:0] lz_digits(logic [63:0] v);
    logic [4:0] n;
    n = 5'd16;
    for (int i = 15; i >= 0; i--) begin
      if (v[63-4*i -: 4] != 4'h0) n = 5'(i);
    end
    return n;
  endfunction

  // Pack an IBM hexadecimal floating-point result. f is the normalized
  // 14-digit fraction (zero allowed), e the true characteristic (excess 64)
  // before range checking. A zero fraction or an exponent underflow gives a
  // true zero; an overflow keeps the low 7 bits of the characteristic and
  // sets bit 64 of the return value. Short results keep 6 digits.
  function automatic logic [64:0] hfp_pack(logic s, logic signed [9:0] e, logic [55:0] f,
                                           logic dbl);
    if (f == '0 || e < 0) return '0;
    return {e > 10'sd127, s, e[6:0], dbl ? f : {f[55:32], 32'h0}};
  endfunction

endpackage
