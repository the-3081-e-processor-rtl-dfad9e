// addr_unit: memory address register (MAR) and its 24-bit address adder.
//
// A microinstruction that addresses memory names the operation in its MOP:
//   AOP_DB  : MAR <= D + base   -- the IBM D2(B2) form; a base register
//                                  number of 0 means "no base", as in IBM code
//   AOP_IDX : MAR <= MAR + index -- second cycle of a D2(X2,B2) address
//   AOP_NONE: MAR holds.
// The register comes from register-file port A (left-justified, its low 24
// bits are bits [55:32] of the port). The new MAR value is loaded at the
// rising edge, so memory is read or written with it during the next and later
// cycles: this is the one-cycle address pipeline of the processor. Only one
// two-input adder is used; a three-term address takes two cycles.
module addr_unit
  import e3081_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,          // microinstruction is executing
  input  aop_e        aop,
  input  logic [11:0] disp,
  input  logic        reg_is_zero, // register number field is 0
  input  word_t       reg_data,    // register-file port A
  output addr_t       mar
);
  addr_t opnd, sum;

  always_comb begin
    opnd = reg_is_zero ? '0 : reg_data[55:32];
    unique case (aop)
      AOP_DB:  sum = {12'h000, disp} + opnd;
      AOP_IDX: sum = mar + opnd;
      default: sum = mar;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     mar <= '0;
    else if (en) mar <= sum;
  end
endmodule
