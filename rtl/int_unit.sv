// int_unit: integer execution unit.
//
// A start strobe copies the first operand (from BBUS) and the second operand
// (from ABUS) into the unit's input registers together with the function.
// The result and condition code are formed combinationally from those
// registers, so they can be put on BBUS by any later microinstruction; they
// stay valid until the next start. 32-bit operands are left-justified
// ([63:32]); halfword and byte second operands are the leftmost bits of the
// ABUS word, which is how memory presents them. Functions (ifunc_e):
//   ADD SUB CMP      signed 32-bit, CC 0 zero/equal, 1 negative/low,
//                    2 positive/high, 3 overflow
//   ADDL SUBL CMPL   logical (unsigned); ADDL/SUBL CC = {carry, nonzero}
//   AND OR XOR       CC 0 zero, 1 nonzero
//   LOAD LCR         second operand, or its complement, with load-and-test CC
//   AH LH            halfword second operand, sign-extended
//   IC               insert the byte of the second operand into the low byte
//   SHIFT            op2 bits [37:32] = amount, [39:38] = 00 SLL, 01 SRL,
//                    10 SLA, 11 SRA
//   MUL              signed 32 x 32 -> 64-bit product on the whole bus (an
//                    even/odd register pair)
// Byte and halfword stores of a register take its low-order bits; that is
// done by the data memory, not here.
module int_unit
  import e3081_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  eu_req_t    req,
  output word_t      result,
  output logic [1:0] cc
);
  ifunc_e      f;
  logic [31:0] a, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      f <= I_LOAD; a <= '0; b <= '0;
    end else if (req.start) begin
      f   <= ifunc_e'(req.func);
      a   <= req.op1[63:32];
      b   <= req.op2[63:32];
    end
  end

  function automatic logic [1:0] cc_arith(logic [31:0] r, logic ovf);
    if (ovf)        return 2'd3;
    if (r == '0)    return 2'd0;
    return r[31] ? 2'd1 : 2'd2;
  endfunction

  logic [31:0] r, bh;
  logic [32:0] s;
  logic [63:0] prod, sh64;
  logic [5:0]  amt;

  always_comb begin
    r    = a;
    cc   = 2'd0;
    s    = '0;
    prod = '0;
    sh64 = '0;
    bh   = {{16{b[31]}}, b[31:16]};
    amt  = b[5:0];
    result = '0;
    unique case (f)
      I_ADD, I_AH: begin
        logic [31:0] bb;
        bb = (f == I_AH) ? bh : b;
        r  = a + bb;
        cc = cc_arith(r, (a[31] == bb[31]) && (r[31] != a[31]));
      end
      I_SUB: begin
        r  = a - b;
        cc = cc_arith(r, (a[31] != b[31]) && (r[31] != a[31]));
      end
      I_CMP:  cc = (a == b) ? 2'd0 : ($signed(a) < $signed(b)) ? 2'd1 : 2'd2;
      I_CMPL: cc = (a == b) ? 2'd0 : (a < b) ? 2'd1 : 2'd2;
      I_ADDL: begin
        s  = {1'b0, a} + {1'b0, b};
        r  = s[31:0];
        cc = {s[32], |r};
      end
      I_SUBL: begin
        s  = {1'b0, a} + {1'b0, ~b} + 33'd1;
        r  = s[31:0];
        cc = {s[32], |r};
      end
      I_AND: begin r = a & b; cc = {1'b0, |r}; end
      I_OR:  begin r = a | b; cc = {1'b0, |r}; end
      I_XOR: begin r = a ^ b; cc = {1'b0, |r}; end
      I_LOAD: begin r = b;  cc = cc_arith(r, 1'b0); end
      I_LCR: begin
        r  = -b;
        cc = cc_arith(r, b == 32'h8000_0000);
      end
      I_LH:  begin r = bh; cc = cc_arith(r, 1'b0); end
      I_IC:  r = {a[31:8], b[31:24]};
      I_SHIFT: begin
        unique case (b[7:6])
          2'b00: r = a << amt;
          2'b01: r = a >> amt;
          2'b10: begin
            // arithmetic left: sign kept, overflow if a lost bit differs
            sh64 = {{32{a[31]}}, a} << amt;
            r    = {a[31], sh64[30:0]};
            cc   = cc_arith(r, sh64[63:31] != {33{a[31]}});
          end
          default: begin
            r  = 32'($signed(a) >>> amt);
            cc = cc_arith(r, 1'b0);
          end
        endcase
      end
      I_MUL: prod = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b});
      default: r = a;
    endcase
    result = (f == I_MUL) ? prod : {r, 32'h0};
  end

  logic unused;
  assign unused = ^req.op1[31:0] ^ ^req.op2[31:0] ^ req.dbl;
endmodule
