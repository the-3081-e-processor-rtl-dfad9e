// fp_add: floating-point add/subtract execution unit, IBM System/370
// hexadecimal format (sign, 7-bit excess-64 characteristic, 6-digit short or
// 14-digit long fraction), short and long.
//
// The unit is a two-stage pipeline behind its input registers, so a new
// operation may start every cycle:
//   cycle t    start: op1 (BBUS) and op2 (ABUS) enter the input registers
//   cycle t+1  A1: exponent compare and pre-normalization shift of the operand
//              with the smaller characteristic (one guard digit is kept)
//   cycle t+2  A2: add/subtract of the fractions, then post-normalization and
//              characteristic correction, written into the result register
//   cycle t+3  and later: result (AR) and condition code readable
// Pre- and post-normalization use separate shifters and separate exponent
// arithmetic, as the original unit did. The result is truncated, as on IBM
// machines. A zero fraction or an exponent underflow gives a true zero; an
// exponent overflow wraps the characteristic and sets `exc`.
// Functions: FA_ADD, FA_SUB, and FA_CMP, which only sets the condition code
// (0 equal, 1 op1 low, 2 op1 high) and leaves the result register alone.
// Add/subtract CC: 0 zero, 1 negative, 2 positive, 3 exponent overflow.
module fp_add
  import e3081_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  eu_req_t    req,
  output word_t      result,
  output logic [1:0] cc,
  output logic       exc
);
  // input registers
  logic    v0, dbl0;
  fafunc_e f0;
  word_t   a0, b0;

  // stage 1 registers
  logic          v1, dbl1;
  fafunc_e       f1;
  logic          sb1, ss1;      // signs of larger / smaller-exponent operand
  logic [6:0]    e1;
  logic [59:0]   fb1, fs1;      // 15-digit fractions (14 + guard)

  always_ff @(posedge clk) begin
    if (rst) begin
      v0 <= 1'b0; dbl0 <= 1'b0; f0 <= FA_ADD; a0 <= '0; b0 <= '0;
    end else begin
      v0 <= req.start;
      if (req.start) begin
        dbl0 <= req.dbl;
        f0   <= fafunc_e'(req.func[1:0]);
        a0   <= req.op1;
        b0   <= req.op2;
      end
    end
  end

  // ---- A1: pre-normalization ----
  logic        sa, sbx, swap;
  logic [59:0] fa, fbv, fsmall;
  logic [6:0]  ea, eb, diff;

  always_comb begin
    sa   = a0[63];
    sbx  = b0[63] ^ (f0 != FA_ADD);            // subtract/compare negate op2
    ea   = a0[62:56];
    eb   = b0[62:56];
    fa   = {(dbl0 ? a0[55:0] : {a0[55:32], 32'h0}), 4'h0};
    fbv  = {(dbl0 ? b0[55:0] : {b0[55:32], 32'h0}), 4'h0};
    swap = eb > ea;
    diff = swap ? eb - ea : ea - eb;
    fsmall = swap ? fa : fbv;
    fsmall = (diff > 7'd15) ? '0 : fsmall >> (4 * diff);
    if (!dbl0) fsmall[31:0] = '0;              // short: 6 digits + guard only
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; dbl1 <= 1'b0; f1 <= FA_ADD; sb1 <= 1'b0; ss1 <= 1'b0;
      e1 <= '0; fb1 <= '0; fs1 <= '0;
    end else begin
      v1 <= v0;
      if (v0) begin
        dbl1 <= dbl0;
        f1   <= f0;
        sb1  <= swap ? sbx : sa;
        ss1  <= swap ? sa : sbx;
        e1   <= swap ? eb : ea;
        fb1  <= swap ? fbv : fa;
        fs1  <= fsmall;
      end
    end
  end

  // ---- A2: add and post-normalization ----
  logic [60:0]      sum;
  logic             sgn;
  logic [59:0]      norm;
  logic [4:0]       lz;
  logic signed [9:0] ex;
  logic [64:0]      packed_r;
  logic [1:0]       cc_n;

  always_comb begin
    if (sb1 == ss1) begin
      sum = {1'b0, fb1} + {1'b0, fs1};
      sgn = sb1;
    end else if (fb1 >= fs1) begin
      sum = {1'b0, fb1 - fs1};
      sgn = sb1;
    end else begin
      sum = {1'b0, fs1 - fb1};
      sgn = ss1;
    end
    lz = 5'd0;
    if (sum[60]) begin
      norm = {3'b000, sum[60:4]};                // carry: shift right one digit
      ex   = $signed({3'b000, e1}) + 10'sd1;
    end else begin
      lz   = lz_digits({sum[59:0], 4'h0});
      norm = sum[59:0] << (4 * lz);
      ex   = $signed({3'b000, e1}) - $signed({5'b00000, lz});
    end
    packed_r = hfp_pack(sgn, ex, norm[59:4], dbl1);
    if (sum == '0)             cc_n = 2'd0;
    else if (f1 == FA_CMP)     cc_n = sgn ? 2'd1 : 2'd2;
    else if (packed_r[64])     cc_n = 2'd3;
    else if (packed_r[62:0] == '0) cc_n = 2'd0;
    else                       cc_n = packed_r[63] ? 2'd1 : 2'd2;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      result <= '0; cc <= 2'd0; exc <= 1'b0;
    end else if (v1) begin
      cc <= cc_n;
      if (f1 != FA_CMP) begin
        result <= packed_r[63:0];
        exc    <= packed_r[64];
      end
    end
  end

  logic unused;
  assign unused = ^req.func[3:2];
endmodule
