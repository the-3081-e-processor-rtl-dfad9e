// fp_div: floating-point divide execution unit, IBM hexadecimal format,
// iterative, two quotient bits per cycle.
//
//   cycle t      start, operands enter the input registers
//   cycle t+1    set-up: both fractions are normalized (leading zero digits
//                shifted out, characteristics corrected), the quotient
//                characteristic is formed, the partial remainder loaded
//   next N/2     restoring division, 2 quotient bits per cycle, for
//                N = 28 (short) or 60 (long) bits: the 6 or 14 result
//                digits plus one digit for a dividend fraction that is not
//                smaller than the divisor fraction
//   then         result readable: from cycle t+16 (short) or t+32 (long)
// `busy` is high from t+1 until the result is written. If the dividend
// fraction is not smaller than the divisor's, the quotient has a leading
// integer digit: it is shifted right one digit and the characteristic
// incremented. The quotient is truncated. A zero dividend gives a true
// zero; a zero divisor leaves op1 as the result and sets `exc`; exponent
// overflow wraps and sets `exc`; underflow gives a true zero.
module fp_div
  import e3081_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  eu_req_t req,
  output word_t   result,
  output logic    exc,
  output logic    busy
);
  logic  v0, dbl0;
  word_t a0, b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      v0 <= 1'b0; dbl0 <= 1'b0; a0 <= '0; b0 <= '0;
    end else begin
      v0 <= req.start;
      if (req.start) begin
        dbl0 <= req.dbl;
        a0   <= req.op1;
        b0   <= req.op2;
      end
    end
  end

  // set-up: normalize both fractions
  logic [55:0]      fa, fb, na, nb;
  logic [4:0]       lza, lzb;
  logic signed [9:0] eq;
  always_comb begin
    fa  = dbl0 ? a0[55:0] : {a0[55:32], 32'h0};
    fb  = dbl0 ? b0[55:0] : {b0[55:32], 32'h0};
    lza = lz_digits({fa, 8'h0});
    lzb = lz_digits({fb, 8'h0});
    na  = fa << (4 * lza);
    nb  = fb << (4 * lzb);
    eq  = $signed({3'b000, a0[62:56]}) - $signed({3'b000, b0[62:56]}) + 10'sd64
          - $signed({5'b00000, lza}) + $signed({5'b00000, lzb});
  end

  logic              run, dbl, sgn;
  logic signed [9:0] e;
  logic [56:0]       rem;     // partial remainder, always < divisor after a step
  logic [55:0]       dvs;
  logic [57:0]       q;       // quotient bits so far
  logic [3:0]        lowbits; // the dividend's last digit, shifted in first
  logic [5:0]        cnt;     // quotient bits still to produce

  logic [56:0] r1, r2;
  logic        q1, q2;
  logic [57:0] t1, t2;
  always_comb begin
    t1 = {rem, lowbits[3]};
    q1 = t1 >= {2'b00, dvs};
    r1 = q1 ? 57'(t1 - {2'b00, dvs}) : t1[56:0];
    t2 = {r1, lowbits[2]};
    q2 = t2 >= {2'b00, dvs};
    r2 = q2 ? 57'(t2 - {2'b00, dvs}) : t2[56:0];
  end

  logic [59:0] qfin;
  logic [55:0] qfrac;
  logic signed [9:0] efin;
  logic [64:0] pk;
  always_comb begin
    qfin = {q[57:0], q1, q2};
    // 60-bit quotient (long) or 28-bit (short, in qfin[27:0])
    if (dbl) begin
      if (qfin[59:56] != 4'h0) begin qfrac = qfin[59:4]; efin = e + 10'sd1; end
      else                     begin qfrac = qfin[55:0]; efin = e;         end
    end else begin
      if (qfin[27:24] != 4'h0) begin qfrac = {qfin[27:4], 32'h0}; efin = e + 10'sd1; end
      else                     begin qfrac = {qfin[23:0], 32'h0}; efin = e;         end
    end
    pk = hfp_pack(sgn, efin, qfrac, dbl);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run <= 1'b0; dbl <= 1'b0; sgn <= 1'b0; e <= '0; rem <= '0; dvs <= '0;
      q <= '0; lowbits <= '0; cnt <= '0; result <= '0; exc <= 1'b0;
    end else begin
      if (v0) begin
        dbl <= dbl0;
        sgn <= a0[63] ^ b0[63];
        e   <= eq;
        q   <= '0;
        if (fb == '0) begin
          result <= a0;           // divide exception: operation suppressed
          exc    <= 1'b1;
          run    <= 1'b0;
        end else if (fa == '0) begin
          result <= '0;
          exc    <= 1'b0;
          run    <= 1'b0;
        end else begin
          // dividend = na * 2^N; its first 52 bits go straight in, then the
          // last digit and N zero bits are shifted in two bits per cycle
          rem     <= {5'b00000, na[55:4]};
          lowbits <= na[3:0];
          dvs     <= nb;
          cnt     <= dbl0 ? 6'd60 : 6'd28;
          run     <= 1'b1;
        end
      end else if (run) begin
        rem     <= r2;
        q       <= {q[55:0], q1, q2};
        lowbits <= {lowbits[1:0], 2'b00};
        cnt     <= cnt - 6'd2;
        if (cnt == 6'd2) begin
          run    <= 1'b0;
          result <= pk[63:0];
          exc    <= pk[64];
        end
      end
    end
  end
  assign busy = run | v0;

  logic unused;
  assign unused = ^req.func;
endmodule
