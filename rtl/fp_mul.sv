// fp_mul: floating-point multiply execution unit, IBM hexadecimal format.
//
// Short operands (6-digit fractions) go through an array of nine 8x8
// multipliers: every byte pair of the two 24-bit fractions is multiplied in
// the first cycle and the nine partial products are registered; in the
// second cycle they are summed into the 48-bit product. A new short multiply
// may start every cycle.
//   cycle t    start, operands enter the input registers
//   cycle t+1  M1: 9 partial products
//   cycle t+2  M2: partial products summed into the result register
//   cycle t+3  and later: result readable
// Long operands (14-digit fractions) use seven 8x8 multipliers iteratively:
// in multiply cycle k (k = 0..6) all seven bytes of op1 are multiplied by
// byte k of op2 (least significant first); in the following cycle those
// partial products are summed and added, shifted by 8k bits, to the product
// accumulator while the next byte is in the multipliers. Seven multiply
// cycles plus one accumulation cycle give the product, readable from cycle
// t+9; `busy` is high meanwhile and no other multiply may start.
// Post-normalization and the characteristic correction are combinational on
// the result register, i.e. done in the cycle the result is put on BBUS.
// Both forms give a long (14-digit) result, truncated, as the IBM ME/MD
// instructions do. Zero or underflow gives a true zero; overflow wraps the
// characteristic and sets `exc`. Multiply does not change the condition code.
module fp_mul
  import e3081_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  eu_req_t req,
  output word_t   result,
  output logic    exc,
  output logic    busy
);
  // input registers
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

  // common sign / characteristic sum (true exponent + 64)
  logic             s_n;
  logic signed [9:0] e_n;
  assign s_n = a0[63] ^ b0[63];
  assign e_n = $signed({3'b000, a0[62:56]}) + $signed({3'b000, b0[62:56]}) - 10'sd64;

  // ---------------- short path: 9 multipliers, pipelined ----------------
  logic [15:0]      pp9 [3][3];
  logic             sv1, ss1;
  logic signed [9:0] se1;

  always_ff @(posedge clk) begin
    if (rst) begin
      sv1 <= 1'b0; ss1 <= 1'b0; se1 <= '0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) pp9[i][j] <= '0;
    end else begin
      sv1 <= v0 && !dbl0;
      if (v0 && !dbl0) begin
        ss1 <= s_n;
        se1 <= e_n;
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++)
            pp9[i][j] <= a0[32+8*i +: 8] * b0[32+8*j +: 8];
      end
    end
  end

  logic [47:0] sum9;
  always_comb begin
    sum9 = '0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        sum9 = sum9 + (48'(pp9[i][j]) << (8 * (i + j)));
  end

  // ---------------- long path: 7 multipliers, iterative ----------------
  logic [15:0]      pp7 [7];
  logic [111:0]     acc;
  logic [3:0]       k;        // multiplier byte now in the array
  logic             mul_on, acc_on;
  logic [2:0]       acc_k;
  logic             ls;
  logic signed [9:0] le;
  logic [55:0]      la, lb;
  logic             long_done;

  logic [63:0]  row;
  logic [111:0] acc_next;
  always_comb begin
    row = '0;
    for (int j = 0; j < 7; j++) row = row + (64'(pp7[j]) << (8 * j));
    acc_next = acc + (112'(row) << (8 * acc_k));
  end
  assign long_done = acc_on && acc_k == 3'd6;

  always_ff @(posedge clk) begin
    if (rst) begin
      k <= '0; mul_on <= 1'b0; acc_on <= 1'b0; acc_k <= '0; acc <= '0;
      ls <= 1'b0; le <= '0; la <= '0; lb <= '0;
      for (int j = 0; j < 7; j++) pp7[j] <= '0;
    end else begin
      if (v0 && dbl0) begin
        // operands captured; first multiply cycle follows
        la <= a0[55:0]; lb <= b0[55:0]; ls <= s_n; le <= e_n;
        for (int j = 0; j < 7; j++) pp7[j] <= a0[8*j +: 8] * b0[7:0];
        k      <= 4'd1;
        mul_on <= 1'b1;
        acc_on <= 1'b1;
        acc_k  <= 3'd0;
        acc    <= '0;
      end else begin
        if (mul_on) begin
          for (int j = 0; j < 7; j++) pp7[j] <= la[8*j +: 8] * lb[8*k[2:0] +: 8];
          k <= k + 4'd1;
          if (k == 4'd6) mul_on <= 1'b0;
        end
        if (acc_on) begin
          acc   <= acc_next;
          acc_k <= acc_k + 3'd1;
          if (acc_k == 3'd6) acc_on <= 1'b0;
        end
      end
    end
  end
  assign busy = mul_on | acc_on | (v0 & dbl0);

  // ---------------- result register and post-normalization ----------------
  logic             rs;
  logic signed [9:0] re;
  logic [111:0]     rp;
  logic             rdbl;

  always_ff @(posedge clk) begin
    if (rst) begin
      rs <= 1'b0; re <= '0; rp <= '0; rdbl <= 1'b0;
    end else if (sv1) begin
      rs <= ss1; re <= se1; rp <= {sum9, 64'h0}; rdbl <= 1'b0;
    end else if (long_done) begin
      rs <= ls; re <= le; rp <= acc_next; rdbl <= 1'b1;
    end
  end

  logic [4:0]   lz;
  logic [111:0] np;
  logic [64:0]  pk;
  always_comb begin
    lz = 5'd28;
    for (int i = 27; i >= 0; i--)
      if (rp[111-4*i -: 4] != 4'h0) lz = 5'(i);
    np = rp << (4 * lz);
    pk = hfp_pack(rs, re - $signed({5'b00000, lz}), np[111:56], 1'b1);
  end
  assign result = pk[63:0];
  assign exc    = pk[64];

  logic unused;
  assign unused = ^{req.func, rdbl, a0[31:0], b0[31:0], np[55:0]};
endmodule
