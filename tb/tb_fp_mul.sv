// tb_fp_mul: self-checking test of the floating multiply unit.
// Part 1 streams short multiplies, one per cycle, and checks each product
// three cycles after its start. Part 2 runs long multiplies one at a time,
// checks that the unit is busy for eight cycles and that the product is
// readable exactly nine cycles after the start.
module tb_fp_mul;
  import e3081_pkg::*;
  import tb_hfp_ref_pkg::*;

  logic clk = 0, rst = 1;
  eu_req_t req;
  word_t result;
  logic exc, busy;
  int checks = 0, failures = 0;

  fp_mul dut (.clk, .rst, .req, .result, .exc, .busy);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 300;
  word_t ea [N+3];
  bit    eo [N+3];

  task automatic expect_eq(word_t want, bit wo, string what);
    checks++;
    if (result !== want || exc !== wo) begin
      failures++;
      if (failures < 10) $display("%s: got %h/%0b want %h/%0b", what, result, exc, want, wo);
    end
  endtask

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // short, pipelined
    for (int i = 0; i < N + 3; i++) begin
      @(negedge clk);
      if (i >= 3) expect_eq(ea[i-3], eo[i-3], "short");
      req = '0;
      if (i < N) begin
        word_t a, b;
        a = rnd(0, 40, 88);
        b = rnd(0, 40, 88);
        if (i == 0) begin a = 64'h4120_0000_0000_0000; b = 64'h4130_0000_0000_0000; end
        ea[i] = mul(a, b, 0, eo[i]);
        if (i == 0 && ea[i] !== 64'h4160_0000_0000_0000) failures++;
        req = '{start: 1'b1, func: 4'h0, dbl: 1'b0, op1: a, op2: b};
      end
    end
    // long, iterative
    for (int i = 0; i < 100; i++) begin
      word_t a, b, w;
      bit o;
      a = rnd(1, 40, 88);
      b = rnd(1, 40, 88);
      w = mul(a, b, 1, o);
      @(negedge clk);
      req = '{start: 1'b1, func: 4'h0, dbl: 1'b1, op1: a, op2: b};
      @(negedge clk);
      req = '0;
      for (int c = 1; c <= 8; c++) begin
        checks++;
        if (!busy) begin failures++; $display("not busy at cycle %0d", c); end
        @(negedge clk);
      end
      // 9 edges after start
      checks++;
      if (busy) failures++;
      expect_eq(w, o, "long");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
