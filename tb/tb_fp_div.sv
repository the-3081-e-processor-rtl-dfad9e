// tb_fp_div: self-checking test of the floating divide unit. Short and long
// divides with random and directed operands (including a zero divisor and
// a zero dividend); checks the quotient, the exception flag, that the unit
// is busy while it iterates and that the quotient is readable exactly 16
// (short) or 32 (long) cycles after the start, i.e. two bits per cycle.
module tb_fp_div;
  import e3081_pkg::*;
  import tb_hfp_ref_pkg::*;

  logic clk = 0, rst = 1;
  eu_req_t req;
  word_t result;
  logic exc, busy;
  int checks = 0, failures = 0;

  fp_div dut (.clk, .rst, .req, .result, .exc, .busy);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      word_t a, b, w;
      bit o, dbl;
      int lat;
      dbl = i[0];
      a = rnd(dbl, 30, 98);
      b = rnd(dbl, 30, 98);
      if (i == 0) begin a = 64'h4130_0000_0000_0000; b = 64'h4120_0000_0000_0000; end // 3/2
      if (i == 2) b = 64'h0;
      if (i == 4) a = 64'h0;
      if (b[55:0] == 0 && i != 2) b = 64'h4110_0000_0000_0000;
      w = div(a, b, dbl, o);
      if (i == 0 && w !== 64'h4118_0000_0000_0000) failures++;
      lat = dbl ? 32 : 16;
      @(negedge clk);
      req = '{start: 1'b1, func: 4'h0, dbl: dbl, op1: a, op2: b};
      @(negedge clk);
      req = '0;
      if (a[55:0] != 0 && b[55:0] != 0) begin
        for (int c = 1; c < lat; c++) begin
          checks++;
          if (!busy) begin failures++; $display("op %0d: idle at %0d", i, c); end
          @(negedge clk);
        end
      end else
        repeat (lat - 1) @(negedge clk);
      checks++;
      if (busy || result !== w || exc !== o) begin
        failures++;
        if (failures < 10) $display("op %0d %h/%h: got %h/%0b want %h/%0b", i, a, b, result, exc, w, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
