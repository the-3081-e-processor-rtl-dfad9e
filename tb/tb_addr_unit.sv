// tb_addr_unit: self-checking test of the address register logic:
// D(B) forms, base register 0 meaning no base, the two-cycle D(X,B) form,
// 24-bit wrap-around, hold when idle, and that MAR changes only at the clock
// edge (one-cycle address pipeline).
module tb_addr_unit;
  import e3081_pkg::*;

  logic clk = 0, rst = 1, en;
  aop_e aop;
  logic [11:0] disp;
  logic reg_is_zero;
  word_t reg_data;
  addr_t mar, model;
  int checks = 0, failures = 0;

  addr_unit dut (.clk, .rst, .en, .aop, .disp, .reg_is_zero, .reg_data, .mar);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; aop = AOP_NONE; disp = 0; reg_is_zero = 0; reg_data = 0; model = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // L 3,328(13) with R13 = 0x1000 -> MAR = 0x1148
    @(negedge clk);
    en = 1; aop = AOP_DB; disp = 12'd328; reg_data = {32'h0000_1000, 32'h0};
    #1 checks++; if (mar !== 0) failures++;       // not yet: loaded at the edge
    @(negedge clk);
    checks++; if (mar !== 24'h001148) failures++;
    model = mar;
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] r;
      en = $urandom_range(0, 3) != 0;
      aop = aop_e'($urandom_range(0, 2));
      disp = 12'($urandom);
      reg_is_zero = $urandom_range(0, 5) == 0;
      r = $urandom;
      reg_data = {r, 32'($urandom)};
      if (en) begin
        if (aop == AOP_DB)  model = 24'(disp) + (reg_is_zero ? 24'h0 : r[23:0]);
        if (aop == AOP_IDX) model = model + (reg_is_zero ? 24'h0 : r[23:0]);
      end
      @(negedge clk);
      checks++;
      if (mar !== model) begin
        failures++;
        if (failures < 10) $display("got %h want %h", mar, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
