// tb_fp_add: self-checking test of the floating add/subtract unit.
// Issues one operation per cycle (short and long add, subtract, compare,
// random operands plus directed cases) and checks every result and condition
// code exactly three cycles after its start against the reference model.
module tb_fp_add;
  import e3081_pkg::*;
  import tb_hfp_ref_pkg::*;

  logic clk = 0, rst = 1;
  eu_req_t req;
  word_t result;
  logic [1:0] cc;
  logic exc;
  int checks = 0, failures = 0, cyc = 0;

  fp_add dut (.clk, .rst, .req, .result, .cc, .exc);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 400;
  word_t ea [N+3];
  logic [1:0] ecc [N+3];
  bit    iscmp [N+3], valid [N+3];

  task automatic chk(int i);
    if (!valid[i]) return;
    checks++;
    if (cc !== ecc[i] || (!iscmp[i] && result !== ea[i])) begin
      failures++;
      if (failures < 10)
        $display("op %0d: got %h cc %0d, want %h cc %0d", i, result, cc, ea[i], ecc[i]);
    end
  endtask

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N + 3; i++) begin
      @(negedge clk);
      if (i >= 3) chk(i - 3);
      req = '0;
      valid[i] = 0;
      if (i < N) begin
        bit dbl, ovf;
        int sg;
        fafunc_e f;
        word_t a, b;
        dbl = $urandom_range(0, 1);
        f   = fafunc_e'($urandom_range(0, 2));
        a   = rnd(dbl, 56, 72);
        b   = rnd(dbl, 56, 72);
        if (i == 0) begin a = 64'h4110_0000_0000_0000; b = a; dbl = 0; f = FA_ADD; end
        if (i == 1) begin a = 64'h4110_0000_0000_0000; b = 64'h4080_0000_0000_0000; dbl = 0; f = FA_SUB; end
        if (i == 2) begin a = 64'h7FFF_FFFF_0000_0000; b = a; dbl = 0; f = FA_ADD; end
        if (i == 3) begin a = 64'h4110_0000_0000_0000; b = 64'h3B10_0000_0000_0000; dbl = 0; f = FA_SUB; end
        ea[i] = add(a, b, dbl, f != FA_ADD, ovf, sg);
        if (i == 0 && ea[i] !== 64'h4120_0000_0000_0000) failures++;
        if (i == 1 && ea[i] !== 64'h4080_0000_0000_0000) failures++;
        if (i == 3 && ea[i] !== 64'h40FF_FFFF_0000_0000) failures++;
        iscmp[i] = (f == FA_CMP);
        if (f == FA_CMP) ecc[i] = (sg == 0) ? 2'd0 : (sg < 0) ? 2'd1 : 2'd2;
        else ecc[i] = ovf ? 2'd3 : (ea[i][62:0] == 0) ? 2'd0 : ea[i][63] ? 2'd1 : 2'd2;
        valid[i] = 1;
        req = '{start: 1'b1, func: {2'b00, f}, dbl: dbl, op1: a, op2: b};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
