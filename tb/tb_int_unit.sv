// tb_int_unit: self-checking test of the integer unit. Random operands for
// every function; the result and condition code are checked one cycle after
// the start against a reference computed here with 64-bit integer arithmetic.
module tb_int_unit;
  import e3081_pkg::*;

  logic clk = 0, rst = 1;
  eu_req_t req;
  word_t result;
  logic [1:0] cc;
  int checks = 0, failures = 0;

  int_unit dut (.clk, .rst, .req, .result, .cc);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] sgncc(longint v);
    if (v == 0) return 0;
    return v < 0 ? 1 : 2;
  endfunction

  task automatic model(ifunc_e f, logic [31:0] a, logic [31:0] b, output word_t r,
                       output logic [1:0] c, output bit ccv);
    longint sa = longint'($signed(a)), sb = longint'($signed(b)), s;
    longint unsigned ua = longint'(a), ub = longint'(b), u;
    logic [31:0] w;
    ccv = 1; w = a; c = 0;
    case (f)
      I_ADD: begin s = sa + sb; w = 32'(s); c = (s != longint'($signed(w))) ? 3 : sgncc(longint'($signed(w))); end
      I_SUB: begin s = sa - sb; w = 32'(s); c = (s != longint'($signed(w))) ? 3 : sgncc(longint'($signed(w))); end
      I_AH:  begin s = sa + longint'($signed(b[31:16])); w = 32'(s);
                   c = (s != longint'($signed(w))) ? 3 : sgncc(longint'($signed(w))); end
      I_CMP:  c = (sa == sb) ? 0 : (sa < sb) ? 1 : 2;
      I_CMPL: c = (ua == ub) ? 0 : (ua < ub) ? 1 : 2;
      I_ADDL: begin u = ua + ub; w = 32'(u); c = {u[32], w != 0}; end
      I_SUBL: begin u = ua + (~ub & 64'hFFFF_FFFF) + 1; w = 32'(u); c = {u[32], w != 0}; end
      I_AND: begin w = a & b; c = {1'b0, w != 0}; end
      I_OR:  begin w = a | b; c = {1'b0, w != 0}; end
      I_XOR: begin w = a ^ b; c = {1'b0, w != 0}; end
      I_LOAD: begin w = b; c = sgncc(sb); end
      I_LCR: begin s = -sb; w = 32'(s); c = (b == 32'h8000_0000) ? 3 : sgncc(s); end
      I_LH:  begin w = 32'($signed(b[31:16])); c = sgncc(longint'($signed(w))); end
      I_IC:  begin w = {a[31:8], b[31:24]}; ccv = 0; end
      I_SHIFT: begin
        int n = int'(b[5:0]);
        case (b[7:6])
          0: begin w = 32'(ua << n); ccv = 0; end
          1: begin w = 32'(ua >> n); ccv = 0; end
          2: begin
            s = sa * (longint'(1) << n);
            w = {a[31], 31'(s)};
            c = (n > 0 && (s > 64'sh7FFF_FFFF || s < -64'sh8000_0000)) ? 3 : sgncc(longint'($signed(w)));
          end
          default: begin w = 32'(sa >>> n); c = sgncc(longint'($signed(w))); end
        endcase
      end
      default: ;
    endcase
    r = {w, 32'h0};
    if (f == I_MUL) begin r = 64'(sa * sb); ccv = 0; end
    if (f == I_IC) ccv = 0;
  endtask

  initial begin
    req = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      ifunc_e f;
      logic [31:0] a, b;
      word_t w;
      logic [1:0] c;
      bit ccv;
      f = ifunc_e'($urandom_range(0, 15));
      a = $urandom; b = $urandom;
      if (i % 7 == 0) b = a;
      if (i % 11 == 0) a = 32'h7FFF_FFFF;
      if (f == I_SHIFT) b[5:0] = 6'($urandom_range(0, 31));
      model(f, a, b, w, c, ccv);
      @(negedge clk);
      req = '{start: 1'b1, func: f, dbl: 1'b0, op1: {a, 32'($urandom)}, op2: {b, 32'($urandom)}};
      @(negedge clk);
      req = '0;
      checks++;
      if ((f != I_CMP && f != I_CMPL && result !== w) || (ccv && cc !== c)) begin
        failures++;
        if (failures < 10) $display("%s a=%h b=%h got %h cc%0d want %h cc%0d", f.name(), a, b, result, cc, w, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
