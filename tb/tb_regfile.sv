// tb_regfile: self-checking test of the register file. Random 32- and 64-bit
// writes through port B against a shadow copy of the 32 register halves;
// both ports are read back at 32 and 64 bits, and the layout of IBM
// registers (R0 = high half of word 0, R1 = low half) is checked.
module tb_regfile;
  import e3081_pkg::*;

  logic clk = 0;
  logic [4:0] a_addr, b_addr;
  logic a_dbl, b_dbl, we;
  word_t a_data, b_data, w_data;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .a_addr, .a_dbl, .a_data, .b_addr, .b_dbl, .b_data, .we, .w_data);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_port(logic [4:0] ad, logic dbl, word_t got);
    word_t want;
    want = dbl ? {shadow[{ad[4:1], 1'b0}], shadow[{ad[4:1], 1'b1}]} : {shadow[ad], 32'h0};
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("reg %0d dbl %0b: got %h want %h", ad, dbl, got, want);
    end
  endtask

  initial begin
    we = 0; a_addr = 0; b_addr = 0; a_dbl = 0; b_dbl = 0; w_data = 0;
    // initialise all 16 words
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; b_dbl = 1; b_addr = 5'(2 * i); w_data = {$urandom, $urandom};
      shadow[2*i] = w_data[63:32]; shadow[2*i+1] = w_data[31:0];
    end
    // R1 lives in the low half of word 0
    @(negedge clk);
    we = 1; b_dbl = 0; b_addr = 5'd1; w_data = 64'hDEAD_BEEF_0123_4567; shadow[1] = 32'hDEAD_BEEF;
    @(negedge clk);
    we = 0; a_addr = 5'd0; a_dbl = 1;
    #1;
    checks++;
    if (a_data[31:0] !== 32'hDEAD_BEEF) failures++;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      b_addr = 5'($urandom); b_dbl = $urandom_range(0, 1);
      a_addr = 5'($urandom); a_dbl = $urandom_range(0, 1);
      w_data = {$urandom, $urandom};
      #1;
      check_port(a_addr, a_dbl, a_data);
      if (!we) check_port(b_addr, b_dbl, b_data);
      if (we) begin
        if (b_dbl) begin
          shadow[{b_addr[4:1], 1'b0}] = w_data[63:32];
          shadow[{b_addr[4:1], 1'b1}] = w_data[31:0];
        end else shadow[b_addr] = w_data[63:32];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
