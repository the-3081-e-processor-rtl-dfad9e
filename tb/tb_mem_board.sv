// tb_mem_board: self-checking test of one memory board: byte-enabled writes
// against a shadow copy, asynchronous reads, and no response when not
// selected.
module tb_mem_board;
  import e3081_pkg::*;

  localparam int unsigned WORDS = 32768;
  logic clk = 0, sel, we;
  logic [14:0] word_addr;
  logic [7:0] be;
  word_t wdata, rdata;
  word_t shadow [logic [14:0]];
  int checks = 0, failures = 0;

  mem_board #(.WORDS(WORDS)) dut (.clk, .sel, .word_addr, .we, .be, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 1; we = 0; be = 0; wdata = 0; word_addr = 0;
    // a small window of addresses at both ends, fully written first
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      word_addr = (i < 32) ? 15'(i) : 15'(WORDS - 64 + i);
      we = 1; be = 8'hFF; wdata = {$urandom, $urandom};
      shadow[word_addr] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      int k;
      @(negedge clk);
      k = $urandom_range(0, 63);
      word_addr = (k < 32) ? 15'(k) : 15'(WORDS - 64 + k);
      sel = $urandom_range(0, 7) != 0;
      we = $urandom_range(0, 1);
      be = 8'($urandom);
      wdata = {$urandom, $urandom};
      #1;
      checks++;
      if (rdata !== (sel ? shadow[word_addr] : 64'h0)) begin
        failures++;
        if (failures < 10) $display("addr %h: got %h want %h", word_addr, rdata, shadow[word_addr]);
      end
      if (sel && we)
        for (int b = 0; b < 8; b++) if (be[b]) shadow[word_addr][8*b +: 8] = wdata[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
