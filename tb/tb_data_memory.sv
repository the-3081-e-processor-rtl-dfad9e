// tb_data_memory: self-checking test of the 14-board data memory at its full
// size. Random 8/16/32/64-bit aligned stores and loads over a set of
// addresses spread across all boards, checked against a byte-level shadow
// model: loads left-justified, partial stores from the low-order bits of the
// word, unused boards above 3.5 MByte reading as zero.
module tb_data_memory;
  import e3081_pkg::*;

  logic clk = 0, we;
  addr_t addr;
  len_e len;
  word_t wdata, rdata;
  logic [7:0] shadow [addr_t];
  int checks = 0, failures = 0;

  data_memory dut (.clk, .addr, .len, .we, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  addr_t bases [16];

  function automatic int nbytes(len_e l);
    return 1 << int'(l);
  endfunction

  initial begin
    we = 0; len = LEN64; wdata = 0; addr = 0;
    for (int i = 0; i < 16; i++) bases[i] = addr_t'(i) << 18 | addr_t'($urandom_range(0, 4095) * 8);
    // initialise 2 doublewords at each base
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 2; j++) begin
        @(negedge clk);
        addr = bases[i] + addr_t'(8 * j); len = LEN64; we = 1; wdata = {$urandom, $urandom};
        for (int b = 0; b < 8; b++) shadow[addr + addr_t'(b)] = (i < 14) ? wdata[63-8*b -: 8] : 8'h00;
      end
    for (int i = 0; i < 4000; i++) begin
      int n;
      word_t want;
      @(negedge clk);
      len = len_e'($urandom_range(0, 3));
      n = nbytes(len);
      addr = bases[$urandom_range(0, 15)] + addr_t'($urandom_range(0, 15) / n * n);
      we = $urandom_range(0, 1);
      wdata = {$urandom, $urandom};
      #1;
      want = '0;
      for (int b = 0; b < n; b++) want[63-8*b -: 8] = shadow[addr + addr_t'(b)];
      checks++;
      if ((rdata & (~64'h0 << (64 - 8 * n))) !== want) begin
        failures++;
        if (failures < 10) $display("addr %h len %0d: got %h want %h", addr, n, rdata, want);
      end
      if (we && addr[23:18] < 14) begin
        word_t src;
        src = (n >= 4) ? wdata : (wdata[63:32] << (64 - 8 * n));
        for (int b = 0; b < n; b++) shadow[addr + addr_t'(b)] = src[63-8*b -: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
