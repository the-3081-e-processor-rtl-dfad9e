// mem_board: one data memory board, 1/4 MByte of static RAM organised as
// 32K doublewords of 64 bits, so a whole 8-byte operand is read or written in
// one processor cycle.
//
// Reads are asynchronous, as with the static RAM chips the board is built
// from: rdata follows word_addr within the cycle. A write takes place at the
// rising clock edge for the bytes whose enable bit is set (be[7] is the
// leftmost byte, bits [63:56]). The board answers only when `sel` is high.
module mem_board
  import e3081_pkg::*;
#(
  parameter int unsigned WORDS = 32768   // 256 KByte / 8
) (
  input  logic                     clk,
  input  logic                     sel,
  input  logic [$clog2(WORDS)-1:0] word_addr,
  input  logic                     we,
  input  logic [7:0]               be,
  input  word_t                    wdata,
  output word_t                    rdata
);
  word_t mem [WORDS];

  assign rdata = sel ? mem[word_addr] : '0;

  always_ff @(posedge clk) begin
    if (sel && we) begin
      for (int i = 0; i < 8; i++)
        if (be[i]) mem[word_addr][8*i +: 8] <= wdata[8*i +: 8];
    end
  end
endmodule
