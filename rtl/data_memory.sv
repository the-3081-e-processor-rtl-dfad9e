// data_memory: the processor's data memory, up to 14 boards of 1/4 MByte
// (3.5 MByte) on a 24-bit byte address.
//
// Address bits [23:18] select the board and [17:3] the doubleword on it;
// addresses above the last board read as zero and ignore writes. An operand
// must lie within one doubleword (aligned to its own length).
// Read: the addressed operand is presented left-justified on the bus (the
// doubleword is rotated so the addressed byte is bits [63:56]); this path
// drives the ABUS. Write: 32- and 64-bit operands are taken left-justified
// from the bus (BBUS); 8- and 16-bit stores take the low-order byte or
// halfword of the 32-bit word in [63:32], i.e. bits [39:32] or [47:32], which
// is what a store of part of a register needs. Byte enables limit the write
// to the addressed bytes. Reads are combinational, writes at the clock edge.
module data_memory
  import e3081_pkg::*;
#(
  parameter int unsigned BOARDS      = 14,
  parameter int unsigned BOARD_WORDS = 32768
) (
  input  logic  clk,
  input  addr_t addr,
  input  len_e  len,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata
);
  localparam int unsigned WA = $clog2(BOARD_WORDS);
  localparam int unsigned BA = AW - 3 - WA;

  logic [BA-1:0] board;
  logic [WA-1:0] waddr;
  logic [2:0]    boff;
  assign board = addr[AW-1 -: BA];
  assign waddr = addr[3 +: WA];
  assign boff  = addr[2:0];

  word_t brd [BOARDS];
  word_t dw;
  always_comb begin
    dw = '0;
    for (int i = 0; i < BOARDS; i++) dw |= brd[i];
  end
  assign rdata = dw << (8 * boff);

  // write data and byte enables
  word_t      wd_l;   // operand left-justified
  word_t      wd;
  logic [7:0] be_l, be;
  always_comb begin
    unique case (len)
      LEN8:    begin wd_l = {wdata[39:32], 56'h0}; be_l = 8'h80; end
      LEN16:   begin wd_l = {wdata[47:32], 48'h0}; be_l = 8'hC0; end
      LEN32:   begin wd_l = wdata;                 be_l = 8'hF0; end
      default: begin wd_l = wdata;                 be_l = 8'hFF; end
    endcase
    wd = wd_l >> (8 * boff);
    be = be_l >> boff;
  end

  for (genvar g = 0; g < BOARDS; g++) begin : g_board
    mem_board #(.WORDS(BOARD_WORDS)) u_board (
      .clk,
      .sel      (board == BA'(g)),
      .word_addr(waddr),
      .we,
      .be,
      .wdata    (wd),
      .rdata    (brd[g])
    );
  end
endmodule
