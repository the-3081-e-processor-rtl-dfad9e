// regfile: the processor's register file, sixteen 64-bit words with two
// independently addressed ports, as built from 29705 dual-port register chips.
//
// The 5-bit register address names a 32-bit half: address bits [4:1] pick the
// 64-bit word and bit 0 picks the half (0 = most significant 32 bits). So the
// 16 IBM general registers occupy words 0-7 (R0/R1 in word 0, ...), the four
// floating registers F0..F6 words 8-11, and words 12-15 are spare registers
// usable as 32-bit or 64-bit temporaries. A 64-bit access ignores address
// bit 0, which moves an even/odd register pair or a long floating register
// in one cycle. 32-bit values are read and written left-justified, in [63:32].
//
// Port A only reads (it feeds the ABUS or the address adder). Port B reads
// (BBUS) or writes; reads are combinational, the write happens at the rising
// clock edge. The array has no reset, like the chips it models.
module regfile
  import e3081_pkg::*;
#(
  parameter int unsigned WORDS = 16
) (
  input  logic        clk,
  input  logic [4:0]  a_addr,
  input  logic        a_dbl,
  output word_t       a_data,
  input  logic [4:0]  b_addr,
  input  logic        b_dbl,
  output word_t       b_data,
  input  logic        we,       // write through port B
  input  word_t       w_data
);
  word_t mem [WORDS];

  function automatic word_t rd(word_t v, logic [4:0] ad, logic dbl);
    if (dbl) return v;
    return ad[0] ? {v[31:0], 32'h0} : {v[63:32], 32'h0};
  endfunction

  assign a_data = rd(mem[a_addr[4:1]], a_addr, a_dbl);
  assign b_data = rd(mem[b_addr[4:1]], b_addr, b_dbl);

  always_ff @(posedge clk) begin
    if (we) begin
      if (b_dbl)          mem[b_addr[4:1]]        <= w_data;
      else if (b_addr[0]) mem[b_addr[4:1]][31:0]  <= w_data[63:32];
      else                mem[b_addr[4:1]][63:32] <= w_data[63:32];
    end
  end
endmodule
