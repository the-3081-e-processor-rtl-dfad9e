// sequencer: micro-program address counter and conditional branch logic.
//
// While `running`, the microinstruction at `upc` executes each cycle and upc
// advances by one, unless that microinstruction is a branch (bits [31:30] =
// 11): branch type tt = instr[29:28], IBM 4-bit mask = instr[27:24], absolute
// target = instr[23:0]. The branch condition is the IBM one: mask bit 8, 4,
// 2, 1 selects condition code 0, 1, 2, 3; a mask of 1111 always branches.
//   BT_BC   conditional branch
//   BT_BAL  conditional branch that saves upc+1 in the link register
//   BT_RET  conditional branch to the link register
//   BT_HALT stop the processor (the mask is ignored)
// A branch takes one cycle and has no delay slot. `start` (from the host
// interface) loads upc and sets running; `stop` (a host halt request or a
// debug stop condition) clears running after the current microinstruction
// has executed. Branch types and the link register are this design's choice.
module sequencer
  import e3081_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [UPC_W-1:0] start_addr,
  input  logic             stop,
  input  logic [31:0]      instr,
  input  logic [1:0]       cc,
  output logic [UPC_W-1:0] upc,
  output logic             running,
  output logic             halted_by_instr,  // pulse: a HALT branch executed
  output logic             branch_taken      // pulse: a branch was taken
);
  logic             is_br, cond;
  btype_e           tt;
  logic [3:0]       mask;
  logic [UPC_W-1:0] link, nxt;

  always_comb begin
    is_br = running && instr[31:30] == 2'b11;
    tt    = btype_e'(instr[29:28]);
    mask  = instr[27:24];
    cond  = mask[3 - cc];
    nxt   = upc + 1'b1;
    branch_taken    = 1'b0;
    halted_by_instr = 1'b0;
    if (is_br) begin
      unique case (tt)
        BT_BC, BT_BAL: if (cond) begin nxt = instr[23:0]; branch_taken = 1'b1; end
        BT_RET:        if (cond) begin nxt = link;        branch_taken = 1'b1; end
        default:       halted_by_instr = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      upc <= '0; running <= 1'b0; link <= '0;
    end else if (start && !running) begin
      upc <= start_addr; running <= 1'b1;
    end else if (running) begin
      upc <= nxt;
      if (is_br && tt == BT_BAL && cond) link <= upc + 1'b1;
      if (halted_by_instr || stop) running <= 1'b0;
    end
  end
endmodule
