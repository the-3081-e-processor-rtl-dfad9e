// tb_mop_decoder: self-checking test of the MOP decode. Microinstructions
// taken from the processor's microcode examples (address calculation plus
// load, execution-unit start from memory or registers, chaining one unit's
// result into another, result to register and memory, branch) are assembled
// field by field and the decoded bus sources, destinations and unit controls
// are compared with values written out here by hand.
module tb_mop_decoder;
  import e3081_pkg::*;

  logic [31:0] instr;
  ctl_t ctl;
  logic port_conflict;
  int checks = 0, failures = 0;

  mop_decoder dut (.instr, .ctl, .port_conflict);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctl(string what, logic [31:0] ins, logic [1:0] asrc, logic [2:0] bsrc,
                            logic reg_we, logic mem_we, logic eu_start, unit_e u, logic dbl,
                            aop_e aop, logic conflict);
    instr = ins;
    #1;
    checks++;
    if (ctl.asrc !== asrc || ctl.bsrc !== bsrc || ctl.reg_we !== reg_we || ctl.mem_we !== mem_we
        || ctl.eu_start !== eu_start || (eu_start && (ctl.eu_unit !== u || ctl.eu_dbl !== dbl))
        || ctl.aop !== aop || port_conflict !== conflict || ctl.is_branch !== 1'b0) begin
      failures++;
      $display("%s: decoded %p", what, ctl);
    end
  endtask

  initial begin
    // 688(13)->MAR, (M)->F0 (short)
    expect_ctl("load", uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), 5'd16, 5'd13, 12'd688),
               2'd1, 3'd0, 1, 0, 0, U_INT, 0, AOP_DB, 0);
    checks++; if (ctl.reg_from_a !== 1'b1 || ctl.len !== LEN32) failures++;
    // 320(13)->MAR, (M)->A2, F0->A1  (short subtract)
    expect_ctl("start FA", uinstr(mop_start(AOP_DB, F_ST_MR, euf_fa(0, FA_SUB)), 5'd16, 5'd13, 12'd320),
               2'd1, 3'd1, 0, 0, 1, U_FA, 0, AOP_DB, 0);
    checks++; if (ctl.eu_func !== 4'd1) failures++;
    // (M)->M2, AR->M1 (chain, long)
    expect_ctl("chain FM", uinstr(mop_start(AOP_NONE, F_CH_M, euf_fm(1)), 5'(U_FA), 5'd0, 12'd0),
               2'd1, 3'd5, 0, 0, 1, U_FM, 1, AOP_NONE, 0);
    // F0->A2, MR->A1
    expect_ctl("chain FA reg", uinstr(mop_start(AOP_NONE, F_CH_R, euf_fa(0, FA_ADD)), 5'(U_FM), 5'd16, 12'd0),
               2'd2, 3'd6, 0, 0, 1, U_FA, 0, AOP_NONE, 0);
    // MR->F0
    expect_ctl("result", uinstr(mop_res(AOP_NONE, F_RES_R, 0, LEN64, U_FM), 5'd16, 5'd0, 12'd0),
               2'd0, 3'd6, 1, 0, 0, U_INT, 0, AOP_NONE, 0);
    // AR->F2,(M)
    expect_ctl("result+store", uinstr(mop_res(AOP_NONE, F_RES_RM, 1, LEN32, U_FA), 5'd18, 5'd0, 12'd0),
               2'd0, 3'd5, 1, 1, 0, U_INT, 0, AOP_NONE, 0);
    checks++; if (ctl.set_cc !== 1'b1 || ctl.cc_unit !== U_FA) failures++;
    // integer RR add, R8 -> ABUS via port A
    expect_ctl("AR", uinstr(mop_start(AOP_NONE, F_ST_RR, euf_int(I_ADD)), 5'd4, 5'd8, 12'd0),
               2'd2, 3'd1, 0, 0, 1, U_INT, 0, AOP_NONE, 0);
    // divide long from memory
    expect_ctl("DD", uinstr(mop_start(AOP_DB, F_ST_MR, euf_fd(1)), 5'd18, 5'd10, 12'd8),
               2'd1, 3'd1, 0, 0, 1, U_FD, 1, AOP_DB, 0);
    // store R3
    expect_ctl("ST", uinstr(mop_misc(AOP_IDX, M_STORE, LEN32), 5'd3, 5'd9, 12'd0),
               2'd0, 3'd1, 0, 1, 0, U_INT, 0, AOP_IDX, 0);
    // LR with address calculation: port A needed twice
    expect_ctl("conflict", uinstr(mop_misc(AOP_DB, M_MOVE, LEN32), 5'd4, 5'd8, 12'd0),
               2'd2, 3'd0, 1, 0, 0, U_INT, 0, AOP_DB, 1);
    // MAR -> R5 (load address)
    expect_ctl("LA", uinstr(mop_misc(AOP_NONE, M_MAR, LEN32), 5'd5, 5'd0, 12'd0),
               2'd3, 3'd0, 1, 0, 0, U_INT, 0, AOP_NONE, 0);
    // branch
    instr = ubranch(BT_BC, 4'b1000, 24'h123);
    #1 checks++;
    if (ctl.is_branch !== 1'b1 || ctl.reg_we || ctl.mem_we || ctl.eu_start) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
