// tb_top_3081e: end-to-end test of the whole processor at its full size
// (3.5 MByte data memory, 64K-word control store).
//
// The host loads data and microcode through the interface, starts the
// processor and reads the results back. Program A is the hand-scheduled
// translation of  XC = VIX*(XA-XZERO) + VIY*(YB-YZERO)  (load, two pipelined
// subtracts, two multiplies fed straight from the adder, an add fed from the
// multiplier and a store done together with the register write): it must
// deliver XC in memory in its 14th microinstruction. Program B covers the
// rest: a 64-bit register-pair load and store, an integer loop closed by a
// conditional branch on the condition code, a D(X,B) address in two cycles,
// load address, long divide and long multiply, a floating compare and
// branch, and an integer multiply into a register pair. Program C checks a
// debug stop on a store inside an address range; an injected
// microinstruction and a refused host access while running are also used.
// Program D adds LE 4,404(13) and AE 4,668(13) to program A: the ten IBM
// instructions must still finish in 14 microinstructions, with the AE
// completing (F4 written in microinstruction 13) before the earlier AER.
// Each mechanism is counted and a failure is counted for any that never
// happened. Expected values come from the reference model and plain
// integer arithmetic in the testbench.
module tb_top_3081e;
  import e3081_pkg::*;
  import tb_hfp_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic h_sel, h_wr, h_err, running;
  logic [31:0] h_addr, h_wdata, h_rdata;
  logic [1:0] cc;
  logic [2:0] fp_exc;
  int checks = 0, failures = 0, cycle = 0;

  top_3081e dut (.clk, .rst, .h_sel, .h_wr, .h_addr, .h_wdata, .h_rdata, .h_err,
                 .running, .cc, .fp_exc);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_addr_pipe, n_chain, n_fa_pipe, n_fm_pipe, n_st_reg, n_idx, n_br_taken, n_br_not;
  int n_pair, n_fd_busy, n_fml_busy, n_inject, n_refused, n_per, n_setcc;
  always @(posedge clk) if (!rst) begin
    if (dut.exec && dut.ctl.aop != AOP_NONE && dut.ctl.asrc == 2'd1) n_addr_pipe++;
    if (dut.exec && dut.ctl.eu_start && dut.ctl.bsrc[2]) n_chain++;
    if (dut.req[1].start && (dut.u_fa.v0 || dut.u_fa.v1)) n_fa_pipe++;
    if (dut.req[2].start && dut.u_fm.sv1) n_fm_pipe++;
    if (dut.exec && dut.ctl.reg_we && dut.ctl.mem_we) n_st_reg++;
    if (dut.exec && dut.ctl.aop == AOP_IDX) n_idx++;
    if (dut.branch_taken) n_br_taken++;
    if (dut.running && dut.instr[31:30] == 2'b11 && dut.instr[29:28] != 2'd3 && !dut.branch_taken) n_br_not++;
    if (dut.exec && dut.ctl.reg_we && dut.ctl.len == LEN64 && dut.r1a < 5'd16) n_pair++;
    if (dut.fd_busy) n_fd_busy++;
    if (dut.u_fm.mul_on) n_fml_busy++;
    if (dut.inject) n_inject++;
    if (h_err) n_refused++;
    if (dut.stop && !dut.u_if.halt_req) n_per++;
    if (dut.exec && dut.ctl.set_cc) n_setcc++;
  end

  // ---------------- host access ----------------
  task automatic hw(logic [31:0] a, logic [31:0] d);
    @(negedge clk); h_sel = 1; h_wr = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_sel = 0; h_wr = 0;
  endtask
  task automatic hr(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); h_sel = 1; h_wr = 0; h_addr = a; #1 d = h_rdata;
    @(negedge clk); h_sel = 0;
  endtask
  task automatic mem_w(int unsigned a, logic [31:0] d); hw(32'h4000_0000 | a, d); endtask
  task automatic mem_r(int unsigned a, output logic [31:0] d); hr(32'h4000_0000 | a, d); endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- microcode assembly ----------------
  logic [31:0] prog [$];
  function automatic int here(); return prog.size(); endfunction
  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction
  function automatic void nops(int n); repeat (n) emit(uinstr(mop_misc(AOP_NONE, M_NOP, 0), 0, 0, 0)); endfunction

  localparam logic [4:0] F0 = 5'd16, F2 = 5'd18, F4 = 5'd20, F6 = 5'd22;
  localparam int unsigned R13V = 32'h1000, R10V = 32'h2000;

  task automatic load_and_run(int unsigned entry, int max_cycles, output int ran);
    for (int i = 0; i < prog.size(); i++) hw(32'h8000_0000 | i, prog[i]);
    hw(32'd1, entry);
    @(negedge clk); h_sel = 1; h_wr = 1; h_addr = 0; h_wdata = 32'd1;
    @(negedge clk); h_sel = 0; h_wr = 0;
    ran = 1;
    while (running && ran < max_cycles) begin @(negedge clk); ran++; end
  endtask

  int unsigned xc_cycle, start_cycle;
  always @(posedge clk)
    if (dut.running && dut.ctl.mem_we && dut.mar == 24'(R13V + 144) && xc_cycle == 0)
      xc_cycle = cycle - start_cycle + 1;
  always @(posedge clk) if (dut.u_seq.start && !dut.running) start_cycle = cycle + 1;
  int unsigned f4_cycle;
  always @(posedge clk)
    if (dut.running && dut.ctl.reg_we && dut.r1a == F4 && dut.ctl.bsrc == 3'd5 && f4_cycle == 0)
      f4_cycle = cycle - start_cycle + 1;

  initial begin
    logic [63:0] xa, xz, yb, yz, vix, viy, d1, d2, m1, m2, xcv;
    logic [63:0] dv1, dv2, q, lm1, lm2, lp, f4v, f4m, f4s;
    logic [31:0] d, ia, ib, ix;
    bit o; int sg, ran, p_b, p_loop, p_c, p_cmp;
    h_sel = 0; h_wr = 0; h_addr = 0; h_wdata = 0;
    xc_cycle = 0; start_cycle = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // ---- data ----
    xa = rnd(0, 62, 66); xz = rnd(0, 62, 66); yb = rnd(0, 62, 66); yz = rnd(0, 62, 66);
    vix = rnd(0, 62, 66); viy = rnd(0, 62, 66);
    if (xa == 0) xa = 64'h4130_0000_0000_0000;
    if (yb == 0) yb = 64'h4170_0000_0000_0000;
    mem_w(0, R13V); mem_w(8, R10V);
    mem_w(R13V + 316, xa[63:32]); mem_w(R13V + 688, xz[63:32]);
    mem_w(R13V + 320, yb[63:32]); mem_w(R13V + 692, yz[63:32]);
    mem_w(R10V + 1672, vix[63:32]); mem_w(R10V + 1676, viy[63:32]);
    d1  = add(xa, xz, 0, 1, o, sg);
    d2  = add(yb, yz, 0, 1, o, sg);
    m1  = mul(d1, vix, 0, o);
    m2  = mul(d2, viy, 0, o);
    xcv = add({m2[63:32], 32'h0}, {m1[63:32], 32'h0}, 0, 0, o, sg);

    // ---- program A ----
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 0, 12'd0));            // 0(0)->MAR
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), 13, 0, 12'd8));      // 8(0)->MAR (M)->R13
    emit(uinstr(mop_misc(AOP_NONE, M_LOAD, LEN32), 10, 0, 12'd0));    // (M)->R10
    // the 14-microinstruction sequence of IBM instructions LE SE ME LE SE ME AER STE
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 13, 12'd316));                     // 1
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), F0, 13, 12'd688));               // 2
    emit(uinstr(mop_start(AOP_DB, F_ST_MR, euf_fa(0, FA_SUB)), F0, 13, 12'd320));  // 3
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), F2, 13, 12'd692));               // 4
    emit(uinstr(mop_start(AOP_DB, F_ST_MR, euf_fa(0, FA_SUB)), F2, 10, 12'd1672)); // 5
    emit(uinstr(mop_start(AOP_NONE, F_CH_M, euf_fm(0)), 5'(U_FA), 0, 0));         // 6
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 10, 12'd1676));                    // 7
    emit(uinstr(mop_start(AOP_NONE, F_CH_M, euf_fm(0)), 5'(U_FA), 0, 0));         // 8
    emit(uinstr(mop_res(AOP_NONE, F_RES_R, 0, LEN64, U_FM), F0, 0, 0));           // 9
    nops(1);                                                                       // 10
    emit(uinstr(mop_start(AOP_NONE, F_CH_R, euf_fa(0, FA_ADD)), 5'(U_FM), F0, 0)); // 11
    nops(1);                                                                       // 12
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 13, 12'd144));                     // 13
    emit(uinstr(mop_res(AOP_NONE, F_RES_RM, 1, LEN32, U_FA), F2, 0, 0));          // 14
    emit(ubranch(BT_HALT, 0, 0));
    load_and_run(0, 100, ran);
    mem_r(R13V + 144, d);
    check(d == xcv[63:32], $sformatf("XC %h want %h", d, xcv[63:32]));
    check(xc_cycle == 14 + 3, $sformatf("XC stored in microinstruction %0d of the sequence, want 14", int'(xc_cycle) - 3));
    check(dut.u_rf.mem[8] == m1, "F0 = VIX*(XA-XZERO)");
    check(cc == ((xcv[62:0] == 0) ? 2'd0 : xcv[63] ? 2'd1 : 2'd2), "CC of AER");

    // ---- program B ----
    ia = $urandom_range(1, 1000); ib = $urandom; ix = 32'd24;
    dv1 = rnd(1, 60, 68); dv2 = rnd(1, 60, 68);
    if (dv1 == 0) dv1 = 64'h4210_0000_0000_0001;
    if (dv2 == 0) dv2 = 64'h4130_0000_0000_0000;
    lm1 = rnd(1, 60, 68); lm2 = rnd(1, 60, 68);
    q  = div(dv1, dv2, 1, o);
    lp = mul(lm1, lm2, 1, o);
    mem_w(R13V + 16, ia); mem_w(R13V + 20, ib);   // pair R2/R3
    mem_w(R13V + 24, 32'd5);                      // loop count -> R4
    mem_w(R13V + 28, 32'd1);                      // one -> R7
    mem_w(R13V + 64 + 24, 32'h0BAD_F00D);         // 64(24 + R13) via index
    mem_w(R13V + 200, dv1[63:32]); mem_w(R13V + 204, dv1[31:0]);
    mem_w(R13V + 208, dv2[63:32]); mem_w(R13V + 212, dv2[31:0]);
    mem_w(R13V + 216, lm1[63:32]); mem_w(R13V + 220, lm1[31:0]);
    mem_w(R13V + 224, lm2[63:32]); mem_w(R13V + 228, lm2[31:0]);
    prog.delete();
    p_b = here();
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 13, 12'd16));
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN64), 2, 13, 12'd24));   // LM 2,3 in one cycle
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), 4, 13, 12'd28));   // R4 = count
    emit(uinstr(mop_misc(AOP_NONE, M_LOAD, LEN32), 7, 0, 0));       // R7 = 1
    emit(uinstr(mop_start(AOP_NONE, F_ST_RR, euf_int(I_XOR)), 6, 6, 0));
    emit(uinstr(mop_res(AOP_NONE, F_RES_R, 0, LEN32, U_INT), 6, 0, 0));  // R6 = 0
    p_loop = here();
    emit(uinstr(mop_start(AOP_NONE, F_ST_RR, euf_int(I_ADD)), 6, 2, 0));  // R6 + R2
    emit(uinstr(mop_res(AOP_NONE, F_RES_R, 0, LEN32, U_INT), 6, 0, 0));
    emit(uinstr(mop_start(AOP_NONE, F_ST_RR, euf_int(I_SUB)), 4, 7, 0));  // R4 - 1
    emit(uinstr(mop_res(AOP_NONE, F_RES_R, 1, LEN32, U_INT), 4, 0, 0));
    emit(ubranch(BT_BC, 4'b0010, 24'(p_loop)));                          // BH loop
    // STM 2,3 -> 240(13), 64-bit in one cycle
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 13, 12'd240));
    emit(uinstr(mop_misc(AOP_NONE, M_STORE, LEN64), 2, 0, 0));
    // L 8,64(9,13) with R9 = 24 taken from memory: LA, index
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 0, 12'(ix)));
    emit(uinstr(mop_misc(AOP_NONE, M_MAR, LEN32), 9, 0, 0));            // R9 = 24 (LA 9,24)
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 13, 12'd64));             // 64(13)->MAR
    emit(uinstr(mop_misc(AOP_IDX, M_NOP, 0), 0, 9, 0));                  // MAR(9)->MAR
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), 8, 13, 12'd200));       // (M)->R8, 200(13)->MAR
    // LD 4,200(13); DD 4,208(13); STD 4,232(13)
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN64), F4, 13, 12'd208));
    emit(uinstr(mop_start(AOP_DB, F_ST_MR, euf_fd(1)), F4, 13, 12'd216));
    // meanwhile: LD 6,216(13); MD 6,224(13)
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN64), F6, 13, 12'd224));
    emit(uinstr(mop_start(AOP_DB, F_ST_MR, euf_fm(1)), F6, 13, 12'd248));
    nops(8);
    emit(uinstr(mop_res(AOP_DB, F_RES_RM, 0, LEN64, U_FM), F6, 13, 12'd232)); // MR->F6,(M) at 248
    nops(20);
    emit(uinstr(mop_res(AOP_NONE, F_RES_RM, 0, LEN64, U_FD), F4, 0, 0));      // DR->F4,(M) at 232
    // CD 4,6 ; BL skip   (compare quotient with product)
    emit(uinstr(mop_start(AOP_NONE, F_ST_RR, euf_fa(1, FA_CMP)), F4, F6, 0));
    nops(2);
    emit(uinstr(mop_misc(AOP_NONE, M_SETCC, 2'(U_FA)), 0, 0, 0));
    p_cmp = here();
    emit(ubranch(BT_BC, 4'b0100, 24'(p_cmp + 3)));                   // low -> skip
    emit(uinstr(mop_misc(AOP_NONE, M_MOVE, LEN32), 11, 2, 0));       // R11 = R2 (not low)
    emit(ubranch(BT_BC, 4'b1111, 24'(p_cmp + 4)));
    emit(uinstr(mop_misc(AOP_NONE, M_MOVE, LEN32), 11, 3, 0));       // R11 = R3 (low)
    // MR 2 style: R6 * R3 -> pair in word 12/13 temporary (R24/R25)
    emit(uinstr(mop_start(AOP_NONE, F_ST_RR, euf_int(I_MUL)), 6, 3, 0));
    emit(uinstr(mop_res(AOP_NONE, F_RES_R, 0, LEN64, U_INT), 24, 0, 0));
    emit(ubranch(BT_HALT, 0, 0));
    load_and_run(p_b, 400, ran);
    check(dut.u_rf.mem[3][63:32] === 32'(ia * 5), "integer loop R6 = 5*R2");
    check(dut.u_rf.mem[2][63:32] === 32'd0, "loop counter R4 = 0");
    mem_r(R13V + 240, d); check(d == ia, "STM first word");
    mem_r(R13V + 244, d); check(d == ib, "STM second word");
    check(dut.u_rf.mem[4][63:32] === 32'h0BAD_F00D, "indexed load R8");
    check(dut.u_rf.mem[4][31:0] === 32'd24, "load address R9");
    mem_r(R13V + 232, d); check(d == q[63:32], "DD high");
    mem_r(R13V + 236, d); check(d == q[31:0], "DD low");
    mem_r(R13V + 248, d); check(d == lp[63:32], "MD high");
    mem_r(R13V + 252, d); check(d == lp[31:0], "MD low");
    add(q, lp, 1, 1, o, sg);
    check(dut.u_rf.mem[5][31:0] === ((sg < 0) ? ib : ia), "compare and branch");
    check(dut.u_rf.mem[12] === 64'($signed(ia * 5) * $signed(ib)), "integer multiply to a pair");

    // ---- program C: debug stop on a store in range, refused host access ----
    prog.delete();
    p_c = here();
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 13, 12'd400));
    emit(uinstr(mop_misc(AOP_DB, M_STORE, LEN32), 2, 13, 12'd404)); // store to 400: outside
    emit(uinstr(mop_misc(AOP_NONE, M_STORE, LEN32), 2, 0, 0));      // store to 404: inside
    emit(uinstr(mop_misc(AOP_NONE, M_LOAD, LEN32), 12, 0, 0));      // must not run
    emit(ubranch(BT_HALT, 0, 0));
    hw(32'd4, R13V + 404); hw(32'd5, R13V + 407); hw(32'd3, 32'd1);
    for (int i = 0; i < prog.size(); i++) hw(32'h8000_0000 | (100 + i), prog[i]);
    hw(32'd1, 100);
    hw(32'd0, 32'd1);
    @(negedge clk); h_sel = 1; h_wr = 0; h_addr = 32'h4000_0000;  // host try while running
    @(negedge clk); h_sel = 0;
    repeat (10) @(negedge clk);
    hr(32'd0, d); check(d[0] == 0 && d[10:8] == 3'd3, "stopped by store in range");
    hr(32'd7, d); check(d == 32'd103, "stopped after the store");
    // inject: (M)->R12 from MAR = 404, then store R12 to 404 from a second injection
    hw(32'd2, uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), 12, 0, 12'd0));  // (M)->R12, 0(0)->MAR
    hw(32'd0, 32'd4);
    hw(32'd2, uinstr(mop_misc(AOP_NONE, M_STORE, LEN32), 12, 0, 0));   // R12 -> (0)
    hw(32'd0, 32'd4);
    mem_r(0, d); check(d == ia, "injected load/store");

    // ---- program D: program A plus LE 4,404(13) and AE 4,668(13) ----
    // The ten IBM instructions still take 14 microinstructions; the AE is
    // started before the AER and finishes first (out-of-order completion).
    hw(32'd3, 32'd0); mem_w(0, R13V);   // program C overwrote the pointer at 0
    f4v = rnd(0, 62, 66); f4m = rnd(0, 62, 66);
    if (f4v == 0) f4v = 64'h4220_0000_0000_0000;
    mem_w(R13V + 404, f4v[63:32]); mem_w(R13V + 668, f4m[63:32]);
    mem_w(R13V + 144, 32'h0);
    f4s = add(f4v, f4m, 0, 0, o, sg);
    prog.delete();
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 0, 12'd0));
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), 13, 0, 12'd8));
    emit(uinstr(mop_misc(AOP_NONE, M_LOAD, LEN32), 10, 0, 12'd0));
    emit(uinstr(mop_misc(AOP_DB, M_NOP, 0), 0, 13, 12'd316));                     // 1
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), F0, 13, 12'd688));               // 2
    emit(uinstr(mop_start(AOP_DB, F_ST_MR, euf_fa(0, FA_SUB)), F0, 13, 12'd320));  // 3
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), F2, 13, 12'd692));               // 4
    emit(uinstr(mop_start(AOP_DB, F_ST_MR, euf_fa(0, FA_SUB)), F2, 10, 12'd1672)); // 5
    emit(uinstr(mop_start(AOP_DB, F_CH_M, euf_fm(0)), 5'(U_FA), 13, 12'd404));    // 6
    emit(uinstr(mop_misc(AOP_DB, M_LOAD, LEN32), F4, 10, 12'd1676));              // 7
    emit(uinstr(mop_start(AOP_NONE, F_CH_M, euf_fm(0)), 5'(U_FA), 0, 0));         // 8
    emit(uinstr(mop_res(AOP_DB, F_RES_R, 0, LEN64, U_FM), F0, 13, 12'd668));      // 9
    emit(uinstr(mop_start(AOP_NONE, F_ST_MR, euf_fa(0, FA_ADD)), F4, 0, 0));      // 10
    emit(uinstr(mop_start(AOP_NONE, F_CH_R, euf_fa(0, FA_ADD)), 5'(U_FM), F0, 0)); // 11
    nops(1);                                                                       // 12
    emit(uinstr(mop_res(AOP_DB, F_RES_R, 0, LEN32, U_FA), F4, 13, 12'd144));      // 13
    emit(uinstr(mop_res(AOP_NONE, F_RES_RM, 1, LEN32, U_FA), F2, 0, 0));          // 14
    emit(ubranch(BT_HALT, 0, 0));
    xc_cycle = 0; f4_cycle = 0;
    load_and_run(0, 100, ran);
    mem_r(R13V + 144, d);
    check(d == xcv[63:32], $sformatf("D: XC %h want %h", d, xcv[63:32]));
    check(xc_cycle == 14 + 3, $sformatf("D: XC stored in microinstruction %0d, want 14", int'(xc_cycle) - 3));
    check(dut.u_rf.mem[10][63:32] == f4s[63:32], $sformatf("D: F4 %h want %h",
          dut.u_rf.mem[10][63:32], f4s[63:32]));
    check(f4_cycle == 13 + 3, $sformatf("D: F4 written in microinstruction %0d, want 13", int'(f4_cycle) - 3));

    // ---- mechanisms ----
    $display("address pipeline %0d, EU chaining %0d, add pipelining %0d, mul pipelining %0d",
             n_addr_pipe, n_chain, n_fa_pipe, n_fm_pipe);
    $display("result to register and memory %0d, index address %0d, branches taken %0d / not %0d",
             n_st_reg, n_idx, n_br_taken, n_br_not);
    $display("64-bit pair transfers %0d, divide busy %0d, long multiply cycles %0d",
             n_pair, n_fd_busy, n_fml_busy);
    $display("injected %0d, refused host accesses %0d, debug stops %0d, CC settings %0d",
             n_inject, n_refused, n_per, n_setcc);
    check(n_addr_pipe > 0, "address pipelining happened");
    check(n_chain > 0, "instruction overlapping happened");
    check(n_fa_pipe > 0, "add pipelining happened");
    check(n_fm_pipe > 0, "multiply pipelining happened");
    check(n_st_reg > 0, "store with register write happened");
    check(n_idx > 0, "two-cycle index address happened");
    check(n_br_taken > 0 && n_br_not > 0, "branches taken and not taken");
    check(n_pair > 0, "64-bit register pair transfer happened");
    check(n_fd_busy > 0 && n_fml_busy > 0, "iterative units ran");
    check(n_inject > 0 && n_refused > 0 && n_per > 0 && n_setcc > 0, "interface mechanisms happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
