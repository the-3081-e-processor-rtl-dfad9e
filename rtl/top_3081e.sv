// top_3081e: the 3081/E emulating processor.
//
// Four execution units (integer, floating add/subtract, floating multiply,
// floating divide) hang on two 64-bit buses, ABUS and BBUS, together with
// the control and register unit (micro-sequencer, MOP decode, memory address
// logic, register file), the data memory and the host interface.
// Each cycle one 32-bit microinstruction executes. It can at the same time
// compute a memory address into MAR (for use by a later microinstruction),
// put an operand on each bus, write a register, store to memory, start an
// execution unit and set the condition code:
//   ABUS: memory read at MAR, register port A (R2) or MAR itself
//   BBUS: register port B (R1) or the result register of one unit
//   an execution unit is started by loading op1 from BBUS and op2 from ABUS
//   a register (R1, port B) is written from ABUS or BBUS
//   memory at MAR is written from BBUS
// The processor has no interlocks: the microcode (produced by a translator
// from IBM object code) reads a unit's result only after enough cycles.
// Simulation assertions flag microinstructions that break these rules.
// While the processor is stopped the host owns the buses: it can read and
// write data memory and control store and inject single microinstructions.
module top_3081e
  import e3081_pkg::*;
#(
  parameter int unsigned MEM_BOARDS  = 14,
  parameter int unsigned BOARD_WORDS = 32768,
  parameter int unsigned CS_WORDS    = 65536
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        h_sel,
  input  logic        h_wr,
  input  logic [31:0] h_addr,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata,
  output logic        h_err,
  output logic        running,
  output logic [1:0]  cc,
  output logic [2:0]  fp_exc     // exception flags: [0] add, [1] multiply, [2] divide
);
  localparam int unsigned CSA = $clog2(CS_WORDS);

  // ---------------- sequencing ----------------
  logic [UPC_W-1:0] upc, start_addr;
  logic [31:0]      cs_rdata, inject_instr, instr;
  logic             start, stop, inject, exec, halted_by_instr, branch_taken;
  logic             cs_we;
  logic [23:0]      cs_addr;
  logic [31:0]      cs_wdata;

  control_store #(.WORDS(CS_WORDS)) u_cs (
    .clk,
    .raddr(running ? upc[CSA-1:0] : cs_addr[CSA-1:0]),
    .rdata(cs_rdata),
    .we   (cs_we),
    .waddr(cs_addr[CSA-1:0]),
    .wdata(cs_wdata)
  );

  assign instr = running ? cs_rdata : inject_instr;
  assign exec  = running || inject;

  sequencer u_seq (
    .clk, .rst, .start, .start_addr, .stop, .instr, .cc,
    .upc, .running, .halted_by_instr, .branch_taken
  );

  ctl_t ctl_raw, ctl;
  logic port_conflict;
  mop_decoder u_dec (.instr, .ctl(ctl_raw), .port_conflict);
  always_comb begin
    ctl = ctl_raw;
    if (!exec) ctl = '0;
  end

  logic [4:0]  r1a, r2a;
  logic [11:0] disp;
  assign r1a  = {instr[21], instr[19:16]};
  assign r2a  = {instr[20], instr[15:12]};
  assign disp = instr[11:0];

  // ---------------- register file and address logic ----------------
  word_t rf_a, rf_b, abus, bbus;
  addr_t mar;
  logic  dbl;
  assign dbl = (ctl.len == LEN64);

  regfile u_rf (
    .clk,
    .a_addr(r2a), .a_dbl(dbl && ctl.asrc == 2'd2), .a_data(rf_a),
    .b_addr(r1a), .b_dbl(dbl), .b_data(rf_b),
    .we    (ctl.reg_we),
    .w_data(ctl.reg_from_a ? abus : bbus)
  );

  addr_unit u_au (
    .clk, .rst, .en(exec), .aop(ctl.aop), .disp,
    .reg_is_zero(r2a == 5'd0), .reg_data(rf_a), .mar
  );

  // ---------------- data memory ----------------
  logic  hm_acc, hm_we;
  addr_t hm_addr;
  word_t hm_wdata, mem_rdata;

  data_memory #(.BOARDS(MEM_BOARDS), .BOARD_WORDS(BOARD_WORDS)) u_mem (
    .clk,
    .addr (running ? mar : (hm_acc ? hm_addr : mar)),
    .len  (running ? ctl.len : (hm_acc ? LEN32 : ctl.len)),
    .we   (ctl.mem_we || hm_we),
    .wdata(hm_we ? hm_wdata : bbus),
    .rdata(mem_rdata)
  );

  // ---------------- execution units ----------------
  eu_req_t req [4];
  word_t   res [4];
  logic [1:0] cc_int, cc_fa;
  logic    fm_busy, fd_busy;

  for (genvar u = 0; u < 4; u++) begin : g_req
    assign req[u] = '{start: ctl.eu_start && ctl.eu_unit == unit_e'(u),
                      func: ctl.eu_func, dbl: ctl.eu_dbl, op1: bbus, op2: abus};
  end

  int_unit u_int (.clk, .rst, .req(req[0]), .result(res[0]), .cc(cc_int));
  fp_add   u_fa  (.clk, .rst, .req(req[1]), .result(res[1]), .cc(cc_fa), .exc(fp_exc[0]));
  fp_mul   u_fm  (.clk, .rst, .req(req[2]), .result(res[2]), .exc(fp_exc[1]), .busy(fm_busy));
  fp_div   u_fd  (.clk, .rst, .req(req[3]), .result(res[3]), .exc(fp_exc[2]), .busy(fd_busy));

  // ---------------- buses ----------------
  always_comb begin
    unique case (ctl.asrc)
      2'd1:    abus = mem_rdata;
      2'd2:    abus = rf_a;
      2'd3:    abus = {8'h00, mar, 32'h0};
      default: abus = '0;
    endcase
    if (ctl.bsrc[2])        bbus = res[ctl.bsrc[1:0]];
    else if (ctl.bsrc == 3'd1) bbus = rf_b;
    else                    bbus = '0;
  end

  // ---------------- condition code ----------------
  function automatic logic [1:0] cc_of(word_t r);
    if (r[62:0] == '0) return 2'd0;
    return r[63] ? 2'd1 : 2'd2;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) cc <= 2'd0;
    else if (ctl.set_cc) begin
      unique case (ctl.cc_unit)
        U_INT:   cc <= cc_int;
        U_FA:    cc <= cc_fa;
        default: cc <= cc_of(res[ctl.cc_unit]);
      endcase
    end
  end

  // ---------------- host interface ----------------
  logic [31:0] h_rdata_i;
  host_if u_if (
    .clk, .rst,
    .h_sel, .h_wr, .h_addr, .h_wdata, .h_rdata(h_rdata_i), .h_err,
    .start, .start_addr, .stop, .inject, .inject_instr,
    .running, .upc, .halt_event(halted_by_instr),
    .store_event(running && ctl.mem_we), .store_addr(mar),
    .regw_event (running && ctl.reg_we), .regw_addr(r1a), .regw_dbl(dbl),
    .mem_acc(hm_acc), .mem_we(hm_we), .mem_addr(hm_addr), .mem_wdata(hm_wdata),
    .mem_rdata, .cs_we, .cs_addr, .cs_wdata, .cs_rdata
  );
  assign h_rdata = h_rdata_i;

  // ---------------- microcode rules (simulation checks) ----------------
  a_port: assert property (@(posedge clk) disable iff (rst) exec |-> !port_conflict)
    else $error("register port A used for both ABUS and address");
  a_fm: assert property (@(posedge clk) disable iff (rst)
                         exec && ctl.bsrc == 3'd6 |-> !fm_busy)
    else $error("multiply result read while busy");
  a_fd: assert property (@(posedge clk) disable iff (rst)
                         exec && ctl.bsrc == 3'd7 |-> !fd_busy)
    else $error("divide result read while busy");

  logic unused;
  assign unused = branch_taken;
endmodule
