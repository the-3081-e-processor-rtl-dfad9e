// mop_decoder: decode of the 10-bit micro-operation code (MOP) into the
// control signals of the buses, the register file, the memory and the
// execution units; the equivalent of the decode PROMs on each board.
//
// Purely combinational. MOP layout (this design's own encoding):
//   [9:8] address operation: 00 none, 01 D(R2)->MAR, 10 MAR+R2->MAR
//   [7:5] form (form_e), [4:0] form-specific:
//     F_MISC   : [4:2] misc_e, [1:0] length (or the unit, for M_SETCC)
//     F_ST_*   : EU select/function: 0ffff integer function ffff,
//     F_CH_*     10dff float add (d = long, ff = fafunc_e), 110-d float
//                multiply, 111-d float divide. The chained forms take their
//                first operand from the result of the unit in R1[1:0].
//     F_RES_*  : [4] set CC, [3:2] length, [1:0] unit whose result drives BBUS
// Register-file port A serves either the ABUS or the address adder, never
// both: `port_conflict` flags a microinstruction that asks for both.
module mop_decoder
  import e3081_pkg::*;
(
  input  logic [31:0] instr,
  output ctl_t        ctl,
  output logic        port_conflict
);
  logic [9:0] mop;
  form_e      form;
  logic [4:0] lo;
  unit_e      src;

  always_comb begin
    mop  = instr[31:22];
    form = form_e'(mop[7:5]);
    lo   = mop[4:0];
    src  = unit_e'(instr[17:16]);           // R1[1:0] for chained forms
    ctl  = '0;
    if (mop[9:8] == 2'b11) begin
      ctl.is_branch = 1'b1;
    end else begin
      ctl.aop = aop_e'(mop[9:8]);
      unique case (form)
        F_MISC: begin
          ctl.len = len_e'(lo[1:0]);
          unique case (misc_e'(lo[4:2]))
            M_LOAD:  begin ctl.asrc = 2'd1; ctl.reg_we = 1'b1; ctl.reg_from_a = 1'b1; end
            M_MOVE:  begin ctl.asrc = 2'd2; ctl.reg_we = 1'b1; ctl.reg_from_a = 1'b1; end
            M_STORE: begin ctl.bsrc = 3'd1; ctl.mem_we = 1'b1; end
            M_MAR:   begin
              ctl.asrc = 2'd3; ctl.reg_we = 1'b1; ctl.reg_from_a = 1'b1; ctl.len = LEN32;
            end
            M_SETCC: begin ctl.set_cc = 1'b1; ctl.cc_unit = unit_e'(lo[1:0]); end
            default: ;
          endcase
        end
        F_ST_MR, F_ST_RR, F_CH_M, F_CH_R: begin
          ctl.asrc     = (form == F_ST_MR || form == F_CH_M) ? 2'd1 : 2'd2;
          ctl.bsrc     = (form == F_ST_MR || form == F_ST_RR) ? 3'd1 : {1'b1, src};
          ctl.eu_start = 1'b1;
          if (!lo[4]) begin
            ctl.eu_unit = U_INT; ctl.eu_func = lo[3:0]; ctl.eu_dbl = 1'b0;
          end else if (!lo[3]) begin
            ctl.eu_unit = U_FA; ctl.eu_func = {2'b00, lo[1:0]}; ctl.eu_dbl = lo[2];
          end else begin
            ctl.eu_unit = lo[2] ? U_FD : U_FM; ctl.eu_dbl = lo[0];
          end
          ctl.len = ctl.eu_dbl ? LEN64 : LEN32;
        end
        default: begin  // F_RES_R, F_RES_M, F_RES_RM
          ctl.bsrc    = {1'b1, lo[1:0]};
          ctl.len     = len_e'(lo[3:2]);
          ctl.set_cc  = lo[4];
          ctl.cc_unit = unit_e'(lo[1:0]);
          ctl.reg_we  = (form != F_RES_M);
          ctl.mem_we  = (form != F_RES_R);
        end
      endcase
    end
    port_conflict = (ctl.aop != AOP_NONE) && (ctl.asrc == 2'd2);
  end
endmodule
