// host_if: the processor's interface to the outside, a simple 32-bit slave.
//
// Either the host or the processor owns the internal buses: while the
// processor runs, data memory and control store are not reachable from
// outside (such accesses are refused with `h_err`); while it is stopped,
// both are directly addressable. Access is single-cycle: h_sel with h_wr and
// h_addr; write data is taken at the clock edge, read data is combinational.
// Address map, h_addr[31:30]:
//   00  interface registers, index h_addr[3:0]
//   01  data memory, byte address h_addr[23:0], one 32-bit word per access
//   10  control store, microinstruction index h_addr[23:0]
// Registers:
//   0 CTRL    write: bit0 start at START, bit1 halt, bit2 execute INJECT once
//             read : bit0 running, bits [10:8] reason of the last stop
//   1 START   start micro-address      2 INJECT  microinstruction to inject
//   3 PERCTL  bit0 stop on store in [PERLO, PERHI], bit1 stop on writing
//             register PERREG          4 PERLO   5 PERHI   6 PERREG
//   7 UPC     read: micro-program counter
// Stop reasons: 1 HALT microinstruction, 2 host halt, 3 store in range,
// 4 register modified. The debug stops act like IBM program event recording:
// the microinstruction that hits the condition completes, then the processor
// stops. The word-level register map and the single-cycle bus are this
// design's choice; the FASTBUS protocol itself is outside this block.
// The memory and control-store address and write-data outputs are the host
// bus lines passed straight through (a word access puts the host word in the
// left half of the 64-bit bus, low address bits zero), so many output bits
// follow an input or are constant by design.
module host_if
  import e3081_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  // host side
  input  logic             h_sel,
  input  logic             h_wr,
  input  logic [31:0]      h_addr,
  input  logic [31:0]      h_wdata,
  output logic [31:0]      h_rdata,
  output logic             h_err,
  // processor control
  output logic             start,
  output logic [UPC_W-1:0] start_addr,
  output logic             stop,
  output logic             inject,
  output logic [31:0]      inject_instr,
  input  logic             running,
  input  logic [UPC_W-1:0] upc,
  input  logic             halt_event,
  // debug event inputs
  input  logic             store_event,
  input  addr_t            store_addr,
  input  logic             regw_event,
  input  logic [4:0]       regw_addr,
  input  logic             regw_dbl,
  // memory and control-store access while stopped
  output logic             mem_acc,
  output logic             mem_we,
  output addr_t            mem_addr,
  output word_t            mem_wdata,
  input  word_t            mem_rdata,
  output logic             cs_we,
  output logic [23:0]      cs_addr,
  output logic [31:0]      cs_wdata,
  input  logic [31:0]      cs_rdata
);
  logic [1:0]  per_ctl;
  addr_t       per_lo, per_hi;
  logic [4:0]  per_reg;
  logic [2:0]  reason;
  logic        halt_req;
  logic        st_hit, rg_hit;

  logic [1:0] space;
  logic       reg_wr;
  assign space  = h_addr[31:30];
  assign reg_wr = h_sel && h_wr && space == 2'b00;

  // bus ownership
  assign h_err     = h_sel && running && space != 2'b00;
  assign mem_acc   = h_sel && !running && space == 2'b01;
  assign mem_we    = mem_acc && h_wr;
  assign mem_addr  = {h_addr[23:2], 2'b00};
  assign mem_wdata = {h_wdata, 32'h0};
  assign cs_we     = h_sel && h_wr && !running && space == 2'b10;
  assign cs_addr   = h_addr[23:0];
  assign cs_wdata  = h_wdata;

  // debug stop conditions
  assign st_hit = per_ctl[0] && store_event && store_addr >= per_lo && store_addr <= per_hi;
  assign rg_hit = per_ctl[1] && regw_event && regw_addr[4:1] == per_reg[4:1]
                  && (regw_dbl || regw_addr[0] == per_reg[0]);
  assign stop   = running && (halt_req || st_hit || rg_hit);

  assign start  = reg_wr && h_addr[3:0] == 4'd0 && h_wdata[0] && !running;
  assign inject = reg_wr && h_addr[3:0] == 4'd0 && h_wdata[2] && !running;

  always_ff @(posedge clk) begin
    if (rst) begin
      per_ctl <= '0; per_lo <= '0; per_hi <= '0; per_reg <= '0; reason <= '0;
      start_addr <= '0; inject_instr <= '0; halt_req <= 1'b0;
    end else begin
      if (reg_wr) begin
        unique case (h_addr[3:0])
          4'd0: if (h_wdata[1] && running) halt_req <= 1'b1;
          4'd1: start_addr   <= h_wdata[UPC_W-1:0];
          4'd2: inject_instr <= h_wdata;
          4'd3: per_ctl      <= h_wdata[1:0];
          4'd4: per_lo       <= h_wdata[AW-1:0];
          4'd5: per_hi       <= h_wdata[AW-1:0];
          4'd6: per_reg      <= h_wdata[4:0];
          default: ;
        endcase
      end
      if (!running) halt_req <= 1'b0;
      if (halt_event)       reason <= 3'd1;
      else if (running && halt_req) reason <= 3'd2;
      else if (st_hit)      reason <= 3'd3;
      else if (rg_hit)      reason <= 3'd4;
    end
  end

  always_comb begin
    h_rdata = '0;
    unique case (space)
      2'b00: unique case (h_addr[3:0])
        4'd0: h_rdata = {21'h0, reason, 7'h0, running};
        4'd1: h_rdata = 32'(start_addr);
        4'd2: h_rdata = inject_instr;
        4'd3: h_rdata = {30'h0, per_ctl};
        4'd4: h_rdata = 32'(per_lo);
        4'd5: h_rdata = 32'(per_hi);
        4'd6: h_rdata = {27'h0, per_reg};
        4'd7: h_rdata = 32'(upc);
        default: ;
      endcase
      2'b01:   h_rdata = mem_rdata[63:32];
      2'b10:   h_rdata = cs_rdata;
      default: ;
    endcase
  end
endmodule
