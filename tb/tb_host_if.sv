// tb_host_if: self-checking test of the host interface on its own. The
// processor side is a small stand-in: a running flag set by `start` and
// cleared by `stop`. Checks register read-back, start and inject strobes,
// memory and control-store access while stopped and their refusal while
// running, the host halt, and the two debug stops (store within an address
// range, modification of a chosen register) with their stop reasons.
module tb_host_if;
  import e3081_pkg::*;

  logic clk = 0, rst = 1;
  logic h_sel, h_wr, h_err;
  logic [31:0] h_addr, h_wdata, h_rdata;
  logic start, stop, inject, running, halt_event;
  logic [23:0] start_addr, upc;
  logic [31:0] inject_instr, cs_rdata, cs_wdata;
  logic store_event, regw_event, regw_dbl;
  addr_t store_addr, mem_addr;
  logic [4:0] regw_addr;
  logic mem_acc, mem_we, cs_we;
  word_t mem_wdata, mem_rdata;
  logic [23:0] cs_addr;
  int checks = 0, failures = 0;

  host_if dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) running <= 0;
    else if (start) running <= 1;
    else if (stop || halt_event) running <= 0;
  end
  assign upc = 24'h00ABCD;
  assign mem_rdata = {32'hCAFE_F00D, 32'h0};
  assign cs_rdata = 32'h1234_5678;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [31:0] a, logic [31:0] d);
    @(negedge clk); h_sel = 1; h_wr = 1; h_addr = a; h_wdata = d;
    @(negedge clk); h_sel = 0; h_wr = 0;
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); h_sel = 1; h_wr = 0; h_addr = a; #1 d = h_rdata;
    @(negedge clk); h_sel = 0;
  endtask

  initial begin
    logic [31:0] d;
    h_sel = 0; h_wr = 0; h_addr = 0; h_wdata = 0; halt_event = 0;
    store_event = 0; store_addr = 0; regw_event = 0; regw_addr = 0; regw_dbl = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    wr(32'd1, 32'h0000_0100);  rd(32'd1, d); check(d == 32'h100, "START");
    wr(32'd4, 32'h0000_2000);  wr(32'd5, 32'h0000_20FF);
    wr(32'd6, 32'd5);          wr(32'd3, 32'd3);
    rd(32'd5, d); check(d == 32'h20FF, "PERHI");
    rd(32'd7, d); check(d == 32'hABCD, "UPC");
    // memory and control store while stopped
    @(negedge clk); h_sel = 1; h_wr = 1; h_addr = 32'h4000_1234; h_wdata = 32'h5555_AAAA;
    #1 check(mem_acc && mem_we && mem_addr == 24'h001234 && mem_wdata[63:32] == 32'h5555_AAAA && !h_err, "mem write");
    @(negedge clk); h_wr = 0; h_addr = 32'h4000_0010;
    #1 check(h_rdata == 32'hCAFE_F00D && !mem_we, "mem read");
    @(negedge clk); h_wr = 1; h_addr = 32'h8000_0042; h_wdata = 32'hC300_0000;
    #1 check(cs_we && cs_addr == 24'h42, "cs write");
    @(negedge clk); h_sel = 0; h_wr = 0;
    // inject
    wr(32'd2, 32'h0123_4567);
    @(negedge clk); h_sel = 1; h_wr = 1; h_addr = 0; h_wdata = 32'd4;
    #1 check(inject && inject_instr == 32'h0123_4567 && !start, "inject");
    @(negedge clk); h_sel = 0;
    // start, then memory refused
    @(negedge clk); h_sel = 1; h_wr = 1; h_addr = 0; h_wdata = 32'd1;
    #1 check(start && start_addr == 24'h100, "start");
    @(negedge clk); h_sel = 1; h_wr = 1; h_addr = 32'h4000_0000;
    #1 check(h_err && !mem_acc && !mem_we, "refused while running");
    @(negedge clk); h_sel = 0; h_wr = 0;
    // store outside range: no stop; inside: stop, reason 3
    store_event = 1; store_addr = 24'h1FFF;
    #1 check(!stop, "store outside");
    store_addr = 24'h2010;
    #1 check(stop, "store inside");
    @(negedge clk); store_event = 0;
    check(!running, "stopped on store");
    rd(32'd0, d); check(d[10:8] == 3'd3, "reason 3");
    // register modification: R5 is word 2 low half; 64-bit write to word 2 hits
    wr(32'd0, 32'd1);
    regw_event = 1; regw_addr = 5'd4; regw_dbl = 0;
    #1 check(!stop, "other half");
    regw_dbl = 1;
    #1 check(stop, "pair write");
    @(negedge clk); regw_event = 0;
    rd(32'd0, d); check(d[10:8] == 3'd4 && d[0] == 0, "reason 4");
    // host halt
    wr(32'd0, 32'd1);
    wr(32'd0, 32'd2);
    @(negedge clk);
    rd(32'd0, d); check(d[10:8] == 3'd2 && d[0] == 0, "host halt");
    // HALT microinstruction
    wr(32'd0, 32'd1);
    @(negedge clk); halt_event = 1;
    @(negedge clk); halt_event = 0;
    rd(32'd0, d); check(d[10:8] == 3'd1 && d[0] == 0, "halt instr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
