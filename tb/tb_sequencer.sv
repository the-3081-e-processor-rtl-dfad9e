// tb_sequencer: self-checking test of the micro-sequencer. A cycle-level
// model runs the same random stream of microinstructions (register
// transfers and branches of every type, random masks and condition codes)
// and the micro-program counter, running flag and pulses are compared every
// cycle. Start, host stop and HALT are exercised.
module tb_sequencer;
  import e3081_pkg::*;

  logic clk = 0, rst = 1, start, stop;
  logic [23:0] start_addr, upc;
  logic [31:0] instr;
  logic [1:0] cc;
  logic running, halted_by_instr, branch_taken;
  int checks = 0, failures = 0, n_taken = 0, n_halt = 0, n_ret = 0;

  sequencer dut (.clk, .rst, .start, .start_addr, .stop, .instr, .cc, .upc, .running,
                 .halted_by_instr, .branch_taken);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] m_upc, m_link;
  bit m_run;

  initial begin
    start = 0; stop = 0; start_addr = 0; instr = 0; cc = 0;
    m_upc = 0; m_link = 0; m_run = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 5000; i++) begin
      bit isbr, cond, tk;
      logic [1:0] tt;
      @(negedge clk);
      checks++;
      if (upc !== m_upc || running !== m_run) begin
        failures++;
        if (failures < 10) $display("cycle %0d: upc %h/%h run %0b/%0b", i, upc, m_upc, running, m_run);
      end
      start = !m_run && $urandom_range(0, 3) == 0;
      start_addr = 24'($urandom);
      stop = m_run && $urandom_range(0, 60) == 0;
      cc = 2'($urandom);
      isbr = $urandom_range(0, 2) == 0;
      tt = ($urandom_range(0, 30) == 0) ? 2'd3 : 2'($urandom_range(0, 2));
      instr = isbr ? {2'b11, tt, 4'($urandom), 24'($urandom)} : {2'b00, 30'($urandom)};
      cond = instr[27 - cc];
      tk = m_run && isbr && tt != 2'd3 && cond;
      #1;
      checks++;
      if (branch_taken !== tk || halted_by_instr !== (m_run && isbr && tt == 2'd3)) failures++;
      if (tk) n_taken++;
      if (tk && tt == 2'd2) n_ret++;
      if (m_run && isbr && tt == 2'd3) n_halt++;
      // model
      if (start && !m_run) begin m_upc = start_addr; m_run = 1; end
      else if (m_run) begin
        logic [23:0] nx;
        nx = m_upc + 1;
        if (tk) nx = (tt == 2'd2) ? m_link : instr[23:0];
        if (isbr && tt == 2'd1 && cond) m_link = m_upc + 1;
        if ((isbr && tt == 2'd3) || stop) m_run = 0;
        m_upc = nx;
      end
    end
    checks++;
    if (n_taken == 0 || n_halt == 0 || n_ret == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
