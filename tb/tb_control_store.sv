// tb_control_store: self-checking test of the microprogram memory: random
// writes against a shadow copy, asynchronous reads at the full depth.
module tb_control_store;
  logic clk = 0, we;
  logic [15:0] raddr, waddr;
  logic [31:0] rdata, wdata;
  logic [31:0] shadow [logic [15:0]];
  logic [15:0] used [64];
  int checks = 0, failures = 0;

  control_store dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      used[i] = (i == 63) ? 16'hFFFF : 16'($urandom);
      waddr = used[i]; wdata = $urandom; we = 1;
      shadow[waddr] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      raddr = used[$urandom_range(0, 63)];
      waddr = used[$urandom_range(0, 63)];
      we = $urandom_range(0, 1);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++;
        if (failures < 10) $display("addr %h got %h want %h", raddr, rdata, shadow[raddr]);
      end
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
