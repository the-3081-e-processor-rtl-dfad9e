// control_store: the microprogram memory, 32-bit microinstructions.
//
// The microcode is produced off-line from IBM object code and loaded through
// the host interface while the processor is stopped. The read port is
// asynchronous (the microinstruction addressed by the micro-program counter is
// available in the same cycle); writes happen at the rising clock edge. The
// depth is this design's choice; a 24-bit branch address could reach 16M
// words.
module control_store #(
  parameter int unsigned WORDS = 65536
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata
);
  logic [31:0] mem [WORDS];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end
endmodule
