// rv_regfile -- the general-purpose register file of the RISC-V cores.
//
// 32 registers of 32 bits with two combinational read ports and one write
// port that updates on the rising clock edge. Register x0 reads as zero and
// ignores writes. With BYPASS = 1 a read of the register being written in the
// same cycle returns the new value (write-before-read); the pipelined cores
// use this so that the write-back stage and the register read of a later
// instruction can share a cycle without a stall. Contents are not reset.
module rv_regfile #(
  parameter bit BYPASS = 1'b0
) (
  input  logic        clk,
  input  logic [4:0]  raddr1,
  output logic [31:0] rdata1,
  input  logic [4:0]  raddr2,
  output logic [31:0] rdata2,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata
);

  logic [31:0] regs [1:31];

  always_ff @(posedge clk)
    if (we && waddr != 5'd0) regs[waddr] <= wdata;

  function automatic logic [31:0] rd(input logic [4:0] a);
    if (a == 5'd0)                            return 32'd0;
    else if (BYPASS && we && waddr == a)      return wdata;
    else                                      return regs[a];
  endfunction

  assign rdata1 = rd(raddr1);
  assign rdata2 = rd(raddr2);

endmodule
