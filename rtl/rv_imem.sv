// rv_imem -- instruction memory of the RISC-V cores.
//
// WORDS words of 32 bits, word addressed. The fetch port reads
// combinationally from a byte address (bits 1:0 ignored, higher bits wrap
// modulo the size); a separate write port, clocked, loads the program. The
// size and the load port are this design's choices.
module rv_imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [31:0]              wdata
);

  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[addr[AW+1:2]];

endmodule
