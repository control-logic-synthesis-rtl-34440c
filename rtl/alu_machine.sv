// alu_machine -- three-stage pipelined ALU machine.
//
// Architectural state is four 8-bit registers. One instruction (op, src1,
// src2, dest) enters per cycle. Stage 1 reads src1 and src2 from the register
// file; a bypass multiplexer in front of each operand can instead take the
// ALU output of the instruction one ahead, and the operands go into the first
// pipe register. Stage 2 applies the ALU; its result and dest go into the
// second pipe register. Stage 3 writes the result into the register file. The
// control logic selects the bypasses (instruction one ahead writes the
// register being read), the ALU operation and the register-file write enable.
// A result written in stage 3 is seen by a read in the same cycle
// (write-through), which covers the instruction two places behind.
//
// The datapath, the two pipe registers, the bypass from the ALU output and
// ADD = op 01 follow the published design. The other operations are this
// design's: op 00 is no operation (no write), 10 AND, 11 XOR. fwd1_o/fwd2_o
// show the bypass selects. dbg_addr/dbg_data read a register, and dbg_we
// with dbg_wdata loads one: the instruction set has no way to bring a
// constant in, so registers are given their starting values through this
// port (a write-back in the same cycle wins). rst_n is synchronous, active
// low, empties the pipeline and clears the registers.
module alu_machine (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] op,
  input  logic [1:0] src1,
  input  logic [1:0] src2,
  input  logic [1:0] dest,
  input  logic [1:0] dbg_addr,
  input  logic       dbg_we,
  input  logic [7:0] dbg_wdata,
  output logic [7:0] dbg_data,
  output logic       fwd1_o,
  output logic       fwd2_o
);

  typedef enum logic [1:0] {
    OP_NOP = 2'b00,
    OP_ADD = 2'b01,
    OP_AND = 2'b10,
    OP_XOR = 2'b11
  } op_e;

  typedef struct packed {
    logic       valid;   // writes a register
    op_e        op;
    logic [1:0] dest;
    logic [7:0] a;
    logic [7:0] b;
  } p1_t;

  typedef struct packed {
    logic       valid;
    logic [1:0] dest;
    logic [7:0] res;
  } p2_t;

  logic [7:0] regs [4];
  logic [7:0] rd1, rd2, alu_out;
  p1_t        p1;
  p2_t        p2;
  logic       fwd1, fwd2;

  // register file: combinational write-through reads, write at the edge
  function automatic logic [7:0] rf_read(input logic [1:0] a);
    return (p2.valid && p2.dest == a) ? p2.res : regs[a];
  endfunction

  assign rd1 = rf_read(src1);
  assign rd2 = rf_read(src2);
  assign dbg_data = regs[dbg_addr];

  // control logic: bypass selects
  assign fwd1 = p1.valid && p1.dest == src1;
  assign fwd2 = p1.valid && p1.dest == src2;

  // ALU
  always_comb begin
    unique case (p1.op)
      OP_ADD:  alu_out = p1.a + p1.b;
      OP_AND:  alu_out = p1.a & p1.b;
      OP_XOR:  alu_out = p1.a ^ p1.b;
      default: alu_out = '0;
    endcase
  end

  // next contents of the pipe registers
  p1_t p1_n;
  p2_t p2_n;
  always_comb begin
    p1_n.valid = rst_n && (op != OP_NOP);
    p1_n.op    = op_e'(op);
    p1_n.dest  = dest;
    p1_n.a     = fwd1 ? alu_out : rd1;
    p1_n.b     = fwd2 ? alu_out : rd2;
    p2_n.valid = rst_n && p1.valid;
    p2_n.dest  = p1.dest;
    p2_n.res   = alu_out;
  end

  always_ff @(posedge clk) begin
    p1 <= p1_n;
    p2 <= p2_n;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      for (int i = 0; i < 4; i++) regs[i] <= '0;
    else if (p2.valid)
      regs[p2.dest] <= p2.res;
    else if (dbg_we)
      regs[dbg_addr] <= dbg_wdata;
  end

  assign fwd1_o = fwd1;
  assign fwd2_o = fwd2;

endmodule
