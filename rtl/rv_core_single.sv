// rv_core_single -- single-cycle RV32I core with the Zbkb and Zbkc extensions.
//
// Every instruction completes in one clock cycle. The PC addresses the
// instruction memory; the instruction is decoded into opcode/funct3/funct7
// and an immediate, and rv_control turns those fields into the control word.
// The ALU's second operand is rs2 or the immediate (alu_imm), the first rs1
// or the PC (alu_pc, for AUIPC/JAL/branch targets). Write-back selects load
// data (mem_read), the return address pc+4 (jump) or the ALU result; the next
// PC is the jump/branch target or pc+4. Register file and memories update on
// the rising edge. This follows the published single-cycle datapath sketch;
// the branch comparator, the alu_pc operand select and the program-load and
// data-memory debug ports are this design's own additions.
//
// ZBKB/ZBKC = 0 give the RV32I-only and single-extension variants. FENCE,
// ecall, ebreak and undefined encodings only advance the PC. rst_n is
// synchronous and active low, sets PC = 0 and blocks register and memory
// writes while it is asserted.
module rv_core_single
  import rv_pkg::*;
#(
  parameter bit          ZBKB       = 1'b1,
  parameter bit          ZBKC       = 1'b1,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0]                   imem_wdata,
  input  logic [$clog2(DMEM_WORDS)-1:0] dbg_addr,
  input  logic                          dbg_we,
  input  logic [31:0]                   dbg_wdata,
  output logic [31:0]                   dbg_rdata,
  output logic [31:0]                   pc_o
);

  logic [31:0] pc, instr, imm, rs1_val, rs2_val, alu_in1, alu_in2, alu_out;
  logic [31:0] load_data, wb_data, pc_plus4, target;
  logic        alu_cond, take;
  ctrl_t       ctrl;

  rv_imem #(.WORDS(IMEM_WORDS)) i_mem (
    .clk, .addr(pc), .rdata(instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata));

  rv_control #(.ZBKB(ZBKB), .ZBKC(ZBKC), .BRANCHES(1'b1), .CMOV(1'b0)) u_ctrl (
    .instr, .ctrl);

  assign imm = imm_of(instr);

  rv_regfile #(.BYPASS(1'b0)) rf (
    .clk,
    .raddr1(instr[19:15]), .rdata1(rs1_val),
    .raddr2(instr[24:20]), .rdata2(rs2_val),
    .we(rst_n & ctrl.reg_write), .waddr(instr[11:7]), .wdata(wb_data));

  assign alu_in1 = ctrl.alu_pc  ? pc  : rs1_val;
  assign alu_in2 = ctrl.alu_imm ? imm : rs2_val;

  rv_alu u_alu (.op(ctrl.alu_op), .a(alu_in1), .b(alu_in2), .y(alu_out), .cond(alu_cond));

  rv_dmem #(.WORDS(DMEM_WORDS)) d_mem (
    .clk, .addr(alu_out), .re(ctrl.mem_read), .we(rst_n & ctrl.mem_write),
    .mask_mode(ctrl.mask_mode), .sign_ext(ctrl.mem_sign_ext),
    .wdata(rs2_val), .rdata(load_data),
    .dbg_addr, .dbg_we, .dbg_wdata, .dbg_rdata);

  assign pc_plus4 = pc + 32'd4;
  assign wb_data  = ctrl.mem_read ? load_data : ctrl.jump ? pc_plus4 : alu_out;
  assign target   = ctrl.jalr ? {alu_out[31:1], 1'b0} : alu_out;
  assign take     = ctrl.jump | (ctrl.branch & branch_taken(instr[14:12], rs1_val, rs2_val));

  always_ff @(posedge clk)
    if (!rst_n) pc <= '0;
    else        pc <= take ? target : pc_plus4;

  assign pc_o = pc;

endmodule
