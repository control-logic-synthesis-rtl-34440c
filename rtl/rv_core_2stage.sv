// rv_core_2stage -- two-stage pipelined RV32I core with Zbkb and Zbkc.
//
// Stage 1 fetches, decodes, reads the register file and executes; jumps and
// taken branches resolve here and steer the PC directly, so no instruction is
// ever fetched down a wrong path. Stage 2 accesses the data memory and writes
// the register file. The register file forwards the stage-2 write (ALU
// result, return address or freshly loaded data) to a stage-1 read of the
// same register in the same cycle, so dependent instructions, loads
// included, issue back to back: one instruction per cycle, never a stall or
// flush. The stage split follows the published two-stage design (fetch/
// decode/execute, then memory/write-back, register file read in step 1 and
// written in step 2); the forwarding is how this design makes that timing
// hold. Ports, reset and memories are as in rv_core_single.
module rv_core_2stage
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

  // stage 1 -> stage 2 register
  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic        mem_read;
    logic        mem_write;
    logic [1:0]  mask_mode;
    logic        mem_sign_ext;
    logic        jump;
    logic [4:0]  rd;
    logic [31:0] alu_out;
    logic [31:0] store_data;
    logic [31:0] pc_plus4;
  } mw_t;

  // ---------------- stage 1: fetch, decode, execute ----------------
  logic [31:0] pc, instr, imm, rs1_val, rs2_val, alu_in1, alu_in2, alu_out;
  logic [31:0] pc_plus4, target;
  logic        alu_cond, take;
  ctrl_t       ctrl;
  mw_t         mw;

  // ---------------- stage 2 signals ----------------
  logic [31:0] load_data, wb_data;
  logic        wb_en;

  rv_imem #(.WORDS(IMEM_WORDS)) i_mem (
    .clk, .addr(pc), .rdata(instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata));

  rv_control #(.ZBKB(ZBKB), .ZBKC(ZBKC), .BRANCHES(1'b1), .CMOV(1'b0)) u_ctrl (
    .instr, .ctrl);

  assign imm = imm_of(instr);

  rv_regfile #(.BYPASS(1'b1)) rf (
    .clk,
    .raddr1(instr[19:15]), .rdata1(rs1_val),
    .raddr2(instr[24:20]), .rdata2(rs2_val),
    .we(wb_en), .waddr(mw.rd), .wdata(wb_data));

  assign alu_in1 = ctrl.alu_pc  ? pc  : rs1_val;
  assign alu_in2 = ctrl.alu_imm ? imm : rs2_val;

  rv_alu u_alu (.op(ctrl.alu_op), .a(alu_in1), .b(alu_in2), .y(alu_out), .cond(alu_cond));

  assign pc_plus4 = pc + 32'd4;
  assign target   = ctrl.jalr ? {alu_out[31:1], 1'b0} : alu_out;
  assign take     = ctrl.jump | (ctrl.branch & branch_taken(instr[14:12], rs1_val, rs2_val));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc       <= '0;
      mw.valid <= 1'b0;
    end else begin
      pc            <= take ? target : pc_plus4;
      mw.valid      <= 1'b1;
    end
    mw.reg_write    <= ctrl.reg_write;
    mw.mem_read     <= ctrl.mem_read;
    mw.mem_write    <= ctrl.mem_write;
    mw.mask_mode    <= ctrl.mask_mode;
    mw.mem_sign_ext <= ctrl.mem_sign_ext;
    mw.jump         <= ctrl.jump;
    mw.rd           <= instr[11:7];
    mw.alu_out      <= alu_out;
    mw.store_data   <= rs2_val;
    mw.pc_plus4     <= pc_plus4;
  end

  // ---------------- stage 2: memory, write-back ----------------
  rv_dmem #(.WORDS(DMEM_WORDS)) d_mem (
    .clk, .addr(mw.alu_out), .re(mw.valid & mw.mem_read), .we(mw.valid & mw.mem_write),
    .mask_mode(mw.mask_mode), .sign_ext(mw.mem_sign_ext),
    .wdata(mw.store_data), .rdata(load_data),
    .dbg_addr, .dbg_we, .dbg_wdata, .dbg_rdata);

  assign wb_en   = mw.valid & mw.reg_write;
  assign wb_data = mw.mem_read ? load_data : mw.jump ? mw.pc_plus4 : mw.alu_out;

  assign pc_o = pc;

endmodule
