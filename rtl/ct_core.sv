// ct_core -- constant-time cryptography core: three-stage RISC-V pipeline
// without conditional branches, with a conditional-move instruction.
//
// Stage 1 (IF) fetches at the PC into the fetch register. Stage 2 (ID/EX)
// decodes, reads the register file and executes. Stage 3 (MEM/WB) accesses
// the data memory and writes the register file; the register file forwards
// that write to a stage-2 read in the same cycle, so there are no stalls.
// The ISA is RV32I without conditional branches (their encodings do nothing),
// plus Zbkb, plus CMOV: rd <- rs1 if rs2 != 0, otherwise rd is left as it is.
// CMOV is R-type in the custom-0 opcode (0001011) with funct3 = funct7 = 0.
// JAL and JALR resolve in stage 2: the PC is redirected and the instruction
// just fetched is squashed (instruction_valid goes low for one cycle). Every
// instruction therefore has a latency fixed by its opcode alone and the cycle
// count of a program never depends on the data it processes.
// The three-stage split, the removed branches, CMOV and the stage-2 jump with
// its flush follow the published design; the kept instruction set beyond
// "what SHA-256 needs", the CMOV encoding and the forwarding are this
// design's choices. Ports, reset and memories are as in rv_core_single.
module ct_core
  import rv_pkg::*;
#(
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

  typedef struct packed {
    logic        valid;          // instruction_valid
    logic [31:0] instr;
    logic [31:0] pc;
  } fd_t;

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

  logic [31:0] pc, fetched;
  fd_t         fd;
  mw_t         mw;

  logic [31:0] imm, rs1_val, rs2_val, alu_in1, alu_in2, alu_out, target;
  logic        alu_cond, redirect, ex_write;
  ctrl_t       ctrl;

  logic [31:0] load_data, wb_data;
  logic        wb_en;

  // ---------------- stage 1: fetch ----------------
  rv_imem #(.WORDS(IMEM_WORDS)) i_mem (
    .clk, .addr(pc), .rdata(fetched),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata));

  // ---------------- stage 2: decode, execute ----------------
  rv_control #(.ZBKB(1'b1), .ZBKC(1'b0), .BRANCHES(1'b0), .CMOV(1'b1)) u_ctrl (
    .instr(fd.instr), .ctrl);

  assign imm = imm_of(fd.instr);

  rv_regfile #(.BYPASS(1'b1)) rf (
    .clk,
    .raddr1(fd.instr[19:15]), .rdata1(rs1_val),
    .raddr2(fd.instr[24:20]), .rdata2(rs2_val),
    .we(wb_en), .waddr(mw.rd), .wdata(wb_data));

  assign alu_in1 = ctrl.alu_pc  ? fd.pc : rs1_val;
  assign alu_in2 = ctrl.alu_imm ? imm   : rs2_val;

  rv_alu u_alu (.op(ctrl.alu_op), .a(alu_in1), .b(alu_in2), .y(alu_out), .cond(alu_cond));

  assign target   = ctrl.jalr ? {alu_out[31:1], 1'b0} : alu_out;
  assign redirect = fd.valid & ctrl.jump;
  assign ex_write = ctrl.reg_write & (~ctrl.cmov | alu_cond);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc       <= '0;
      fd.valid <= 1'b0;
      mw.valid <= 1'b0;
    end else begin
      pc       <= redirect ? target : pc + 32'd4;
      fd.valid <= ~redirect;
      mw.valid <= fd.valid;
    end
    fd.instr        <= fetched;
    fd.pc           <= pc;
    mw.reg_write    <= ex_write;
    mw.mem_read     <= ctrl.mem_read;
    mw.mem_write    <= ctrl.mem_write;
    mw.mask_mode    <= ctrl.mask_mode;
    mw.mem_sign_ext <= ctrl.mem_sign_ext;
    mw.jump         <= ctrl.jump;
    mw.rd           <= fd.instr[11:7];
    mw.alu_out      <= alu_out;
    mw.store_data   <= rs2_val;
    mw.pc_plus4     <= fd.pc + 32'd4;
  end

  // ---------------- stage 3: memory, write-back ----------------
  rv_dmem #(.WORDS(DMEM_WORDS)) d_mem (
    .clk, .addr(mw.alu_out), .re(mw.valid & mw.mem_read), .we(mw.valid & mw.mem_write),
    .mask_mode(mw.mask_mode), .sign_ext(mw.mem_sign_ext),
    .wdata(mw.store_data), .rdata(load_data),
    .dbg_addr, .dbg_we, .dbg_wdata, .dbg_rdata);

  assign wb_en   = mw.valid & mw.reg_write;
  assign wb_data = mw.mem_read ? load_data : mw.jump ? mw.pc_plus4 : mw.alu_out;

  assign pc_o = pc;

endmodule
